// rofl_tcam_fib: on-chip flat-label (ROFL) lookup of one hardware data plane.
//
// Two TCAMs are searched in the same cycle with the destination label: the
// forwarding table of resident host IDs (tbl = TBL_FIB) and the pointer cache
// of recently used source routes (tbl = TBL_AUX). IDs are written in ascending
// order, so each TCAM's first match is its lowest matching ID; of the two hits
// the one with the lower ID is used, as the document prescribes. Entry fields:
// data[31:0] ID, data[63:32] care-mask, data[66:64] egress port, data[127]
// valid. Lookup latency is one cycle; a request is accepted every cycle.
// rsp.nh returns the winning label so later stages can resolve its MAC.
module rofl_tcam_fib
  import vnet_pkg::*;
#(
  parameter int ENTRIES       = 32,
  parameter int CACHE_ENTRIES = 32
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      cfg_en,
  input  cfg_wr_t   cfg,
  input  logic      req_valid,
  output logic      req_ready,
  input  lkup_req_t req,
  output logic      rsp_valid,
  output lkup_rsp_t rsp
);
  logic f_hit, c_hit, c_valid;
  logic [31:0] f_key, c_key;
  logic [2:0]  f_port, c_port;

  tcam #(.ENTRIES(ENTRIES), .KEY_W(32), .RES_W(3)) u_fib (
    .clk, .rst_n,
    .w_en(cfg_en && cfg.we && cfg.tbl == TBL_FIB), .w_idx(cfg.idx[$clog2(ENTRIES)-1:0]),
    .w_valid(cfg.data[127]), .w_key(cfg.data[31:0]), .w_mask(cfg.data[63:32]), .w_res(cfg.data[66:64]),
    .s_valid(req_valid), .s_key(req.addr),
    .r_valid(rsp_valid), .r_hit(f_hit), .r_idx(), .r_key(f_key), .r_res(f_port)
  );

  tcam #(.ENTRIES(CACHE_ENTRIES), .KEY_W(32), .RES_W(3)) u_cache (
    .clk, .rst_n,
    .w_en(cfg_en && cfg.we && cfg.tbl == TBL_AUX), .w_idx(cfg.idx[$clog2(CACHE_ENTRIES)-1:0]),
    .w_valid(cfg.data[127]), .w_key(cfg.data[31:0]), .w_mask(cfg.data[63:32]), .w_res(cfg.data[66:64]),
    .s_valid(req_valid), .s_key(req.addr),
    .r_valid(c_valid), .r_hit(c_hit), .r_idx(), .r_key(c_key), .r_res(c_port)
  );

  logic use_cache;
  assign use_cache = c_hit && (!f_hit || (c_key < f_key));
  assign req_ready = 1'b1;
  assign rsp.hit  = f_hit || c_hit;
  assign rsp.port = use_cache ? c_port : f_port;
  assign rsp.nh   = use_cache ? c_key  : f_key;
endmodule
