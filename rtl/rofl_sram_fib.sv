// rofl_sram_fib: ROFL flat-label forwarding table of one hardware data plane
// in a shared external SRAM bank, with an on-chip pointer cache.
//
// Each virtual router owns a contiguous block of SRAM (its circular label
// namespace), one location per label. A valid label's location holds its own
// egress port; every other location holds the port of the closest valid label
// (the control plane fills these in when it adds a label). A location is
// {valid, port[2:0], label[31:0]}, the label being the one whose port is stored.
// The location of a destination is namespace_base[VID] + (label & namespace_mask[VID]),
// a simple hash of the VID and the label. In the same cycle the SRAM read is
// requested, the label is searched in the 32-entry pointer cache TCAM. The
// entry with the lower label of the two results wins.
//
// Timing: request accepted with the SRAM request in the same cycle; with
// RD_LAT = 2, rsp_valid follows 2 + RD_LAT = 4 cycles later. One lookup at a time.
// Writes: tbl = TBL_NS, idx = VID, data[18:0] base, data[50:32] mask;
// tbl = TBL_AUX pointer cache entry (data[31:0] label, [63:32] care-mask,
// [66:64] port, [127] valid).
module rofl_sram_fib
  import vnet_pkg::*;
#(
  parameter int CACHE_ENTRIES = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cfg_en,
  input  cfg_wr_t            cfg,
  input  logic               req_valid,
  output logic               req_ready,
  input  lkup_req_t          req,
  output logic               rsp_valid,
  output lkup_rsp_t          rsp,
  output logic               sr_req,
  output logic [SRAM_AW-1:0] sr_addr,
  input  logic               sr_gnt,
  input  logic               sr_rvalid,
  input  logic [SRAM_DW-1:0] sr_rdata
);
  localparam int NVID = 1 << VID_W;

  logic [SRAM_AW-1:0] ns_base [NVID];
  logic [SRAM_AW-1:0] ns_mask [NVID];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < NVID; v++) begin
        ns_base[v] <= '0;
        ns_mask[v] <= '0;
      end
    end else if (cfg_en && cfg.we && cfg.tbl == TBL_NS) begin
      ns_base[cfg.idx[VID_W-1:0]] <= cfg.data[SRAM_AW-1:0];
      ns_mask[cfg.idx[VID_W-1:0]] <= cfg.data[32 +: SRAM_AW];
    end
  end

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_WAIT} state_e;
  state_e state;

  logic [SRAM_AW-1:0] addr_q;
  logic               c_valid, c_hit, ch_q;
  logic [31:0]        c_key, ck_q;
  logic [2:0]         c_port, cp_q;
  logic [SRAM_AW-1:0] hash;

  assign hash = ns_base[req.vid] + (req.addr[SRAM_AW-1:0] & ns_mask[req.vid]);

  tcam #(.ENTRIES(CACHE_ENTRIES), .KEY_W(32), .RES_W(3)) u_cache (
    .clk, .rst_n,
    .w_en(cfg_en && cfg.we && cfg.tbl == TBL_AUX), .w_idx(cfg.idx[$clog2(CACHE_ENTRIES)-1:0]),
    .w_valid(cfg.data[127]), .w_key(cfg.data[31:0]), .w_mask(cfg.data[63:32]), .w_res(cfg.data[66:64]),
    .s_valid(req_valid && req_ready), .s_key(req.addr),
    .r_valid(c_valid), .r_hit(c_hit), .r_idx(), .r_key(c_key), .r_res(c_port)
  );

  assign req_ready = (state == S_IDLE);
  assign sr_req    = (state == S_IDLE && req_valid) || (state == S_REQ);
  assign sr_addr   = (state == S_IDLE) ? hash : addr_q;

  logic s_ok, use_cache;
  assign s_ok      = sr_rdata[35];
  assign use_cache = ch_q && (!s_ok || (ck_q < sr_rdata[31:0]));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      rsp_valid <= 1'b0;
      rsp       <= '0;
      addr_q    <= '0;
      ch_q      <= 1'b0;
      ck_q      <= '0;
      cp_q      <= '0;
    end else begin
      rsp_valid <= 1'b0;
      if (c_valid) begin
        ch_q <= c_hit;
        ck_q <= c_key;
        cp_q <= c_port;
      end
      unique case (state)
        S_IDLE: if (req_valid) begin
          addr_q <= hash;
          state  <= sr_gnt ? S_WAIT : S_REQ;
        end
        S_REQ:  if (sr_gnt) state <= S_WAIT;
        S_WAIT: if (sr_rvalid) begin
          rsp_valid <= 1'b1;
          rsp.hit   <= s_ok || ch_q;
          rsp.port  <= use_cache ? cp_q : sr_rdata[34:32];
          rsp.nh    <= use_cache ? ck_q : sr_rdata[31:0];
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
