// ipv4_tcam_fib: on-chip IPv4 forwarding table of one hardware virtual data
// plane, built from a 32-entry TCAM (the size used in the document's TCAM
// configuration). Each entry maps a prefix (key + care-mask) to a 3-bit output
// port and a 32-bit next-hop tunnel address; the control plane writes longer
// prefixes at lower indices so the TCAM's first match is the longest prefix.
// A request is accepted every cycle and answered one cycle later (1-cycle
// lookup). Table writes arrive on the cfg port with tbl = TBL_FIB:
// data[31:0] prefix, data[63:32] mask, data[98:96] port, data[95:64] next hop,
// data[127] entry valid, idx = entry number.
// Each entry also carries a source prefix, for source-and-destination routing:
// the search key is {SRC VIP, address}. A tbl = TBL_SRC write (data[31:0]
// source prefix, data[63:32] its mask) stages the source half of the next
// TBL_FIB write; after that write it returns to "any source" (mask 0), so a
// plain route write matches every source. The document names the routing
// modes; the staging register is this design's way of writing them.
module ipv4_tcam_fib
  import vnet_pkg::*;
#(
  parameter int ENTRIES = 32
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      cfg_en,     // cfg is addressed to this plane
  input  cfg_wr_t   cfg,
  input  logic      req_valid,
  output logic      req_ready,
  input  lkup_req_t req,
  output logic      rsp_valid,
  output lkup_rsp_t rsp
);
  logic        r_hit;
  logic [34:0] r_res;
  logic [31:0] src_key, src_mask;   // staged source half of the next entry
  logic        fib_we;

  assign fib_we = cfg_en && cfg.we && cfg.tbl == TBL_FIB;

  // A TBL_SRC write stages a source prefix; the next TBL_FIB write uses it and
  // clears it back to "any source".
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      src_key  <= '0;
      src_mask <= '0;
    end else if (cfg_en && cfg.we && cfg.tbl == TBL_SRC) begin
      src_key  <= cfg.data[31:0];
      src_mask <= cfg.data[63:32];
    end else if (fib_we) begin
      src_key  <= '0;
      src_mask <= '0;
    end
  end

  tcam #(.ENTRIES(ENTRIES), .KEY_W(64), .RES_W(35)) u_tcam (
    .clk, .rst_n,
    .w_en   (fib_we),
    .w_idx  (cfg.idx[$clog2(ENTRIES)-1:0]),
    .w_valid(cfg.data[127]),
    .w_key  ({src_key, cfg.data[31:0]}),
    .w_mask ({src_mask, cfg.data[63:32]}),
    .w_res  (cfg.data[98:64]),
    .s_valid(req_valid),
    .s_key  ({req.src, req.addr}),
    .r_valid(rsp_valid),
    .r_hit  (r_hit),
    .r_idx  (),
    .r_key  (),
    .r_res  (r_res)
  );

  assign req_ready = 1'b1;
  assign rsp.hit  = r_hit;
  assign rsp.port = r_res[34:32];
  assign rsp.nh   = r_res[31:0];
endmodule
