// vdp_plane: one hardware virtual data plane, the per-network copy of the
// NetFPGA output-port-lookup stage. Every plane has its own tables and control
// registers, so planes share no forwarding logic.
//
// Flow per frame: capture header words 0..6 -> look up the destination (DST
// VIP or ROFL label) in the plane's forwarding table -> look up the next hop
// in the ARP table -> replay the rewritten header -> stream the rest of the
// frame. A frame is dropped if either lookup misses or it is shorter than 7 words.
// Rewrites:
//   IPv4 (IPIP tunnel): outer DST IP := next-hop tunnel address, outer SRC IP
//     := the plane's address on the output port, outer header checksum
//     recomputed, DST MAC := ARP result, SRC MAC := the plane's MAC on the
//     output port. The inner (virtual) header is left intact.
//   ROFL: DST/SRC MAC as above; the ARP table is keyed by the winning label.
// Every word leaves with dst = output port and tag = VID.
//
// PROTO selects the protocol and USE_SRAM the forwarding table:
//   IPv4 + TCAM  -> ipv4_tcam_fib (1-cycle lookup)
//   IPv4 + SRAM  -> ipv4_sram_fib (shared L1/L2 SRAM banks + Conflict CAM)
//   ROFL + TCAM  -> rofl_tcam_fib (1-cycle lookup)
//   ROFL + SRAM  -> rofl_sram_fib (namespace in SRAM bank L2 + pointer cache)
// Unused SRAM requester ports are held idle. One frame is processed at a time;
// the 32-word FIFO in front of the plane absorbs arrivals meanwhile.
// Routing mode of an IPv4 plane (tbl = TBL_MODE, data[1:0], reset RT_DST):
// destination-based (key = DST VIP), source-based (key = inner SRC VIP) or
// source-and-destination (TCAM table only: key {SRC VIP, DST VIP}; an SRAM
// table then routes on the destination). The document lists the three modes
// without detail; how they are selected is this design's choice.
// Registers: tbl = TBL_ARP (32-entry CAM, data[31:0] next hop, [95:64] MAC
// bits 31:0, [111:96] MAC bits 47:32), TBL_PMAC / TBL_PIP (idx = port).
module vdp_plane
  import vnet_pkg::*;
#(
  parameter proto_e PROTO       = PROTO_IPV4,
  parameter bit     USE_SRAM    = 1'b1,
  parameter int     FIB_ENTRIES = 32,
  parameter int     ARP_ENTRIES = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cfg_en,
  input  cfg_wr_t            cfg,
  input  logic               in_valid,
  output logic               in_ready,
  input  pkt_word_t          in_word,
  output logic               out_valid,
  input  logic               out_ready,
  output pkt_word_t          out_word,
  output logic               l1_req,
  output logic [SRAM_AW-1:0] l1_addr,
  input  logic               l1_gnt,
  input  logic               l1_rvalid,
  input  logic [SRAM_DW-1:0] l1_rdata,
  output logic               l2_req,
  output logic [SRAM_AW-1:0] l2_addr,
  input  logic               l2_gnt,
  input  logic               l2_rvalid,
  input  logic [SRAM_DW-1:0] l2_rdata,
  output logic [31:0]        n_fwd,
  output logic [31:0]        n_drop,
  output logic [31:0]        n_conflict   // lookups redirected by the Conflict CAM
);
  typedef enum logic [2:0] {S_CAP, S_LREQ, S_LWAIT, S_ARP, S_EMIT, S_PASS, S_DROP} state_e;
  state_e state;

  pkt_word_t  hdr [HDR_WORDS];
  logic [2:0] cnt, ecnt;
  logic       ended;

  // ---------------------------------------------------------------- lookup
  logic      req_valid, req_ready, rsp_valid, conflict;
  lkup_req_t req;
  route_mode_e route_mode;
  lkup_rsp_t rsp, rsp_q;

  assign req_valid = (state == S_LREQ);
  assign req.vid   = hdr[0].tag;
  assign req.src   = get_svip(hdr[HDR_WORDS-2].data, hdr[HDR_WORDS-1].data);
  assign req.addr  = (PROTO == PROTO_IPV4 && route_mode == RT_SRC) ? req.src
                                                                   : get_vip(hdr[HDR_WORDS-1].data);

  if (PROTO == PROTO_IPV4 && !USE_SRAM) begin : g_fib
    ipv4_tcam_fib #(.ENTRIES(FIB_ENTRIES)) u_fib (
      .clk, .rst_n, .cfg_en, .cfg, .req_valid, .req_ready, .req, .rsp_valid, .rsp);
    assign {l1_req, l1_addr, l2_req, l2_addr} = '0;
    assign conflict = 1'b0;
  end else if (PROTO == PROTO_IPV4) begin : g_fib
    ipv4_sram_fib u_fib (
      .clk, .rst_n, .cfg_en, .cfg, .req_valid, .req_ready, .req, .rsp_valid, .rsp,
      .l1_req, .l1_addr, .l1_gnt, .l1_rvalid, .l1_rdata,
      .l2_req, .l2_addr, .l2_gnt, .l2_rvalid, .l2_rdata, .conflict_hit(conflict));
  end else if (!USE_SRAM) begin : g_fib
    rofl_tcam_fib #(.ENTRIES(FIB_ENTRIES)) u_fib (
      .clk, .rst_n, .cfg_en, .cfg, .req_valid, .req_ready, .req, .rsp_valid, .rsp);
    assign {l1_req, l1_addr, l2_req, l2_addr} = '0;
    assign conflict = 1'b0;
  end else begin : g_fib
    rofl_sram_fib u_fib (
      .clk, .rst_n, .cfg_en, .cfg, .req_valid, .req_ready, .req, .rsp_valid, .rsp,
      .sr_req(l2_req), .sr_addr(l2_addr), .sr_gnt(l2_gnt), .sr_rvalid(l2_rvalid), .sr_rdata(l2_rdata));
    assign {l1_req, l1_addr} = '0;
    assign conflict = 1'b0;
  end

  // ---------------------------------------------------------------- ARP and port registers
  logic        a_valid, a_hit;
  logic [47:0] a_mac;
  logic [47:0] pmac [NUM_PORTS];
  logic [31:0] pip  [NUM_PORTS];

  tcam #(.ENTRIES(ARP_ENTRIES), .KEY_W(32), .RES_W(48)) u_arp (
    .clk, .rst_n,
    .w_en(cfg_en && cfg.we && cfg.tbl == TBL_ARP), .w_idx(cfg.idx[$clog2(ARP_ENTRIES)-1:0]),
    .w_valid(cfg.data[127]), .w_key(cfg.data[31:0]), .w_mask('1), .w_res(cfg.data[111:64]),
    .s_valid(state == S_LWAIT && rsp_valid && rsp.hit), .s_key(rsp.nh),
    .r_valid(a_valid), .r_hit(a_hit), .r_idx(), .r_key(), .r_res(a_mac)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NUM_PORTS; p++) begin
        pmac[p] <= '0;
        pip[p]  <= '0;
      end
      route_mode <= RT_DST;
    end else if (cfg_en && cfg.we) begin
      if (cfg.tbl == TBL_PMAC) pmac[cfg.idx[PORT_W-1:0]] <= cfg.data[47:0];
      if (cfg.tbl == TBL_PIP)  pip[cfg.idx[PORT_W-1:0]]  <= cfg.data[31:0];
      if (cfg.tbl == TBL_MODE) route_mode <= route_mode_e'(cfg.data[1:0]);
    end
  end

  // ---------------------------------------------------------------- datapath
  pkt_word_t cur;
  always_comb begin
    cur     = (state == S_EMIT) ? hdr[ecnt] : in_word;
    cur.dst = rsp_q.port;
    cur.tag = hdr[0].tag;
    out_word  = cur;
    out_valid = (state == S_EMIT) || (state == S_PASS && in_valid);
    unique case (state)
      S_CAP, S_DROP: in_ready = 1'b1;
      S_PASS:        in_ready = out_ready;
      default:       in_ready = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (state == S_CAP && in_valid) hdr[cnt] <= in_word;
    if (state == S_ARP && a_valid && a_hit) begin
      hdr[0].data[63:16] <= a_mac;
      hdr[0].data[15:0]  <= pmac[rsp_q.port][47:32];
      hdr[1].data[63:32] <= pmac[rsp_q.port][31:0];
      if (PROTO == PROTO_IPV4) begin
        hdr[3].data[63:48] <= ipv4_csum(hdr[1].data, hdr[2].data,
                                        {hdr[3].data[63:48], pip[rsp_q.port], rsp_q.nh[31:16]},
                                        {rsp_q.nh[15:0], hdr[4].data[47:0]});
        hdr[3].data[47:16] <= pip[rsp_q.port];
        hdr[3].data[15:0]  <= rsp_q.nh[31:16];
        hdr[4].data[63:48] <= rsp_q.nh[15:0];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_CAP;
      cnt <= '0; ecnt <= '0; ended <= 1'b0;
      rsp_q <= '0;
      n_fwd <= '0; n_drop <= '0; n_conflict <= '0;
    end else begin
      if (conflict) n_conflict <= n_conflict + 1;
      unique case (state)
        S_CAP: if (in_valid) begin
          if (cnt == 3'(HDR_WORDS - 1)) begin
            ended <= in_word.eop;
            cnt   <= '0;
            state <= S_LREQ;
          end else if (in_word.eop) begin
            cnt    <= '0;
            n_drop <= n_drop + 1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_LREQ: if (req_ready) state <= S_LWAIT;
        S_LWAIT: if (rsp_valid) begin
          rsp_q <= rsp;
          if (rsp.hit) state <= S_ARP;
          else begin
            n_drop <= n_drop + 1;
            state  <= ended ? S_CAP : S_DROP;
          end
        end
        S_ARP: if (a_valid) begin
          ecnt <= '0;
          if (a_hit) state <= S_EMIT;
          else begin
            n_drop <= n_drop + 1;
            state  <= ended ? S_CAP : S_DROP;
          end
        end
        S_EMIT: if (out_ready) begin
          if (ecnt == 3'(HDR_WORDS - 1)) begin
            n_fwd <= n_fwd + 1;
            state <= ended ? S_CAP : S_PASS;
          end else ecnt <= ecnt + 1'b1;
        end
        S_PASS: if (in_valid && out_ready && in_word.eop) state <= S_CAP;
        S_DROP: if (in_valid && in_word.eop) state <= S_CAP;
        default: state <= S_CAP;
      endcase
    end
  end
endmodule
