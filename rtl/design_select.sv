// design_select: the dynamic design select module. It is the demultiplexer
// between the physical ports and the virtual data planes.
//
// The first seven words of each frame are held in a header buffer. When word 6
// (which carries the destination virtual address, DST VIP for IPv4, the label
// for ROFL) arrives, the address is searched in the design select table, a
// TCAM of ENTRIES {address, mask} -> {hardware?, plane, tag} entries written
// by the operator (tbl = TBL_FIB, result in data[71:64] = {tag[3:0],
// plane[2:0], hw}). A network can instead be classified by its virtual MAC
// address: an entry with data[120] = 1 matches the DST MAC data[119:72]
// exactly (the document allows either; the key layout is this design's).
// One cycle later the destination is decided:
//   * frames from a CPU RX queue (src port 4..7) have been processed by a
//     software data plane and go to the CPU transceiver, which sends them out;
//   * a hit on a hardware entry goes to that hardware plane, tagged with its VID;
//   * a hit on a software entry goes to the CPU transceiver, tagged with the
//     software interface number, in single-receiver mode (TBL_MODE data[0] = 1).
//     In multi-receiver mode the CPU queues are unused and such frames are dropped;
//   * a miss, or a frame shorter than seven words, is dropped.
// The buffered header is then replayed to the chosen output and the rest of
// the frame streams through. Migrating a virtual network between hardware
// and software is one table write. Added latency: header length + 2 cycles.
module design_select
  import vnet_pkg::*;
#(
  parameter int NUM_PLANES = 4,
  parameter int ENTRIES    = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_en,
  input  cfg_wr_t     cfg,
  input  logic        in_valid,
  output logic        in_ready,
  input  pkt_word_t   in_word,
  output logic        pl_valid [NUM_PLANES],
  input  logic        pl_ready [NUM_PLANES],
  output logic        cpu_valid,
  input  logic        cpu_ready,
  output pkt_word_t   out_word,            // shared by all outputs
  output logic        single_rx,           // current mode
  output logic [31:0] n_hw,                // frames sent to hardware planes
  output logic [31:0] n_sw,                // frames sent to software planes
  output logic [31:0] n_ret,               // frames returned from software
  output logic [31:0] n_drop
);
  localparam int PW = (NUM_PLANES > 1) ? $clog2(NUM_PLANES) : 1;

  typedef enum logic [2:0] {S_CAP, S_DEC, S_EMIT, S_PASS, S_DROP} state_e;
  state_e state;

  pkt_word_t  hdr [HDR_WORDS];
  logic [2:0] cnt, ecnt;
  logic       ended;          // eop already captured in the header
  logic       to_cpu;
  logic [PW-1:0] plane;
  logic [VID_W-1:0] tag;

  logic       t_valid, t_hit;
  logic [7:0] t_res;

  // Table key {DST MAC, DST VIP}: an address entry ignores the MAC half, a MAC
  // entry (data[120] = 1) matches the whole MAC and ignores the address half.
  logic        by_mac;
  logic [79:0] w_key, w_mask;
  assign by_mac = cfg.data[120];
  assign w_key  = by_mac ? {cfg.data[119:72], 32'h0} : {48'h0, cfg.data[31:0]};
  assign w_mask = by_mac ? {48'hFFFF_FFFF_FFFF, 32'h0} : {48'h0, cfg.data[63:32]};

  tcam #(.ENTRIES(ENTRIES), .KEY_W(80), .RES_W(8)) u_tbl (
    .clk, .rst_n,
    .w_en(cfg_en && cfg.we && cfg.tbl == TBL_FIB), .w_idx(cfg.idx[$clog2(ENTRIES)-1:0]),
    .w_valid(cfg.data[127]), .w_key(w_key), .w_mask(w_mask), .w_res(cfg.data[71:64]),
    .s_valid(state == S_CAP && in_valid && cnt == 3'(HDR_WORDS - 1)),
    .s_key({hdr[0].data[63:16], get_vip(in_word.data)}),
    .r_valid(t_valid), .r_hit(t_hit), .r_idx(), .r_key(), .r_res(t_res)
  );

  // output side
  logic out_v, out_rdy;
  pkt_word_t cur;
  always_comb begin
    cur     = (state == S_EMIT) ? hdr[ecnt] : in_word;
    cur.tag = tag;
    out_word = cur;
    out_v   = (state == S_EMIT) || (state == S_PASS && in_valid);
    out_rdy = to_cpu ? cpu_ready : pl_ready[plane];
    cpu_valid = out_v && to_cpu;
    for (int p = 0; p < NUM_PLANES; p++) pl_valid[p] = out_v && !to_cpu && (plane == PW'(p));
    unique case (state)
      S_CAP:   in_ready = 1'b1;
      S_PASS:  in_ready = out_rdy;
      S_DROP:  in_ready = 1'b1;
      default: in_ready = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (state == S_CAP && in_valid) hdr[cnt] <= in_word;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_CAP;
      cnt <= '0; ecnt <= '0; ended <= 1'b0;
      to_cpu <= 1'b0; plane <= '0; tag <= '0;
      single_rx <= 1'b1;
      n_hw <= '0; n_sw <= '0; n_ret <= '0; n_drop <= '0;
    end else begin
      if (cfg_en && cfg.we && cfg.tbl == TBL_MODE) single_rx <= cfg.data[0];
      unique case (state)
        S_CAP: if (in_valid) begin
          if (cnt == 3'(HDR_WORDS - 1)) begin
            ended <= in_word.eop;
            cnt   <= '0;
            state <= S_DEC;
          end else if (in_word.eop) begin
            cnt    <= '0;                 // runt frame: discard
            n_drop <= n_drop + 1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_DEC: begin
          ecnt <= '0;
          if (hdr[0].src >= 3'(NUM_MAC)) begin
            to_cpu <= 1'b1; tag <= hdr[0].tag; n_ret <= n_ret + 1; state <= S_EMIT;
          end else if (t_hit && t_res[0]) begin
            to_cpu <= 1'b0; plane <= PW'(t_res[3:1]); tag <= t_res[7:4];
            n_hw <= n_hw + 1; state <= S_EMIT;
          end else if (t_hit && single_rx) begin
            to_cpu <= 1'b1; tag <= t_res[7:4]; n_sw <= n_sw + 1; state <= S_EMIT;
          end else begin
            n_drop <= n_drop + 1;
            state  <= ended ? S_CAP : S_DROP;
          end
        end
        S_EMIT: if (out_rdy) begin
          if (ecnt == 3'(HDR_WORDS - 1)) state <= ended ? S_CAP : S_PASS;
          else ecnt <= ecnt + 1'b1;
        end
        S_PASS: if (in_valid && out_rdy && in_word.eop) state <= S_CAP;
        S_DROP: if (in_valid && in_word.eop) state <= S_CAP;
        default: state <= S_CAP;
      endcase
    end
  end

`ifndef SYNTHESIS
  a_dec_has_result: assert property (@(posedge clk) disable iff (!rst_n) state == S_DEC |-> t_valid);
`endif
endmodule
