// cpu_transceiver: the bridge between the FPGA datapath and the software data
// planes over the CPU DMA queues (single-receiver arrangement).
//
// Frames arriving from a MAC port (src 0..3) belong to a software data plane.
// They are sent to the CPU TX queue of their source port (port 4 + src), and
// their destination MAC is replaced by the MAC of the target software plane's
// virtual Ethernet interface. That interface is selected by the word's tag and
// looked up in a 16-entry table (tbl = TBL_PMAC, idx = interface,
// data[47:0] = MAC), so the host's software bridge delivers the frame to the
// right container. Frames arriving from a CPU RX queue (src 4..7) have already
// been forwarded by software. They leave on the MAC TX queue with the same
// number (port src - 4), unchanged.
// Pure streaming: one word per cycle, no added latency; the decision is
// taken on the start-of-packet word and held for the rest of the frame.
module cpu_transceiver
  import vnet_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_en,
  input  cfg_wr_t     cfg,
  input  logic        in_valid,
  output logic        in_ready,
  input  pkt_word_t   in_word,
  output logic        out_valid,
  input  logic        out_ready,
  output pkt_word_t   out_word,
  output logic [31:0] n_to_sw,
  output logic [31:0] n_from_sw
);
  localparam int NIF = 1 << VID_W;
  logic [47:0] sw_mac [NIF];
  logic [PORT_W-1:0] dst_q;

  logic from_mac;
  logic [PORT_W-1:0] dst_now;
  assign from_mac = (in_word.src < 3'(NUM_MAC));
  assign dst_now  = from_mac ? in_word.src + 3'(NUM_MAC) : in_word.src - 3'(NUM_MAC);

  always_comb begin
    out_word     = in_word;
    out_word.dst = in_word.sop ? dst_now : dst_q;
    if (in_word.sop && from_mac) out_word.data[63:16] = sw_mac[in_word.tag];
  end
  assign out_valid = in_valid;
  assign in_ready  = out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NIF; i++) sw_mac[i] <= '0;
      dst_q     <= '0;
      n_to_sw   <= '0;
      n_from_sw <= '0;
    end else begin
      if (cfg_en && cfg.we && cfg.tbl == TBL_PMAC) sw_mac[cfg.idx[VID_W-1:0]] <= cfg.data[47:0];
      if (in_valid && out_ready && in_word.sop) begin
        dst_q <= dst_now;
        if (from_mac) n_to_sw <= n_to_sw + 1;
        else          n_from_sw <= n_from_sw + 1;
      end
    end
  end
endmodule
