// output_queues: the output queue stage. Frames from the output arbiter are
// written whole into the FIFO of their destination port (4 MAC TX queues and
// 4 CPU TX queues), chosen on the start-of-packet word and held for the rest
// of the frame. A full queue back-pressures the arbiter. Each queue drains on
// its own valid/ready port to the MAC or DMA engine. Queue depth
// is this design's choice (256 words hold one 1518-byte frame with margin).
module output_queues
  import vnet_pkg::*;
#(
  parameter int NQ    = NUM_PORTS,
  parameter int DEPTH = 256
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  output logic      in_ready,
  input  pkt_word_t in_word,
  output logic      q_valid [NQ],
  input  logic      q_ready [NQ],
  output pkt_word_t q_word  [NQ]
);
  logic [PORT_W-1:0] dst_q, dst;
  logic              f_ready [NQ];

  assign dst      = in_word.sop ? in_word.dst : dst_q;
  assign in_ready = f_ready[dst];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dst_q <= '0;
    else if (in_valid && in_ready && in_word.sop) dst_q <= in_word.dst;
  end

  for (genvar q = 0; q < NQ; q++) begin : g_q
    pkt_word_t w;
    always_comb begin
      w     = in_word;
      w.dst = dst;
    end
    pkt_fifo #(.DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n,
      .in_valid (in_valid && dst == PORT_W'(q)),
      .in_ready (f_ready[q]),
      .in_word  (w),
      .out_valid(q_valid[q]),
      .out_ready(q_ready[q]),
      .out_word (q_word[q]),
      .count    ()
    );
  end
endmodule
