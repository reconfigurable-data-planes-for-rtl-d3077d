// pkt_fifo: synchronous FIFO of packet words with a valid/ready handshake on
// both sides. It serves as the per-port input queue, as the storage of each
// output queue, and as the 32-deep decoupling FIFO placed between the dynamic
// design select module and each data plane's forwarding logic, which lets a
// multi-cycle SRAM lookup overlap with the arrival of the next frame.
//
// Storage is a plain array (DEPTH words); the head word is read
// combinationally, so a word written in cycle t can leave in cycle t+1.
// A word moves when valid and ready are both high. `count` gives the fill level.
// The document gives the 32-word depth of the decoupling FIFO; the queue depths
// and the handshake are this design's choices.
// The storage array has no reset (it is never read before it is written);
// the only synchronous use of rst_n is the `disable iff` of the overflow
// assertion, which is not logic, so the mixed sync/async note on rst_n stands.
module pkt_fifo
  import vnet_pkg::*;
#(
  parameter int DEPTH = 32
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  output logic      in_ready,
  input  pkt_word_t in_word,
  output logic      out_valid,
  input  logic      out_ready,
  output pkt_word_t out_word,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int CW = $clog2(DEPTH+1);

  pkt_word_t mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic push, pop;

  assign in_ready  = (count != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign out_valid = (count != '0);
  assign out_word  = mem[rptr];
  assign push = in_valid && in_ready;
  assign pop  = out_valid && out_ready;

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wptr] <= in_word;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (push) wptr <= inc(wptr);
      if (pop)  rptr <= inc(rptr);
      count <= count + CW'(push) - CW'(pop);
    end
  end

`ifndef SYNTHESIS
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) int'(count) <= DEPTH);
`endif
endmodule
