// input_arbiter: merges N packet streams into one, a whole frame at a time.
//
// A round-robin pointer picks the next requesting input after the one served
// last; once a frame has started, the grant is held until its end-of-packet
// word has been transferred, so frames are never interleaved. The chosen
// input's valid/word are routed to the output and the output's ready back to
// it (no extra pipeline stage: a frame's words pass in the cycles they are
// offered). Used as the NetFPGA-style input arbiter in front of the design
// select module, and again to merge the data plane outputs before the output
// queues. The document names the block; round-robin order is this design's
// choice.
module input_arbiter
  import vnet_pkg::*;
#(
  parameter int N = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid [N],
  output logic      in_ready [N],
  input  pkt_word_t in_word  [N],
  output logic      out_valid,
  input  logic      out_ready,
  output pkt_word_t out_word
);
  localparam int IW = (N > 1) ? $clog2(N) : 1;

  logic          locked;
  logic [IW-1:0] cur, last, pick;
  logic          any;

  // Round-robin choice among waiting inputs, starting after `last`.
  always_comb begin
    pick = last;
    any  = 1'b0;
    for (int k = 1; k <= N; k++) begin
      if (!any && in_valid[(int'(last) + k) % N]) begin
        pick = IW'((int'(last) + k) % N);
        any  = 1'b1;
      end
    end
  end

  logic [IW-1:0] sel;
  assign sel = locked ? cur : pick;

  always_comb begin
    out_valid = locked ? in_valid[cur] : any;
    out_word  = in_word[sel];
    for (int i = 0; i < N; i++) in_ready[i] = (sel == IW'(i)) && (locked || any) && out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked <= 1'b0;
      cur    <= '0;
      last   <= IW'(N - 1);
    end else if (out_valid && out_ready) begin
      if (out_word.eop) begin
        locked <= 1'b0;
        last   <= sel;
      end else begin
        locked <= 1'b1;
        cur    <= sel;
      end
    end
  end
endmodule
