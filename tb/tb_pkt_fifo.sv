// tb_pkt_fifo: self-checking test of pkt_fifo. Random words are pushed with
// random stalls on both sides and must come out in order. The fill level,
// the full condition (in_ready low after DEPTH words) and the one-cycle
// write-to-read latency are checked too.
module tb_pkt_fifo;
  import vnet_pkg::*;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, out_valid, out_ready;
  pkt_word_t in_word, out_word;
  logic [$clog2(DEPTH+1)-1:0] count;

  pkt_fifo #(.DEPTH(DEPTH)) dut (.*);

  function automatic void check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endfunction

  pkt_word_t exp_q [$];
  int n_out = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_word = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!out_valid && count == 0, "empty after reset");
    // fill to the top without draining
    for (int i = 0; i < DEPTH; i++) begin
      in_valid = 1; in_word = '0; in_word.data = 64'(i) * 64'h1111; in_word.sop = (i == 0);
      exp_q.push_back(in_word);
      @(negedge clk);
      if (i == 0) check(out_valid && out_word.data == 0, "word visible one cycle after write");
    end
    in_valid = 0;
    check(!in_ready && int'(count) == DEPTH, "full after DEPTH words");
    // random traffic
    for (int cyc = 0; cyc < 3000; cyc++) begin
      in_valid  = ($urandom % 3) != 0;
      out_ready = ($urandom % 2) != 0;
      in_word = '0;
      in_word.data = {$urandom, $urandom};
      in_word.eop = $urandom % 2;
      in_word.src = 3'($urandom);
      @(posedge clk);
      if (out_valid && out_ready) begin
        check(exp_q.size() > 0 && out_word == exp_q[0], "order preserved");
        void'(exp_q.pop_front());
        n_out++;
      end
      if (in_valid && in_ready) exp_q.push_back(in_word);
      @(negedge clk);
      check(int'(count) == exp_q.size(), "count tracks contents");
    end
    in_valid = 0; out_ready = 1;
    while (out_valid) begin
      @(posedge clk);
      check(out_word == exp_q[0], "drain order");
      void'(exp_q.pop_front());
      @(negedge clk);
    end
    check(exp_q.size() == 0 && n_out > 500, "all words delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
