// tb_output_queues: self-checking test of the output queues (8 queues of 16
// words). Frames of 1-12 words with random destination ports enter with
// random stalls; each queue drains at its own random rate. Every queue must
// deliver exactly its frames in order with dst set, and a full queue must
// back-pressure the input (observed at least once).
module tb_output_queues;
  import vnet_pkg::*;
  localparam int NQ = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready;
  pkt_word_t in_word;
  logic q_valid [NQ], q_ready [NQ];
  pkt_word_t q_word [NQ];

  output_queues #(.NQ(NQ), .DEPTH(16)) dut (.*);

  function automatic void check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endfunction

  pkt_word_t src_q [$], exp_q [NQ][$];
  int stalls = 0, left = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_word = '0;
    for (int q = 0; q < NQ; q++) q_ready[q] = 0;
    for (int f = 0; f < 300; f++) begin
      automatic int d = $urandom % NQ;
      automatic int nw = 1 + $urandom % 12;
      for (int w = 0; w < nw; w++) begin
        automatic pkt_word_t x = '0;
        x.data = {32'(f), 32'(w)}; x.sop = (w == 0); x.eop = (w == nw - 1);
        x.dst = (w == 0) ? 3'(d) : 3'($urandom);   // only the first word's dst counts
        src_q.push_back(x);
        x.dst = 3'(d);
        exp_q[d].push_back(x);
        left++;
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; left > 0 && cyc < 60000; cyc++) begin
      @(negedge clk);
      in_valid = src_q.size() > 0 && ($urandom % 5 != 0);
      in_word = (src_q.size() > 0) ? src_q[0] : '0;
      for (int q = 0; q < NQ; q++) q_ready[q] = (cyc % 2000 < 300) ? 1'b0 : ($urandom % 3 == 0);
      #1;
      if (in_valid && !in_ready) stalls++;
      if (in_valid && in_ready) void'(src_q.pop_front());
      for (int q = 0; q < NQ; q++) if (q_valid[q] && q_ready[q]) begin
        check(exp_q[q].size() > 0 && q_word[q] == exp_q[q][0], $sformatf("queue %0d word", q));
        if (exp_q[q].size() > 0) void'(exp_q[q].pop_front());
        left--;
      end
    end
    check(left == 0, "every word delivered");
    check(stalls > 0, "back-pressure from a full queue seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
