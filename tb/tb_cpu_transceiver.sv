// tb_cpu_transceiver: self-checking test of the CPU transceiver. The 16
// software-interface MACs are programmed; frames from MAC ports (with a
// random software-interface tag) must leave on CPU TX queue 4 + src with the
// destination MAC replaced by that interface's MAC, and frames from CPU RX
// queues must leave unchanged on MAC TX queue src - 4. Random stalls on both
// sides; per-direction frame counters are checked.
module tb_cpu_transceiver;
  import vnet_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_en, in_valid, in_ready, out_valid, out_ready;
  cfg_wr_t cfg;
  pkt_word_t in_word, out_word;
  logic [31:0] n_to_sw, n_from_sw;

  cpu_transceiver dut (.*);

  function automatic void check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endfunction

  function automatic logic [47:0] if_mac(input int i);
    return 48'h0218_0000_0000 | 48'(i * 16'h0101);
  endfunction

  pkt_word_t src_q [$], exp_q [$];
  int e_to = 0, e_from = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0; cfg_en = 1; in_valid = 0; in_word = '0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      cfg = '0; cfg.we = 1; cfg.tbl = TBL_PMAC; cfg.idx = 19'(i); cfg.data[47:0] = if_mac(i);
    end
    @(negedge clk);
    cfg = '0;
    for (int f = 0; f < 200; f++) begin
      automatic int src = $urandom % 8;
      automatic int tag = $urandom % 16;
      automatic int nw = 1 + $urandom % 9;
      for (int w = 0; w < nw; w++) begin
        automatic pkt_word_t x = '0;
        automatic pkt_word_t e;
        x.data = {$urandom, $urandom}; x.sop = (w == 0); x.eop = (w == nw - 1);
        x.src = 3'(src); x.tag = 4'(tag); x.dst = 3'($urandom);
        e = x;
        e.dst = (src < 4) ? 3'(src + 4) : 3'(src - 4);
        if (w == 0 && src < 4) e.data[63:16] = if_mac(tag);
        src_q.push_back(x);
        exp_q.push_back(e);
      end
      if (src < 4) e_to++; else e_from++;
    end
    while (exp_q.size() > 0) begin
      @(negedge clk);
      in_valid = src_q.size() > 0 && ($urandom % 4 != 0);
      in_word = (src_q.size() > 0) ? src_q[0] : '0;
      out_ready = $urandom % 3 != 0;
      #1;
      if (in_valid && in_ready) void'(src_q.pop_front());
      if (out_valid && out_ready) begin
        check(out_word == exp_q[0], "output word");
        void'(exp_q.pop_front());
      end
    end
    @(negedge clk);
    in_valid = 0;
    @(negedge clk);
    check(n_to_sw == 32'(e_to) && n_from_sw == 32'(e_from), "frame counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
