// tb_input_arbiter: self-checking test of input_arbiter with 4 inputs. Each
// input carries a queue of frames of 1-5 words whose data encodes input,
// frame and word number. The output must never interleave frames, keep each
// input's frames in order, deliver every frame, and serve inputs in
// round-robin order while all of them are waiting.
module tb_input_arbiter;
  import vnet_pkg::*;
  localparam int N = 4;
  localparam int FRAMES = 40;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid [N], in_ready [N];
  pkt_word_t in_word [N];
  logic out_valid, out_ready;
  pkt_word_t out_word;

  input_arbiter #(.N(N)) dut (.*);

  function automatic void check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endfunction

  pkt_word_t src_q [N][$];
  int next_frame [N];
  int cur_in = -1, cur_frame = -1, cur_w = 0, n_frames = 0, last_in = -1, rr_ok = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      next_frame[i] = 0;
      for (int f = 0; f < FRAMES; f++) begin
        automatic int len = 1 + ($urandom % 5);
        for (int w = 0; w < len; w++) begin
          automatic pkt_word_t x = '0;
          x.data = {16'(i), 16'(f), 16'(w), 16'h0};
          x.sop = (w == 0);
          x.eop = (w == len - 1);
          src_q[i].push_back(x);
        end
      end
    end
    for (int i = 0; i < N; i++) in_valid[i] = 0;
    out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (n_frames < N * FRAMES) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        in_valid[i] = src_q[i].size() > 0 && ($urandom % 4 != 0 || n_frames < 3 * N);
        in_word[i]  = (src_q[i].size() > 0) ? src_q[i][0] : '0;
      end
      out_ready = ($urandom % 4 != 0) || n_frames < 3 * N;
      #1;
      if (out_valid && out_ready) begin
        automatic int i = int'(out_word.data[63:48]);
        automatic int f = int'(out_word.data[47:32]);
        automatic int w = int'(out_word.data[31:16]);
        if (out_word.sop) begin
          check(cur_in < 0, "new frame only after previous eop");
          check(f == next_frame[i], "frames of one input in order");
          if (n_frames < 3 * N && last_in >= 0) begin
            check(i == (last_in + 1) % N, "round-robin order while all inputs wait");
            rr_ok++;
          end
          cur_in = i; cur_frame = f; cur_w = 0;
        end
        check(i == cur_in && f == cur_frame && w == cur_w, "no interleaving inside a frame");
        cur_w++;
        if (out_word.eop) begin
          next_frame[i]++;
          last_in = i;
          cur_in = -1;
          n_frames++;
        end
        check(in_ready[i], "ready returned to the granted input");
        void'(src_q[i].pop_front());
      end
      for (int k = 0; k < N; k++)
        if (in_ready[k] && in_valid[k] && !(out_valid && out_ready && int'(out_word.data[63:48]) == k))
          check(0, "ready only to the granted input");
    end
    check(rr_ok >= 2 * N, "round-robin phase exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
