// tb_tcam: self-checking test of tcam (8 entries, 16-bit keys). Entries are
// written with random keys, masks and valid bits; random search keys (half of
// them derived from stored entries) are compared against a reference that
// scans the entries for the lowest-index match. The result must appear
// exactly one cycle after the search.
module tb_tcam;
  localparam int E = 8, K = 16, R = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic w_en, w_valid, s_valid, r_valid, r_hit;
  logic [$clog2(E)-1:0] w_idx, r_idx;
  logic [K-1:0] w_key, w_mask, s_key, r_key;
  logic [R-1:0] w_res, r_res;

  tcam #(.ENTRIES(E), .KEY_W(K), .RES_W(R)) dut (.*);

  function automatic void check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endfunction

  logic         m_v [E];
  logic [K-1:0] m_k [E], m_m [E];
  logic [R-1:0] m_r [E];
  logic exp_hit; int exp_idx;
  int n_hit = 0, n_miss = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w_en = 0; s_valid = 0; w_idx = 0; w_valid = 0; w_key = 0; w_mask = 0; w_res = 0; s_key = 0;
    for (int i = 0; i < E; i++) m_v[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 40; round++) begin
      // rewrite a few entries
      for (int n = 0; n < 3; n++) begin
        @(negedge clk);
        w_en = 1; w_idx = $clog2(E)'($urandom); w_valid = ($urandom % 4) != 0;
        w_key = {4'($urandom % 3), 12'($urandom)}; w_mask = {4'hF, 12'($urandom) & 12'h0F3}; w_res = R'($urandom);
        m_v[w_idx] = w_valid; m_k[w_idx] = w_key; m_m[w_idx] = w_mask; m_r[w_idx] = w_res;
      end
      @(negedge clk);
      w_en = 0;
      for (int n = 0; n < 20; n++) begin
        @(negedge clk);
        s_valid = 1;
        if ($urandom % 2) begin
          automatic int j = $urandom % E;
          s_key = (m_k[j] & m_m[j]) | (K'($urandom) & ~m_m[j]);
        end else s_key = K'($urandom);
        exp_hit = 0; exp_idx = 0;
        for (int i = 0; i < E; i++)
          if (!exp_hit && m_v[i] && ((s_key & m_m[i]) == (m_k[i] & m_m[i]))) begin
            exp_hit = 1; exp_idx = i;
          end
        @(negedge clk);
        s_valid = 0;
        check(r_valid, "result valid one cycle after search");
        check(r_hit == exp_hit, "hit flag");
        if (exp_hit) begin
          n_hit++;
          check(int'(r_idx) == exp_idx, "lowest matching index wins");
          check(r_res == m_r[exp_idx] && r_key == m_k[exp_idx], "result and key of winning entry");
        end else n_miss++;
        @(negedge clk);
        check(!r_valid, "result valid for one cycle only");
      end
    end
    check(n_hit > 100 && n_miss > 100, "hits and misses both exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
