// tb_rofl_tcam_fib: self-checking test of the on-chip ROFL lookup. Random
// label sets (exact and masked IDs) are written in ascending order to the
// forwarding table and the pointer cache; for random destinations the result
// must be the matching entry with the lowest ID across both TCAMs, computed
// by a reference scan, one cycle after the request.
module tb_rofl_tcam_fib;
  import vnet_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_en, req_valid, req_ready, rsp_valid;
  cfg_wr_t cfg;
  lkup_req_t req;
  lkup_rsp_t rsp;

  rofl_tcam_fib #(.ENTRIES(8), .CACHE_ENTRIES(8)) dut (.*);

  function automatic void check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endfunction

  logic [31:0] id [2][8], mk [2][8];
  logic [2:0]  pt [2][8];
  int n_cache_win = 0, n_fib_win = 0;

  task automatic wr(input int t, input int i);
    @(negedge clk);
    cfg = '0; cfg.we = 1; cfg.tbl = (t == 0) ? TBL_FIB : TBL_AUX; cfg.idx = 19'(i);
    cfg.data[31:0] = id[t][i]; cfg.data[63:32] = mk[t][i]; cfg.data[66:64] = pt[t][i]; cfg.data[127] = 1;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0; cfg_en = 1; req_valid = 0; req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 20; round++) begin
      for (int t = 0; t < 2; t++) begin
        automatic logic [31:0] base = 32'h0;
        for (int i = 0; i < 8; i++) begin
          base = base + 32'h100 + (32'($urandom) & 32'h0FFF);   // ascending IDs
          id[t][i] = base & 32'hFFFF_FFF0;
          mk[t][i] = (i % 2) ? 32'hFFFF_FFF0 : 32'hFFFF_FF00;
          pt[t][i] = 3'($urandom);
          wr(t, i);
        end
      end
      @(negedge clk); cfg = '0;
      for (int n = 0; n < 40; n++) begin
        logic [31:0] a, best_id;
        logic [2:0] best_pt;
        bit found;
        automatic int t0 = $urandom % 2, i0 = $urandom % 8;
        a = ($urandom % 4 == 0) ? 32'($urandom) : (id[t0][i0] | 32'($urandom % 256));
        found = 0; best_id = '0; best_pt = '0;
        for (int t = 0; t < 2; t++)
          for (int i = 0; i < 8; i++)
            if (((a ^ id[t][i]) & mk[t][i]) == 0 && (!found || id[t][i] < best_id)) begin
              found = 1; best_id = id[t][i]; best_pt = pt[t][i];
            end
        @(negedge clk);
        req_valid = 1; req.addr = a;
        @(negedge clk);
        req_valid = 0;
        check(rsp_valid, "response one cycle after request");
        check(rsp.hit == found, "hit");
        if (found) begin
          check(rsp.nh == best_id && rsp.port == best_pt, "lowest ID of both tables wins");
          if (rsp.nh == best_id) begin
            automatic bit in_cache = 0;
            for (int i = 0; i < 8; i++) if (id[1][i] == best_id) in_cache = 1;
            if (in_cache) n_cache_win++; else n_fib_win++;
          end
        end
      end
    end
    check(n_cache_win > 20 && n_fib_win > 20, "both tables win sometimes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
