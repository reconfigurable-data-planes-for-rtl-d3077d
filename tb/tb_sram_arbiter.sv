// tb_sram_arbiter: self-checking test of sram_arbiter with three requesters
// sharing one SRAM model (read latency 2). Each requester issues random reads
// and writes to a small address range and holds its request until granted.
// Checked: at most one grant per cycle, read data equals a reference memory
// updated in grant order, rvalid goes to the requester that issued the read
// exactly RD_LAT + 1 cycles after its grant, and round-robin service when all
// requesters wait.
module tb_sram_arbiter;
  import vnet_pkg::*;
  localparam int N = 3, RD_LAT = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic               req [N], we [N], gnt [N], rvalid [N];
  logic [SRAM_AW-1:0] addr [N];
  logic [SRAM_DW-1:0] wdata [N], rdata;
  logic sram_en, sram_we;
  logic [SRAM_AW-1:0] sram_addr;
  logic [SRAM_DW-1:0] sram_wdata, sram_rdata;

  sram_arbiter #(.N(N), .RD_LAT(RD_LAT)) dut (.*);
  sram_model #(.RD_LAT(RD_LAT)) u_mem (.clk, .en(sram_en), .we(sram_we), .addr(sram_addr),
                                       .wdata(sram_wdata), .rdata(sram_rdata));

  function automatic void check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endfunction

  logic [SRAM_DW-1:0] ref_mem [16];
  logic [SRAM_DW-1:0] exp_q [N][$];
  int due_q [N][$];
  logic granted [N];
  int cyc = 0, n_reads = 0, last_g = -1, rr_checks = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) ref_mem[i] = '0;
    for (int i = 0; i < N; i++) begin granted[i] = 0; req[i] = 0; we[i] = 0; addr[i] = 0; wdata[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (cyc = 0; cyc < 4000; cyc++) begin
      int ng;
      @(negedge clk);
      for (int i = 0; i < N; i++) if (granted[i]) req[i] = 0;
      for (int i = 0; i < N; i++)
        if (!req[i] && (($urandom % 3) != 0 || cyc < 30)) begin
          req[i] = 1; we[i] = ($urandom % 3) == 0;
          addr[i] = SRAM_AW'($urandom % 16); wdata[i] = {4'(i), 32'($urandom)};
        end
      #1;
      ng = 0;
      for (int i = 0; i < N; i++) if (gnt[i]) begin
        ng++;
        check(req[i], "grant only to a requester");
        if (cyc < 30 && last_g >= 0) begin
          check(i == (last_g + 1) % N, "round robin while all request");
          rr_checks++;
        end
        last_g = i;
        if (we[i]) ref_mem[addr[i][3:0]] = wdata[i];
        else begin
          exp_q[i].push_back(ref_mem[addr[i][3:0]]);
          due_q[i].push_back(cyc + RD_LAT + 1);
        end
      end
      check(ng <= 1, "one grant per cycle");
      for (int i = 0; i < N; i++) if (rvalid[i]) begin
        check(exp_q[i].size() > 0 && rdata == exp_q[i][0], "read data matches reference");
        check(due_q[i].size() > 0 && due_q[i][0] == cyc, "read latency RD_LAT+1 after grant");
        void'(exp_q[i].pop_front());
        void'(due_q[i].pop_front());
        n_reads++;
      end
      for (int i = 0; i < N; i++) granted[i] = gnt[i];
    end
    for (int i = 0; i < N; i++) check(exp_q[i].size() <= 1, "no read lost");
    check(n_reads > 1000 && rr_checks > 10, "enough traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
