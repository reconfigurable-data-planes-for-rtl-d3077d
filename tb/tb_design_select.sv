// tb_design_select: self-checking test of the dynamic design select module.
// The table maps 10.1/16 -> plane 1 (VID 3), 10.2/16 -> plane 2 (VID 4),
// 10.4/16 -> plane 0 (VID 1) and 10.3/16 -> software interface 5. Frames of
// 7-10 words with random destinations (including misses), plus frames coming
// back from a CPU RX queue and runt frames, are sent with random stalls on
// every output. Each output's frames must match the expected frames word
// for word, with the right tag. The test also covers the switch to
// multi-receiver mode (software frames dropped) and a migration of 10.4/16
// from hardware to software by one table write. One more entry classifies by
// virtual MAC address (02:00:00:00:00:77 -> plane 3); frames with that MAC
// and an unlisted address go there, while the address entries, which come
// first in the table, still take priority. The counters are checked at the end.
module tb_design_select;
  import vnet_pkg::*;
  import vnet_tb_pkg::*;
  localparam int NP = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_en, in_valid, in_ready, cpu_valid, cpu_ready, single_rx;
  cfg_wr_t cfg;
  pkt_word_t in_word, out_word;
  logic pl_valid [NP], pl_ready [NP];
  logic [31:0] n_hw, n_sw, n_ret, n_drop;

  design_select #(.NUM_PLANES(NP), .ENTRIES(16)) dut (.*);

  function automatic void check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endfunction

  pkt_word_t src_q [$];
  pkt_word_t exp_q [NP+1][$];
  int e_hw = 0, e_sw = 0, e_ret = 0, e_drop = 0, n_got = 0;
  bit mode_single = 1;
  bit migrated = 0;

  task automatic tbl_wr(input int i, input logic [31:0] p, input bit hw, input int plane, input int tag);
    @(negedge clk);
    cfg = '0; cfg.we = 1; cfg.tbl = TBL_FIB; cfg.idx = 19'(i);
    cfg.data[31:0] = p; cfg.data[63:32] = 32'hFFFF_0000;
    cfg.data[71:64] = {4'(tag), 3'(plane), hw}; cfg.data[127] = 1;
    @(negedge clk);
    cfg = '0;
  endtask

  // queue one frame and its expected destination
  localparam logic [47:0] MACV = 48'h0200_0000_0077;   // a network classified by virtual MAC
  int e_mac = 0;

  task automatic send(input int src, input logic [31:0] vip, input int nw,
                      input logic [47:0] dmac = 48'h0200_0000_0001);
    word_q w = to_words(mk_ipip(dmac, 48'h0200_0000_0002, 32'h0101_0101, 32'h0202_0202,
                                32'h0A09_0909, vip, nw, $urandom));
    int dest = -1, tag = 0;
    if (nw < HDR_WORDS) begin e_drop++; end
    else if (src >= NUM_MAC) begin dest = NP; tag = 9; e_ret++; end
    else if (dmac == MACV && !(vip[31:16] inside {16'h0A01, 16'h0A02, 16'h0A03, 16'h0A04})) begin
      dest = 3; tag = 2; e_hw++; e_mac++;     // the VIP entries come first in the table
    end
    else if (vip[31:16] == 16'h0A01) begin dest = 1; tag = 3; e_hw++; end
    else if (vip[31:16] == 16'h0A02) begin dest = 2; tag = 4; e_hw++; end
    else if (vip[31:16] == 16'h0A04 && !migrated) begin dest = 0; tag = 1; e_hw++; end
    else if ((vip[31:16] == 16'h0A03 || vip[31:16] == 16'h0A04) && mode_single) begin
      dest = NP; tag = (vip[31:16] == 16'h0A03) ? 5 : 6; e_sw++;
    end else e_drop++;
    for (int i = 0; i < nw; i++) begin
      pkt_word_t x = '0;
      x.data = w[i]; x.sop = (i == 0); x.eop = (i == nw - 1); x.src = 3'(src); x.tag = 4'd9;
      src_q.push_back(x);
      if (dest >= 0) begin x.tag = 4'(tag); exp_q[dest].push_back(x); end
    end
  endtask

  function automatic bit idle();
    for (int p = 0; p <= NP; p++) if (exp_q[p].size() > 0) return 0;
    return 1;
  endfunction

  task automatic run_until_empty();
    int guard = 0;
    while ((src_q.size() > 0 || !idle()) && guard < 20000) begin
      @(negedge clk);
      in_valid = src_q.size() > 0 && ($urandom % 4 != 0);
      in_word  = (src_q.size() > 0) ? src_q[0] : '0;
      cpu_ready = $urandom % 3 != 0;
      for (int p = 0; p < NP; p++) pl_ready[p] = $urandom % 3 != 0;
      #1;
      if (in_valid && in_ready) void'(src_q.pop_front());
      for (int p = 0; p <= NP; p++) begin
        bit fire = (p == NP) ? (cpu_valid && cpu_ready) : (pl_valid[p] && pl_ready[p]);
        if (fire) begin
          check(exp_q[p].size() > 0 && out_word == exp_q[p][0], $sformatf("output %0d word matches", p));
          if (exp_q[p].size() > 0) void'(exp_q[p].pop_front());
          n_got++;
        end
      end
      guard++;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (20) @(negedge clk);
  endtask

  function automatic logic [31:0] rnd_vip();
    int c = $urandom % 5;
    return {8'h0A, 8'(c + 1), 16'($urandom)};
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0; cfg_en = 1; in_valid = 0; in_word = '0; cpu_ready = 0;
    for (int p = 0; p < NP; p++) pl_ready[p] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    tbl_wr(0, 32'h0A01_0000, 1, 1, 3);
    tbl_wr(1, 32'h0A02_0000, 1, 2, 4);
    tbl_wr(2, 32'h0A03_0000, 0, 0, 5);
    tbl_wr(3, 32'h0A04_0000, 1, 0, 1);
    // entry 4: classified by DST MAC -> plane 3, VID 2
    @(negedge clk);
    cfg = '0; cfg.we = 1; cfg.tbl = TBL_FIB; cfg.idx = 19'd4;
    cfg.data[119:72] = MACV; cfg.data[120] = 1;
    cfg.data[71:64] = {4'd2, 3'd3, 1'b1}; cfg.data[127] = 1;
    @(negedge clk);
    cfg = '0;
    check(single_rx, "single-receiver mode after reset");
    // phase 1: single receiver
    for (int f = 0; f < 60; f++) send($urandom % 4, rnd_vip(), 7 + $urandom % 4);
    for (int f = 0; f < 30; f++) send($urandom % 4, rnd_vip(), 7 + $urandom % 4, MACV);
    send(5, 32'h0A01_0001, 8);
    send(1, 32'h0A01_0001, 4);         // runt
    send(6, 32'h0A07_0001, 9);
    run_until_empty();
    // phase 2: migrate 10.4/16 to software interface 6
    tbl_wr(3, 32'h0A04_0000, 0, 0, 6);
    migrated = 1;
    for (int f = 0; f < 40; f++) send($urandom % 4, rnd_vip(), 7 + $urandom % 4);
    run_until_empty();
    // phase 3: multi-receiver mode
    @(negedge clk);
    cfg = '0; cfg.we = 1; cfg.tbl = TBL_MODE; cfg.data[0] = 0;
    @(negedge clk);
    cfg = '0;
    mode_single = 0;
    check(!single_rx, "mode switched to multi-receiver");
    for (int f = 0; f < 40; f++) send($urandom % 4, rnd_vip(), 7 + $urandom % 4);
    run_until_empty();
    for (int p = 0; p <= NP; p++) check(exp_q[p].size() == 0, $sformatf("output %0d got every frame", p));
    check(n_hw == 32'(e_hw) && n_sw == 32'(e_sw) && n_ret == 32'(e_ret) && n_drop == 32'(e_drop),
          $sformatf("counters hw %0d/%0d sw %0d/%0d ret %0d/%0d drop %0d/%0d", n_hw, e_hw, n_sw, e_sw, n_ret, e_ret, n_drop, e_drop));
    check(e_hw > 20 && e_sw > 10 && e_drop > 10 && e_ret == 2 && e_mac > 3, "all paths exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
