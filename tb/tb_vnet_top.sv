// tb_vnet_top: end-to-end test of vnet_top at its default parameters (three
// IPv4 planes and one ROFL plane, all on the shared external SRAM; two
// sram_model banks of 512K x 36). The testbench plays the host: it programs
// every table through the register port, acts as the software data planes
// (a frame that appears on CPU TX queue 4+k is sent back on CPU RX queue 4+k),
// and checks every frame leaving a MAC TX port against a byte-level reference.
// Traffic classes:
//   10.1/16 -> plane 0 (VID 1), short prefix, out port 0
//   10.6.5/24 -> plane 0, long prefix via L2, out port 2
//   10.2/16 -> plane 1 (VID 2), out port 1
//   10.1.0/24 -> plane 2 (VID 3), whose 10.1/16 route collides with VID 1's and
//                is relocated through the Conflict CAM, out port 3
//   10.4/16 -> plane 2, out port 1, later migrated to software interface 4
//   labels 0x000-0xFFF -> plane 3 (ROFL, VID 4), namespace in bank L2 plus pointer cache
//   10.8/16 -> software interface 3; 10.7/16 -> no entry (dropped)
//   DST MAC 02:00:00:00:00:77 -> plane 0 (classified by MAC; its 10.5/16 route, out port 3)
// Phases: mixed traffic; a stall of MAC TX 0 long enough to back up the
// output queue, plane FIFO and design select; migration of 10.4/16; switch
// to multi-receiver mode; plane 1 switched to source-based routing (all
// frames carry source 10.9.9.9, routed by a 10.9/16 entry to port 2). Each mechanism is counted and must occur.
module tb_vnet_top;
  import vnet_pkg::*;
  import vnet_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;     // 125 MHz
  int checks = 0, failures = 0;

  function automatic void check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endfunction

  logic      rx_valid [NUM_PORTS], rx_ready [NUM_PORTS], tx_valid [NUM_PORTS], tx_ready [NUM_PORTS];
  pkt_word_t rx_word [NUM_PORTS], tx_word [NUM_PORTS];
  cfg_wr_t   cfg;
  logic      cfg_busy, single_rx;
  logic               sram_en [2], sram_we [2];
  logic [SRAM_AW-1:0] sram_addr [2];
  logic [SRAM_DW-1:0] sram_wdata [2], sram_rdata [2];
  logic [31:0] ds_n_hw, ds_n_sw, ds_n_ret, ds_n_drop, cx_n_to_sw, cx_n_from_sw;
  logic [31:0] pl_n_fwd [4], pl_n_drop [4], pl_n_conflict [4];

  vnet_top dut (.*);

  for (genvar b = 0; b < 2; b++) begin : g_mem
    sram_model u_mem (.clk, .en(sram_en[b]), .we(sram_we[b]), .addr(sram_addr[b]),
                      .wdata(sram_wdata[b]), .rdata(sram_rdata[b]));
  end

  // ---------------------------------------------------------------- host register access
  task automatic wr(input logic [3:0] unit, input logic [3:0] tbl, input int idx, input logic [127:0] data);
    @(negedge clk);
    cfg = '0; cfg.we = 1; cfg.unit = unit; cfg.tbl = tbl; cfg.idx = 19'(idx); cfg.data = data;
    @(negedge clk);
    cfg = '0;
    #1;
    while (cfg_busy) begin @(negedge clk); #1; end
  endtask

  function automatic logic [127:0] ent(input logic [31:0] k, input logic [31:0] m, input logic [47:0] r);
    return {1'b1, 15'h0, r, m, k};
  endfunction
  function automatic logic [127:0] ccam(input logic [3:0] vid, input logic [31:0] k, input logic [31:0] m,
                                        input logic [18:0] ind);
    return {1'b1, 3'h0, vid, 37'h0, ind, m, k};
  endfunction
  function automatic logic [47:0] pmac(input int pl, input int p); return 48'h004E_4632_4300 | 48'(pl * 16 + p); endfunction
  function automatic logic [31:0] pip(input int pl, input int p);  return 32'hC000_0200 | 32'(pl * 16 + p); endfunction
  function automatic logic [31:0] nh_of(input int i) ; return 32'hC633_6400 | 32'(i); endfunction
  function automatic logic [47:0] mac_of(input logic [31:0] k); return {16'h0066, k}; endfunction
  function automatic logic [47:0] swmac(input int i); return 48'h0218_0000_0000 | 48'(i); endfunction

  // ---------------------------------------------------------------- reference
  // expected frames per TX port, each held as a hex string of its words
  string exp_l [NUM_PORTS][$];

  function automatic string fstr(input word_q w);
    string s = "";
    foreach (w[i]) s = {s, $sformatf("%h", w[i])};
    return s;
  endfunction
  word_q src_q [NUM_PORTS];
  bit src_sop_q [NUM_PORTS][$];
  bit migrated = 0, multi = 0, src_route = 0;

  // mechanism counters
  int m_short = 0, m_long = 0, m_conflict_fr = 0, m_rofl_sram = 0, m_rofl_cache = 0;
  int m_sw = 0, m_ret = 0, m_migrated = 0, m_multi_drop = 0, m_miss = 0;
  int m_src_route = 0, m_mac_class = 0, m_stall = 0, m_contention = 0, e_fwd_total = 0, got_total = 0;

  function automatic int rofl_succ(input int off);
    // valid labels 0x20 (port 1) and 0x80 (port 2) in a 256-label namespace
    if (off <= 8'h20 || off > 8'h80) return 8'h20;
    return 8'h80;
  endfunction

  localparam logic [47:0] MACV = 48'h0200_0000_0077;   // network classified by virtual MAC

  task automatic send(input int src, input logic [31:0] vip, input int nw,
                      input logic [47:0] dmac = 48'h0200_0000_00AA);
    byte_q b = mk_ipip(dmac, 48'h0200_0000_00BB, 32'h0101_0101, 32'h0202_0202,
                       32'h0A09_0909, vip, nw, $urandom);
    word_q wi = to_words(b);
    int pl = -1, port = -1;
    logic [31:0] nh = '0, arpkey = '0;
    foreach (wi[i]) begin src_q[src].push_back(wi[i]); src_sop_q[src].push_back(i == 0); end
    if (dmac == MACV && vip[31:16] == 16'h0A05) begin pl = 0; port = 3; nh = nh_of(1); m_mac_class++; end
    else if (vip[31:8] == 24'h0A0100) begin pl = 2; port = 3; nh = nh_of(5); m_conflict_fr++; end
    else if (vip[31:16] == 16'h0A01) begin pl = 0; port = 0; nh = nh_of(1); m_short++; end
    else if (vip[31:8] == 24'h0A0605) begin pl = 0; port = 2; nh = nh_of(3); m_long++; end
    else if (vip[31:16] == 16'h0A02 && src_route) begin pl = 1; port = 2; nh = nh_of(7); m_src_route++; end
    else if (vip[31:16] == 16'h0A02) begin pl = 1; port = 1; nh = nh_of(2); end
    else if (vip[31:16] == 16'h0A04 && !migrated) begin pl = 2; port = 1; nh = nh_of(6); end
    else if (vip[31:12] == 20'h0) begin
      int s = rofl_succ(int'(vip[7:0]));
      pl = 3;
      if (vip[7:4] == 4'h6) begin port = 3; arpkey = 32'h60; m_rofl_cache++; end
      else begin port = (s == 8'h20) ? 1 : 2; arpkey = 32'(s); m_rofl_sram++; end
    end
    if (pl >= 0) begin
      put(b, 0, 6, (pl == 3) ? mac_of(arpkey) : mac_of(nh));
      put(b, 6, 6, pmac(pl, port));
      if (pl != 3) begin
        put(b, 26, 4, pip(pl, port));
        put(b, 30, 4, nh);
        put(b, 24, 2, ref_csum(b));
      end
      exp_l[port].push_back(fstr(to_words(b)));
      e_fwd_total++;
    end else if (vip[31:16] == 16'h0A08 || vip[31:16] == 16'h0A04) begin
      if (multi) m_multi_drop++;
      else begin
        put(b, 0, 6, swmac(vip[31:16] == 16'h0A08 ? 3 : 4));
        exp_l[4 + src].push_back(fstr(to_words(b)));
        e_fwd_total++;
        m_sw++;
        if (vip[31:16] == 16'h0A04) m_migrated++;
      end
    end else m_miss++;
  endtask

  function automatic logic [31:0] rnd_vip();
    logic [31:0] r = $urandom;
    int sel = int'($urandom % 9);
    case (sel)
      0: return 32'h0A01_0000 | (r & 32'hFFFF) | 32'h100;      // avoid 10.1.0/24
      1: return 32'h0A06_0500 | (r & 32'hFF);
      2: return 32'h0A02_0000 | (r & 32'hFFFF);
      3: return 32'h0A01_0000 | (r & 32'hFF);
      4: return 32'h0A04_0000 | (r & 32'hFFFF);
      5: return r & 32'hFF;
      6: return 32'h0A08_0000 | (r & 32'hFFFF);
      7: return 32'h0A07_0000 | (r & 32'hFFFF);
      default: return 32'h60 | (r & 32'hF);
    endcase
  endfunction

  // ---------------------------------------------------------------- port drivers and monitors
  word_q rx_cur [NUM_PORTS];
  word_q sw_back [4];       // frames the "software" returns
  bit stall0 = 0;

  always @(negedge clk) begin
    for (int p = 0; p < NUM_PORTS; p++) begin
      rx_valid[p] = src_q[p].size() > 0 && ($urandom % 4 != 0);
      rx_word[p] = '0;
      if (src_q[p].size() > 0) begin
        rx_word[p].data = src_q[p][0];
        rx_word[p].sop = src_sop_q[p][0];
        rx_word[p].eop = (src_sop_q[p].size() == 1) || src_sop_q[p][1];
      end
      tx_ready[p] = (p == 0 && stall0) ? 1'b0 : ($urandom % 4 != 0);
    end
    #1;
    for (int p = 0; p < NUM_PORTS; p++) begin
      if (rx_valid[p] && rx_ready[p]) begin
        void'(src_q[p].pop_front());
        void'(src_sop_q[p].pop_front());
      end
      if (tx_valid[p] && tx_ready[p]) begin
        rx_cur[p].push_back(tx_word[p].data);
        check(tx_word[p].dst == 3'(p), "word leaves on its dst port");
        if (tx_word[p].eop) begin
          automatic string got = fstr(rx_cur[p]);
          automatic int hit = -1;
          automatic bit found;
          for (int i = 0; i < exp_l[p].size(); i++)
            if (hit < 0 && exp_l[p][i] == got) hit = i;
          found = hit >= 0;
          if (found) exp_l[p].delete(hit);
          check(found, $sformatf("frame on tx port %0d matches an expected frame", p));
          got_total++;
          if (p >= 4 && found) begin
            // software data plane: return it on the CPU RX queue of the same number;
            // it must leave unchanged on MAC port p - 4
            foreach (rx_cur[p][i]) begin src_q[p].push_back(rx_cur[p][i]); src_sop_q[p].push_back(i == 0); end
            exp_l[p - 4].push_back(got);
            e_fwd_total++;
            m_ret++;
          end
          rx_cur[p] = {};
        end
      end
    end
    // mechanisms seen inside the design
    if (dut.ds_pl_valid[0] && !dut.ds_pl_ready[0]) m_stall++;
    begin
      int nreq = 0;
      for (int p = 0; p < 4; p++) nreq += int'(dut.b_req[0][p]);
      if (nreq > 1) m_contention++;
    end
  end

  function automatic int pending();
    int n = 0;
    for (int p = 0; p < NUM_PORTS; p++) n += exp_l[p].size() + src_q[p].size();
    return n;
  endfunction

  task automatic drain();
    int guard = 0;
    while (pending() > 0 && guard < 200000) begin @(negedge clk); guard++; end
    repeat (50) @(negedge clk);
  endtask

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // design select table (first match wins: the /24 comes first)
    wr(UNIT_DSEL, TBL_FIB, 0, ent(32'h0A01_0000, 32'hFFFF_FF00, {40'h0, 4'd3, 3'd2, 1'b1}));
    wr(UNIT_DSEL, TBL_FIB, 1, ent(32'h0A01_0000, 32'hFFFF_0000, {40'h0, 4'd1, 3'd0, 1'b1}));
    wr(UNIT_DSEL, TBL_FIB, 2, ent(32'h0A06_0000, 32'hFFFF_0000, {40'h0, 4'd1, 3'd0, 1'b1}));
    wr(UNIT_DSEL, TBL_FIB, 3, ent(32'h0A02_0000, 32'hFFFF_0000, {40'h0, 4'd2, 3'd1, 1'b1}));
    wr(UNIT_DSEL, TBL_FIB, 4, ent(32'h0A04_0000, 32'hFFFF_0000, {40'h0, 4'd3, 3'd2, 1'b1}));
    wr(UNIT_DSEL, TBL_FIB, 5, ent(32'h0000_0000, 32'hFFFF_F000, {40'h0, 4'd4, 3'd3, 1'b1}));
    wr(UNIT_DSEL, TBL_FIB, 6, ent(32'h0A08_0000, 32'hFFFF_0000, {40'h0, 4'd3, 3'd0, 1'b0}));
    wr(UNIT_DSEL, TBL_FIB, 7, {1'b1, 6'h0, 1'b1, MACV, 4'd1, 3'd0, 1'b1, 64'h0});   // by MAC -> plane 0
    // software interface MACs
    for (int i = 0; i < 16; i++) wr(UNIT_CPUX, TBL_PMAC, i, 128'(swmac(i)));
    // per-plane port addresses and ARP tables
    for (int pl = 0; pl < 4; pl++)
      for (int p = 0; p < 8; p++) begin
        wr(4'(pl), TBL_PMAC, p, 128'(pmac(pl, p)));
        wr(4'(pl), TBL_PIP, p, 128'(pip(pl, p)));
      end
    for (int i = 1; i <= 7; i++) wr(4'((i == 2 || i == 7) ? 1 : (i >= 5 ? 2 : 0)), TBL_ARP, i, ent(nh_of(i), '1, mac_of(nh_of(i))));
    wr(4'd3, TBL_ARP, 0, ent(32'h20, '1, mac_of(32'h20)));
    wr(4'd3, TBL_ARP, 1, ent(32'h80, '1, mac_of(32'h80)));
    wr(4'd3, TBL_ARP, 2, ent(32'h60, '1, mac_of(32'h60)));
    // shared SRAM forwarding tables
    for (int k = 0; k < 8; k++) begin
      wr(UNIT_SRAM, 4'd0, (32'h0A01_0000 >> 13) + k, {92'h0, 1'b0, 3'd0, nh_of(1)});
      wr(UNIT_SRAM, 4'd0, (32'h0A02_0000 >> 13) + k, {92'h0, 1'b0, 3'd1, nh_of(2)});
      wr(UNIT_SRAM, 4'd0, (32'h0A04_0000 >> 13) + k, {92'h0, 1'b0, 3'd1, nh_of(6)});
      wr(UNIT_SRAM, 4'd0, (32'h0A05_0000 >> 13) + k, {92'h0, 1'b0, 3'd3, nh_of(1)});
      wr(UNIT_SRAM, 4'd0, (32'h0A09_0000 >> 13) + k, {92'h0, 1'b0, 3'd2, nh_of(7)});   // 10.9/16, sources
    end
    wr(UNIT_SRAM, 4'd0, 32'h0A06_0500 >> 13, {92'h0, 1'b1, 3'd0, 32'd7});
    for (int k = 0; k < 256; k++) wr(UNIT_SRAM, 4'd1, {6'd7, 13'((32'h0A06_0500 & 32'h1FFF) + k)}, {92'h0, 1'b0, 3'd2, nh_of(3)});
    // VID 3's own 10.1/16 collides with VID 1's: relocated to L1 0x7F000
    wr(UNIT_SRAM, 4'd0, 19'h7F000, {92'h0, 1'b0, 3'd3, nh_of(5)});
    wr(4'd2, TBL_AUX, 0, ccam(4'd3, 32'h0A01_0000, 32'hFFFF_0000, 19'h7F000));
    // ROFL namespace of VID 4: base 0x40000 in bank L2, 256 labels
    wr(4'd3, TBL_NS, 4, {64'h0, 32'h0000_00FF, 32'h0004_0000});
    for (int off = 0; off < 256; off++)
      wr(UNIT_SRAM, 4'd1, 32'h40000 + off, {92'h0, 1'b1, rofl_succ(off) == 8'h20 ? 3'd1 : 3'd2, 32'(rofl_succ(off))});
    wr(4'd3, TBL_AUX, 0, ent(32'h60, 32'hFFFF_FFF0, 48'd3));
    check(single_rx, "single-receiver mode after reset");

    // phase 1: mixed traffic on all MAC ports
    for (int f = 0; f < 160; f++) send($urandom % 4, rnd_vip(), 7 + $urandom % 6);
    for (int f = 0; f < 20; f++) send($urandom % 4, 32'h0A05_0000 | 32'($urandom & 16'hFFFF), 8, MACV);
    drain();
    // phase 2: stall MAC TX 0 while plane 0 traffic piles up
    stall0 = 1;
    for (int f = 0; f < 60; f++) send(f % 4, 32'h0A01_0100 | 32'(f), 8);
    repeat (3000) @(negedge clk);
    stall0 = 0;
    drain();
    // phase 3: migrate 10.4/16 from plane 2 to software interface 4
    wr(UNIT_DSEL, TBL_FIB, 4, ent(32'h0A04_0000, 32'hFFFF_0000, {40'h0, 4'd4, 3'd0, 1'b0}));
    migrated = 1;
    for (int f = 0; f < 60; f++) send($urandom % 4, rnd_vip(), 7 + $urandom % 6);
    drain();
    // phase 4: multi-receiver mode, software traffic no longer enters the FPGA
    wr(UNIT_DSEL, TBL_MODE, 0, 128'h0);
    multi = 1;
    check(!single_rx, "multi-receiver mode set");
    for (int f = 0; f < 60; f++) send($urandom % 4, rnd_vip(), 7 + $urandom % 6);
    drain();

    // phase 5: plane 1 (VID 2) switches to source-based routing; its frames
    // (all from source 10.9.9.9) now follow the 10.9/16 route
    wr(4'd1, TBL_MODE, 0, 128'(RT_SRC));
    src_route = 1;
    for (int f = 0; f < 40; f++) send($urandom % 4, (f % 2) ? rnd_vip() : 32'h0A02_0000 | 32'($urandom & 16'hFFFF), 7 + $urandom % 6);
    drain();
    check(pending() == 0, "every expected frame delivered");
    check(got_total == e_fwd_total, $sformatf("frames out %0d expected %0d", got_total, e_fwd_total));
    check(pl_n_conflict[2] == 32'(m_conflict_fr), "Conflict CAM redirects counted by the plane");
    check(cx_n_to_sw == 32'(m_sw) && cx_n_from_sw == 32'(m_ret), "CPU transceiver counters");
    $display("mechanisms: source-routed %0d classified-by-MAC %0d", m_src_route, m_mac_class);
    check(m_mac_class > 0, "classification by virtual MAC happened");
    $display("mechanisms: short %0d long %0d conflict %0d rofl_sram %0d rofl_cache %0d sw %0d return %0d migrated %0d multi_drop %0d miss %0d stall %0d sram_contention %0d",
             m_short, m_long, m_conflict_fr, m_rofl_sram, m_rofl_cache, m_sw, m_ret, m_migrated, m_multi_drop, m_miss, m_stall, m_contention);
    check(m_short > 0, "short-prefix SRAM lookup happened");
    check(m_long > 0, "long-prefix (L2) lookup happened");
    check(m_conflict_fr > 0, "Conflict CAM redirect happened");
    check(m_rofl_sram > 0, "ROFL namespace lookup happened");
    check(m_rofl_cache > 0, "ROFL pointer-cache win happened");
    check(m_sw > 0, "frame sent to a software data plane");
    check(m_ret > 0, "frame returned from software and transmitted");
    check(m_src_route > 0, "source-based routing used");
    check(m_migrated > 0, "migrated network forwarded in software");
    check(m_multi_drop > 0, "multi-receiver mode dropped software traffic");
    check(m_miss > 0, "unknown network dropped");
    check(m_stall > 0, "back-pressure reached the design select");
    check(m_contention > 0, "SRAM bank contention between planes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
