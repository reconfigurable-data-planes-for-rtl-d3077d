// tb_vdp_plane: self-checking test of two hardware virtual data planes:
// an IPv4 plane with its forwarding table in shared SRAM (two sram_model
// banks behind sram_arbiters) and a ROFL plane with on-chip TCAMs.
// IPv4: 10.1/16 -> port 2 (short prefix), 10.2.3/24 -> port 3 (long prefix),
// 10.9/16 -> a next hop without ARP entry (dropped), 10.5/16 unrouted (dropped).
// ROFL: labels 0x100-0x1FF hit the forwarding table (port 1), labels
// 0x0C0-0x0FF only the pointer cache (port 5), 0x300-0x3FF nothing (dropped).
// Forwarded frames must come out with MACs, outer IPs and outer checksum
// rewritten as computed here byte by byte, dst = output port and the tag
// kept. Dropped frames are absorbed, and frames of exactly 7 words are included.
// A second phase switches the IPv4 plane to source-based routing: every frame,
// whatever its destination, then follows the route of its source 10.9.9.9.
module tb_vdp_plane;
  import vnet_pkg::*;
  import vnet_tb_pkg::*;
  localparam int RD_LAT = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  function automatic void check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endfunction

  // ---------------------------------------------------------------- DUTs
  cfg_wr_t   cfg [2];
  logic      in_valid [2], in_ready [2], out_valid [2], out_ready [2];
  pkt_word_t in_word [2], out_word [2];
  logic [31:0] n_fwd [2], n_drop [2], n_conf [2];
  logic               e_req [2], e_gnt [2], e_rvalid [2];
  logic [SRAM_AW-1:0] e_addr [2];
  logic [SRAM_DW-1:0] e_rdata [2];
  logic               h_req [2], h_gnt [2];
  logic [SRAM_AW-1:0] h_addr [2];
  logic [SRAM_DW-1:0] h_data [2];

  vdp_plane #(.PROTO(PROTO_IPV4), .USE_SRAM(1'b1)) u_ip (
    .clk, .rst_n, .cfg_en(1'b1), .cfg(cfg[0]),
    .in_valid(in_valid[0]), .in_ready(in_ready[0]), .in_word(in_word[0]),
    .out_valid(out_valid[0]), .out_ready(out_ready[0]), .out_word(out_word[0]),
    .l1_req(e_req[0]), .l1_addr(e_addr[0]), .l1_gnt(e_gnt[0]), .l1_rvalid(e_rvalid[0]), .l1_rdata(e_rdata[0]),
    .l2_req(e_req[1]), .l2_addr(e_addr[1]), .l2_gnt(e_gnt[1]), .l2_rvalid(e_rvalid[1]), .l2_rdata(e_rdata[1]),
    .n_fwd(n_fwd[0]), .n_drop(n_drop[0]), .n_conflict(n_conf[0]));

  vdp_plane #(.PROTO(PROTO_ROFL), .USE_SRAM(1'b0)) u_rofl (
    .clk, .rst_n, .cfg_en(1'b1), .cfg(cfg[1]),
    .in_valid(in_valid[1]), .in_ready(in_ready[1]), .in_word(in_word[1]),
    .out_valid(out_valid[1]), .out_ready(out_ready[1]), .out_word(out_word[1]),
    .l1_req(), .l1_addr(), .l1_gnt(1'b0), .l1_rvalid(1'b0), .l1_rdata('0),
    .l2_req(), .l2_addr(), .l2_gnt(1'b0), .l2_rvalid(1'b0), .l2_rdata('0),
    .n_fwd(n_fwd[1]), .n_drop(n_drop[1]), .n_conflict(n_conf[1]));

  for (genvar b = 0; b < 2; b++) begin : g_bank
    logic               rq [2], w [2], g [2], rv [2];
    logic [SRAM_AW-1:0] ad [2];
    logic [SRAM_DW-1:0] wd [2];
    logic en, we;
    logic [SRAM_AW-1:0] a;
    logic [SRAM_DW-1:0] d, q;
    assign rq[0] = e_req[b];  assign w[0] = 1'b0; assign ad[0] = e_addr[b]; assign wd[0] = '0;
    assign rq[1] = h_req[b];  assign w[1] = 1'b1; assign ad[1] = h_addr[b]; assign wd[1] = h_data[b];
    assign e_gnt[b] = g[0];   assign e_rvalid[b] = rv[0]; assign h_gnt[b] = g[1];
    sram_arbiter #(.N(2), .RD_LAT(RD_LAT)) u_arb (
      .clk, .rst_n, .req(rq), .we(w), .addr(ad), .wdata(wd), .gnt(g), .rvalid(rv), .rdata(e_rdata[b]),
      .sram_en(en), .sram_we(we), .sram_addr(a), .sram_wdata(d), .sram_rdata(q));
    sram_model #(.RD_LAT(RD_LAT)) u_mem (.clk, .en, .we, .addr(a), .wdata(d), .rdata(q));
  end

  // ---------------------------------------------------------------- helpers
  task automatic sram_wr(input int b, input logic [18:0] a, input logic [35:0] d);
    @(negedge clk);
    h_req[b] = 1; h_addr[b] = a; h_data[b] = d;
    #1;
    while (!h_gnt[b]) begin @(negedge clk); #1; end
    @(negedge clk);
    h_req[b] = 0;
  endtask

  task automatic reg_wr(input int p, input logic [3:0] tbl, input int idx, input logic [127:0] data);
    @(negedge clk);
    cfg[p] = '0; cfg[p].we = 1; cfg[p].tbl = tbl; cfg[p].idx = 19'(idx); cfg[p].data = data;
    @(negedge clk);
    cfg[p] = '0;
  endtask

  function automatic logic [127:0] cam_entry(input logic [31:0] k, input logic [31:0] m, input logic [47:0] r);
    return {1'b1, 15'h0, r, m, k};
  endfunction

  function automatic logic [47:0] pmac(input int p); return 48'h004E_4632_4300 | 48'(p); endfunction
  function automatic logic [31:0] pip(input int p);  return 32'hC000_0200 | 32'(p); endfunction

  localparam logic [31:0] NH1 = 32'hC633_6401, NH3 = 32'hC633_6403, NH9 = 32'hC633_6409;
  localparam logic [47:0] MAC1 = 48'h0011_2233_4401, MAC3 = 48'h0011_2233_4403;
  localparam logic [47:0] MACA = 48'h00AA_0000_0100, MACB = 48'h00BB_0000_00C0;

  localparam logic [47:0] MAC9 = 48'h0011_2233_4409;
  pkt_word_t src_q [2][$], exp_q [2][$];
  int e_fwd [2], e_drop [2];
  bit src_mode = 0;     // plane 0 routes on the source address (10.9.9.9 in every frame)

  task automatic send(input int p, input logic [31:0] vip, input int nw, input logic [3:0] tag);
    byte_q b = mk_ipip(48'h0200_0000_0001, 48'h0200_0000_0002, 32'h0101_0101, 32'h0202_0202,
                       32'h0A09_0909, vip, nw, $urandom);
    word_q wi = to_words(b);
    int port = -1;
    logic [31:0] nh = '0;
    logic [47:0] dmac = '0;
    if (p == 0 && src_mode) begin
      port = 2; nh = NH9; dmac = MAC9;
    end else if (p == 0) begin
      if (vip[31:16] == 16'h0A01) begin port = 2; nh = NH1; dmac = MAC1; end
      else if (vip[31:8] == 24'h0A0203) begin port = 3; nh = NH3; dmac = MAC3; end
    end else begin
      if (vip[31:8] == 24'h000001) begin port = 1; dmac = MACA; end
      else if (vip[31:6] == 26'h3) begin port = 5; dmac = MACB; end
    end
    for (int i = 0; i < nw; i++) begin
      pkt_word_t x = '0;
      x.data = wi[i]; x.sop = (i == 0); x.eop = (i == nw - 1); x.src = 3'd1; x.tag = tag;
      src_q[p].push_back(x);
    end
    if (port < 0) begin e_drop[p]++; return; end
    e_fwd[p]++;
    put(b, 0, 6, dmac);
    put(b, 6, 6, pmac(port));
    if (p == 0) begin
      put(b, 26, 4, pip(port));
      put(b, 30, 4, nh);
      put(b, 24, 2, ref_csum(b));
    end
    wi = to_words(b);
    for (int i = 0; i < nw; i++) begin
      pkt_word_t x = '0;
      x.data = wi[i]; x.sop = (i == 0); x.eop = (i == nw - 1); x.src = 3'd1; x.tag = tag; x.dst = 3'(port);
      exp_q[p].push_back(x);
    end
  endtask

  task automatic run_traffic();
    for (int cyc = 0; cyc < 100000 && (exp_q[0].size() > 0 || exp_q[1].size() > 0 || src_q[0].size() > 0 || src_q[1].size() > 0); cyc++) begin
        @(negedge clk);
        for (int p = 0; p < 2; p++) begin
          in_valid[p] = src_q[p].size() > 0 && ($urandom % 4 != 0);
          in_word[p] = (src_q[p].size() > 0) ? src_q[p][0] : '0;
          out_ready[p] = $urandom % 3 != 0;
        end
        #1;
        for (int p = 0; p < 2; p++) begin
          if (in_valid[p] && in_ready[p]) void'(src_q[p].pop_front());
          if (out_valid[p] && out_ready[p]) begin
            check(exp_q[p].size() > 0 && out_word[p] == exp_q[p][0],
                  $sformatf("plane %0d word: got %h want %h", p, out_word[p].data, exp_q[p].size() > 0 ? exp_q[p][0].data : 0));
            if (exp_q[p].size() > 0) void'(exp_q[p].pop_front());
          end
        end
      end
      @(negedge clk);
      in_valid[0] = 0; in_valid[1] = 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 2; p++) begin
      cfg[p] = '0; in_valid[p] = 0; in_word[p] = '0; out_ready[p] = 0; e_fwd[p] = 0; e_drop[p] = 0;
      h_req[p] = 0; h_addr[p] = 0; h_data[p] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // IPv4 plane tables
    for (int k = 0; k < 8; k++) sram_wr(0, 19'((32'h0A01_0000 >> 13) + k), {1'b0, 3'd2, NH1});
    for (int k = 0; k < 8; k++) sram_wr(0, 19'((32'h0A09_0000 >> 13) + k), {1'b0, 3'd2, NH9});
    sram_wr(0, 19'(32'h0A02_0300 >> 13), {1'b1, 3'd0, 32'd5});
    for (int k = 0; k < 256; k++) sram_wr(1, {6'd5, 13'((32'h0A02_0300 & 32'h1FFF) + k)}, {1'b0, 3'd3, NH3});
    reg_wr(0, TBL_ARP, 0, cam_entry(NH1, '1, MAC1));
    reg_wr(0, TBL_ARP, 1, cam_entry(NH3, '1, MAC3));
    for (int p = 0; p < 8; p++) begin
      reg_wr(0, TBL_PMAC, p, 128'(pmac(p)));
      reg_wr(0, TBL_PIP, p, 128'(pip(p)));
      reg_wr(1, TBL_PMAC, p, 128'(pmac(p)));
    end
    // ROFL plane tables
    reg_wr(1, TBL_FIB, 0, cam_entry(32'h100, 32'hFFFF_FF00, 48'd1));
    reg_wr(1, TBL_AUX, 0, cam_entry(32'h0C0, 32'hFFFF_FFC0, 48'd5));
    reg_wr(1, TBL_ARP, 0, cam_entry(32'h100, '1, MACA));
    reg_wr(1, TBL_ARP, 1, cam_entry(32'h0C0, '1, MACB));

    for (int f = 0; f < 120; f++) begin
      automatic int c = $urandom % 4;
      automatic logic [31:0] r = $urandom;
      automatic int nw = (f % 5 == 0) ? 7 : 8 + $urandom % 4;
      case (c)
        0: send(0, 32'h0A01_0000 | (r & 32'hFFFF), nw, 4'd2);
        1: send(0, 32'h0A02_0300 | (r & 32'hFF), nw, 4'd2);
        2: send(0, 32'h0A09_0000 | (r & 32'hFFFF), nw, 4'd2);
        default: send(0, 32'h0A05_0000 | (r & 32'hFFFF), nw, 4'd2);
      endcase
      case (c)
        0, 1: send(1, 32'h100 | (r & 32'hFF), nw, 4'd7);
        2: send(1, 32'h0C0 | (r & 32'h3F), nw, 4'd7);
        default: send(1, 32'h300 | (r & 32'hFF), nw, 4'd7);
      endcase
    end
    run_traffic();
    repeat (30) @(negedge clk);
    // second phase: plane 0 switched to source-based routing
    reg_wr(0, TBL_ARP, 2, cam_entry(NH9, '1, MAC9));
    reg_wr(0, TBL_MODE, 0, 128'(RT_SRC));
    src_mode = 1;
    for (int f = 0; f < 30; f++) send(0, $urandom, 8 + $urandom % 4, 4'd2);
    run_traffic();
    repeat (30) @(negedge clk);
    for (int p = 0; p < 2; p++) begin
      check(exp_q[p].size() == 0, "every forwarded frame seen");
      check(n_fwd[p] == 32'(e_fwd[p]) && n_drop[p] == 32'(e_drop[p]),
            $sformatf("plane %0d counters fwd %0d/%0d drop %0d/%0d", p, n_fwd[p], e_fwd[p], n_drop[p], e_drop[p]));
      check(e_fwd[p] > 30 && e_drop[p] > 20, "forward and drop paths exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
