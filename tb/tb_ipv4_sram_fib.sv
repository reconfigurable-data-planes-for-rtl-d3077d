// tb_ipv4_sram_fib: self-checking test of the shared-SRAM IPv4 forwarding
// table. Two virtual routers (VID 1 and 2) share the L1/L2 banks (two
// sram_model instances behind sram_arbiters, read latency 2). The tables are
// written through the arbiters' second requester port:
//   VID 1 and 2 share 10.2.3.0/24 (long prefix, L2 set 5);
//   VID 1 owns 10.1.0.0/16 (short prefix, 8 expanded L1 entries);
//   VID 2's 10.1.0.0/16 collides and is relocated to L1 0x7F000 via the Conflict CAM;
//   VID 2's 172.16.5.0/24 is a relocated long prefix (L1 0x7F001 -> L2 set 9).
// Random addresses of each class, and misses, are looked up; port, next hop,
// hit flag, Conflict CAM use and the latency (6 cycles short, 10 long) are checked.
module tb_ipv4_sram_fib;
  import vnet_pkg::*;
  localparam int RD_LAT = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_en, req_valid, req_ready, rsp_valid, conflict_hit;
  cfg_wr_t cfg;
  lkup_req_t req;
  lkup_rsp_t rsp;
  logic               e_req [2], e_gnt [2], e_rvalid [2];
  logic [SRAM_AW-1:0] e_addr [2];
  logic [SRAM_DW-1:0] e_rdata [2];

  ipv4_sram_fib dut (
    .clk, .rst_n, .cfg_en, .cfg, .req_valid, .req_ready, .req, .rsp_valid, .rsp,
    .l1_req(e_req[0]), .l1_addr(e_addr[0]), .l1_gnt(e_gnt[0]), .l1_rvalid(e_rvalid[0]), .l1_rdata(e_rdata[0]),
    .l2_req(e_req[1]), .l2_addr(e_addr[1]), .l2_gnt(e_gnt[1]), .l2_rvalid(e_rvalid[1]), .l2_rdata(e_rdata[1]),
    .conflict_hit);

  // host write requester per bank
  logic               h_req [2];
  logic [SRAM_AW-1:0] h_addr [2];
  logic [SRAM_DW-1:0] h_data [2];
  logic               h_gnt [2];

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

  function automatic void check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endfunction

  task automatic sram_wr(input int b, input logic [18:0] a, input logic [35:0] d);
    @(negedge clk);
    h_req[b] = 1; h_addr[b] = a; h_data[b] = d;
    #1;
    while (!h_gnt[b]) begin @(negedge clk); #1; end
    @(negedge clk);
    h_req[b] = 0;
  endtask

  task automatic ccam_wr(input int i, input logic [3:0] vid, input logic [31:0] p, input logic [31:0] m,
                         input logic [18:0] ind);
    @(negedge clk);
    cfg = '0; cfg.we = 1; cfg.tbl = TBL_AUX; cfg.idx = 19'(i);
    cfg.data[31:0] = p; cfg.data[63:32] = m; cfg.data[82:64] = ind; cfg.data[123:120] = vid; cfg.data[127] = 1;
    @(negedge clk);
    cfg = '0;
  endtask

  localparam logic [31:0] NH1 = 32'hC633_6401, NH2 = 32'hC633_6402, NH3 = 32'hC633_6403, NH4 = 32'hC633_6404;
  int n_short = 0, n_long = 0, n_conf = 0, n_miss = 0;

  task automatic lookup(input logic [3:0] vid, input logic [31:0] a, input bit exp_hit,
                        input logic [2:0] exp_port, input logic [31:0] exp_nh,
                        input int exp_lat, input bit exp_conf);
    int lat;
    bit saw_conf;
    @(negedge clk);
    req_valid = 1; req.vid = vid; req.addr = a;
    #1;
    check(req_ready, "engine idle before request");
    @(negedge clk);
    req_valid = 0;
    lat = 1; saw_conf = 0;
    while (!rsp_valid && lat < 100) begin
      if (conflict_hit) saw_conf = 1;
      @(negedge clk);
      lat++;
    end
    check(rsp.hit == exp_hit, "hit flag");
    if (exp_hit) check(rsp.port == exp_port && rsp.nh == exp_nh, "port and next hop");
    check(lat == exp_lat, $sformatf("latency %0d expected %0d", lat, exp_lat));
    check(saw_conf == exp_conf, "Conflict CAM used exactly when expected");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0; cfg_en = 1; req_valid = 0; req = '0;
    for (int b = 0; b < 2; b++) begin h_req[b] = 0; h_addr[b] = 0; h_data[b] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 10.1.0.0/16 for VID 1: 2^(19-16) L1 entries
    for (int k = 0; k < 8; k++) sram_wr(0, 19'((32'h0A01_0000 >> 13) + k), {1'b0, 3'd1, NH1});
    // shared long prefix 10.2.3.0/24 -> L2 set 5
    sram_wr(0, 19'(32'h0A02_0300 >> 13), {1'b1, 3'd0, 32'd5});
    for (int k = 0; k < 256; k++) sram_wr(1, {6'd5, 13'((32'h0A02_0300 & 32'h1FFF) + k)}, {1'b0, 3'd3, NH3});
    // VID 2's colliding 10.1.0.0/16, relocated to L1 0x7F000
    sram_wr(0, 19'h7F000, {1'b0, 3'd2, NH2});
    ccam_wr(0, 4'd2, 32'h0A01_0000, 32'hFFFF_0000, 19'h7F000);
    // VID 2's relocated long prefix 172.16.5.0/24 -> L1 0x7F001 -> L2 set 9
    sram_wr(0, 19'h7F001, {1'b1, 3'd0, 32'd9});
    for (int k = 0; k < 256; k++) sram_wr(1, {6'd9, 13'((32'hAC10_0500 & 32'h1FFF) + k)}, {1'b0, 3'd4, NH4});
    ccam_wr(1, 4'd2, 32'hAC10_0500, 32'hFFFF_FF00, 19'h7F001);

    for (int t = 0; t < 200; t++) begin
      automatic int c = $urandom % 6;
      automatic logic [31:0] r = $urandom;
      case (c)
        0: begin lookup(4'd1, 32'h0A01_0000 | (r & 32'hFFFF), 1, 3'd1, NH1, 6, 0); n_short++; end
        1: begin lookup(4'd2, 32'h0A01_0000 | (r & 32'hFFFF), 1, 3'd2, NH2, 6, 1); n_conf++; end
        2: begin lookup(4'(1 + r[31]), 32'h0A02_0300 | (r & 32'hFF), 1, 3'd3, NH3, 10, 0); n_long++; end
        3: begin lookup(4'd2, 32'hAC10_0500 | (r & 32'hFF), 1, 3'd4, NH4, 10, 1); n_conf++; end
        4: begin lookup(4'd1, 32'hAC10_0500 | (r & 32'hFF), 0, 3'd0, 32'h0, 6, 0); n_miss++; end
        default: begin lookup(4'd3, 32'h5000_0000 | (r & 32'h0FFF_FFFF), 0, 3'd0, 32'h0, 6, 0); n_miss++; end
      endcase
    end
    check(n_short > 10 && n_long > 10 && n_conf > 10 && n_miss > 10, "every class exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
