// tb_rofl_sram_fib: self-checking test of the SRAM ROFL lookup. Two virtual
// routers get namespaces in one SRAM bank (VID 3: base 0x1000, 256 labels;
// VID 5: base 0x2000, 64 labels). The TB fills every location with the egress
// port and label of the closest valid label at or after it (circularly), and
// loads two pointer-cache entries. Random destinations are looked up; the result must
// be the lower-labelled of the namespace answer and the cache hit, computed by
// a reference model, and must arrive 4 cycles after the request (RD_LAT = 2).
module tb_rofl_sram_fib;
  import vnet_pkg::*;
  localparam int RD_LAT = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_en, req_valid, req_ready, rsp_valid;
  cfg_wr_t cfg;
  lkup_req_t req;
  lkup_rsp_t rsp;

  logic               rq [2], w [2], g [2], rv [2];
  logic [SRAM_AW-1:0] ad [2];
  logic [SRAM_DW-1:0] wd [2], rdata;
  logic en, we;
  logic [SRAM_AW-1:0] a;
  logic [SRAM_DW-1:0] d, q;

  rofl_sram_fib dut (
    .clk, .rst_n, .cfg_en, .cfg, .req_valid, .req_ready, .req, .rsp_valid, .rsp,
    .sr_req(rq[0]), .sr_addr(ad[0]), .sr_gnt(g[0]), .sr_rvalid(rv[0]), .sr_rdata(rdata));
  logic h_req;
  logic [SRAM_AW-1:0] h_ad;
  logic [SRAM_DW-1:0] h_wd;
  assign w[0] = 1'b0;
  assign wd[0] = '0;
  assign w[1] = 1'b1;
  assign rq[1] = h_req;
  assign ad[1] = h_ad;
  assign wd[1] = h_wd;
  sram_arbiter #(.N(2), .RD_LAT(RD_LAT)) u_arb (
    .clk, .rst_n, .req(rq), .we(w), .addr(ad), .wdata(wd), .gnt(g), .rvalid(rv), .rdata(rdata),
    .sram_en(en), .sram_we(we), .sram_addr(a), .sram_wdata(d), .sram_rdata(q));
  sram_model #(.RD_LAT(RD_LAT)) u_mem (.clk, .en, .we, .addr(a), .wdata(d), .rdata(q));

  function automatic void check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endfunction

  task automatic sram_wr(input logic [18:0] ad_, input logic [35:0] d_);
    @(negedge clk);
    h_req = 1; h_ad = ad_; h_wd = d_;
    #1;
    while (!g[1]) begin @(negedge clk); #1; end
    @(negedge clk);
    h_req = 0;
  endtask

  task automatic cfg_wr(input logic [3:0] tbl, input logic [18:0] idx, input logic [127:0] data);
    @(negedge clk);
    cfg = '0; cfg.we = 1; cfg.tbl = tbl; cfg.idx = idx; cfg.data = data;
    @(negedge clk);
    cfg = '0;
  endtask

  // namespaces: valid labels (offsets) and their ports
  int base [2] = '{32'h1000, 32'h2000};
  int size [2] = '{256, 64};
  int vids [2] = '{3, 5};
  int lab  [2][4] = '{'{8'h10, 8'h40, 8'h90, 8'hE0}, '{6'h05, 6'h18, 6'h30, 6'h3A}};
  logic [2:0] lport [2][4] = '{'{3'd1, 3'd2, 3'd3, 3'd0}, '{3'd4, 3'd5, 3'd6, 3'd7}};
  // pointer cache: label, care-mask, port
  logic [31:0] c_id [2] = '{32'h58, 32'hF0};
  logic [31:0] c_mk [2] = '{32'hFFFF_FFF8, 32'hFFFF_FFF0};
  logic [2:0]  c_pt [2] = '{3'd6, 3'd7};

  function automatic int succ(input int n, input int off);
    for (int k = 0; k < size[n]; k++)
      for (int i = 0; i < 4; i++)
        if (lab[n][i] == (off + k) % size[n]) return i;
    return 0;
  endfunction

  int n_cache = 0, n_sram = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0; cfg_en = 1; req_valid = 0; req = '0; h_req = 0; h_ad = 0; h_wd = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2; n++) begin
      cfg_wr(TBL_NS, 19'(vids[n]), {64'h0, 32'(size[n] - 1), 32'(base[n])});
      for (int off = 0; off < size[n]; off++) begin
        automatic int i = succ(n, off);
        sram_wr(19'(base[n] + off), {1'b1, lport[n][i], 32'(lab[n][i])});
      end
    end
    for (int i = 0; i < 2; i++) cfg_wr(TBL_AUX, 19'(i), {1'b1, 60'h0, 3'(c_pt[i]), c_mk[i], c_id[i]});

    for (int t = 0; t < 300; t++) begin
      automatic int n = $urandom % 2;
      automatic int off = (t % 3 == 0 && n == 0) ? ((t % 2) ? (32'h58 + ($urandom % 8)) : (32'hF0 + ($urandom % 16))) : ($urandom % size[n]);
      automatic logic [31:0] dst = 32'(off) | ((t % 3 == 0) ? 32'h0 : (32'($urandom % 4) << 8));
      automatic int i = succ(n, off);
      automatic logic [31:0] e_id = 32'(lab[n][i]);
      automatic logic [2:0] e_pt = lport[n][i];
      automatic bit from_cache = 0;
      int lat;
      for (int k = 0; k < 2; k++)
        if (((dst ^ c_id[k]) & c_mk[k]) == 0 && c_id[k] < e_id) begin
          e_id = c_id[k]; e_pt = c_pt[k]; from_cache = 1;
        end
      @(negedge clk);
      req_valid = 1; req.vid = 4'(vids[n]); req.addr = dst;
      #1;
      check(req_ready, "idle before request");
      @(negedge clk);
      req_valid = 0;
      lat = 1;
      while (!rsp_valid && lat < 50) begin @(negedge clk); lat++; end
      check(lat == 2 + RD_LAT, $sformatf("latency %0d", lat));
      check(rsp.hit && rsp.nh == e_id && rsp.port == e_pt, $sformatf("vid %0d dst %h: got %h/%0d want %h/%0d", vids[n], dst, rsp.nh, rsp.port, e_id, e_pt));
      if (from_cache) n_cache++; else n_sram++;
    end
    check(n_cache > 10 && n_sram > 100, "both sources win");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
