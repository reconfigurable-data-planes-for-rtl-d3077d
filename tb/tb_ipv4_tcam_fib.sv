// tb_ipv4_tcam_fib: self-checking test of the on-chip IPv4 forwarding table.
// A route set with nested prefixes (/8, /16, /24, /32 and a default route)
// is written longest-first; random destinations inside and outside the
// prefixes must return the port and next hop of the longest matching prefix,
// computed here by a reference longest-prefix search. A second phase adds
// source prefixes to some entries (source-and-destination routing) and checks
// that an entry then needs both halves to match. The document's 1-cycle TCAM
// lookup latency is checked on every request.
module tb_ipv4_tcam_fib;
  import vnet_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_en, req_valid, req_ready, rsp_valid;
  cfg_wr_t cfg;
  lkup_req_t req;
  lkup_rsp_t rsp;

  ipv4_tcam_fib dut (.*);

  function automatic void check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endfunction

  localparam int NR = 9;
  logic [31:0] pfx [NR];
  int          plen [NR];
  logic [2:0]  port [NR];
  logic [31:0] nh [NR];
  logic [31:0] spfx [4] = '{32'h0B00_0000, 32'h0C00_0000, 32'h0B00_0000, 32'h0D00_0000};
  int          slen [4] = '{8, 8, 8, 8};
  int          n_src_hits = 0;

  function automatic logic [31:0] mask_of(input int l);
    return (l == 0) ? 32'h0 : ~((32'h1 << (32 - l)) - 1);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // sorted longest first, as the control plane writes them
    pfx[0] = 32'h0A01_0203; plen[0] = 32;
    pfx[1] = 32'h0A01_0200; plen[1] = 24;
    pfx[2] = 32'hC0A8_0100; plen[2] = 24;
    pfx[3] = 32'h0A01_0000; plen[3] = 16;
    pfx[4] = 32'hAC10_0000; plen[4] = 12;
    pfx[5] = 32'h0A00_0000; plen[5] = 8;
    pfx[6] = 32'hC000_0000; plen[6] = 4;
    pfx[7] = 32'h8000_0000; plen[7] = 1;
    pfx[8] = 32'h0000_0000; plen[8] = 0;
    for (int i = 0; i < NR; i++) begin port[i] = 3'(i); nh[i] = 32'h6400_0000 + 32'(i); end
    cfg = '0; cfg_en = 1; req_valid = 0; req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NR; i++) begin
      @(negedge clk);
      cfg = '0; cfg.we = 1; cfg.tbl = TBL_FIB; cfg.idx = 19'(i);
      cfg.data[31:0] = pfx[i]; cfg.data[63:32] = mask_of(plen[i]);
      cfg.data[98:96] = port[i]; cfg.data[95:64] = nh[i]; cfg.data[127] = 1;
    end
    @(negedge clk);
    cfg = '0;
    for (int t = 0; t < 600; t++) begin
      logic [31:0] a;
      int best, bl;
      if (t < 2 * NR) a = pfx[t % NR] | ((t >= NR) ? (~mask_of(plen[t % NR]) & 32'($urandom)) : 32'h0);
      else if (t % 2) a = pfx[$urandom % NR] ^ (32'h1 << ($urandom % 32));
      else a = $urandom;
      best = -1; bl = -1;
      for (int i = 0; i < NR; i++)
        if (((a ^ pfx[i]) & mask_of(plen[i])) == 0 && plen[i] > bl) begin best = i; bl = plen[i]; end
      @(negedge clk);
      req_valid = 1; req.addr = a; req.vid = 4'($urandom);
      @(negedge clk);
      req_valid = 0;
      check(rsp_valid, "response one cycle after request");
      check(rsp.hit == (best >= 0), "hit");
      if (best >= 0) check(rsp.port == port[best] && rsp.nh == nh[best], "longest prefix wins");
    end
    // Source-and-destination routing: entries 0..3 get a source prefix staged
    // with TBL_SRC just before their route write; entries 4..8 are rewritten
    // without one and must match any source (the staged prefix is cleared).
    for (int i = 0; i < NR; i++) begin
      if (i < 4) begin
        @(negedge clk);
        cfg = '0; cfg.we = 1; cfg.tbl = TBL_SRC;
        cfg.data[31:0] = spfx[i]; cfg.data[63:32] = mask_of(slen[i]);
      end
      @(negedge clk);
      cfg = '0; cfg.we = 1; cfg.tbl = TBL_FIB; cfg.idx = 19'(i);
      cfg.data[31:0] = pfx[i]; cfg.data[63:32] = mask_of(plen[i]);
      cfg.data[98:96] = port[i]; cfg.data[95:64] = nh[i]; cfg.data[127] = 1;
    end
    @(negedge clk);
    cfg = '0;
    for (int t = 0; t < 600; t++) begin
      logic [31:0] a, sa;
      int best, k;
      k = (t % 2) ? int'($urandom % 4) : int'($urandom % NR);
      a = (t % 5 == 0) ? 32'($urandom) : pfx[k] | (~mask_of(plen[k]) & 32'($urandom));
      case ($urandom % 3)
        0: sa = spfx[$urandom % 4] | (32'($urandom) & 32'h00FF_FFFF);
        1: sa = spfx[$urandom % 4] ^ 32'h0100_0000;
        default: sa = $urandom;
      endcase
      best = -1;
      for (int i = 0; i < NR && best < 0; i++)
        if (((a ^ pfx[i]) & mask_of(plen[i])) == 0 &&
            (i >= 4 || ((sa ^ spfx[i]) & mask_of(slen[i])) == 0)) best = i;
      @(negedge clk);
      req_valid = 1; req.addr = a; req.src = sa; req.vid = 4'($urandom);
      @(negedge clk);
      req_valid = 0;
      check(rsp_valid, "response one cycle after request (source and destination)");
      check(rsp.hit == (best >= 0), "hit (source and destination)");
      if (best >= 0) check(rsp.port == port[best] && rsp.nh == nh[best], "first entry matching source and destination wins");
      if (best >= 0 && best < 4) n_src_hits++;
    end
    check(n_src_hits > 20, "source-qualified entries were hit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
