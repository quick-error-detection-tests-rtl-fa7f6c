// tb_fastqed_edl: error-detection latency of one L1 and one L2 cache unit
// under a test-like load, with OP_cnt_min = 5.
//
// Each unit (default sizes: L1 512 x 16 B, 1-cycle reads; L2 512 x 64 B,
// 2-cycle reads; 8-entry buffers) receives the memory traffic of an
// EDDI-V transformed test: about one memory operation every 4 cycles,
// loads of original lines and store pairs (original, then duplicate, same
// value) over 256 original lines. In each trial a bug corrupts the value of
// one store on its way into the array (a cache-controller data bug). The
// testbench measures the cycles from that store to the checker's error
// flag, then repairs the pair and clears the flag. A trial whose corrupted
// line is overwritten by a later correct pair before detection is counted
// as masked. Every unmasked bug must be detected within 7,000 cycles; the
// latencies are printed.
module tb_fastqed_edl;
  import fastqed_pkg::*;
  localparam int unsigned AW = 40, TRIALS = 24;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ---------------- L1 unit ----------------
  logic a_rv = 0, a_rr, a_we = 0, a_sv, a_sh, a_mrv, a_cfg = 0;
  logic [AW-1:0] a_ad = '0, a_cd = '0;
  logic [127:0] a_wd = '0, a_rd, a_mrd;
  cfg_reg_e a_cr = CFG_CTRL;
  array_mode_e a_mode;
  logic a_ep, a_es, a_e1, a_e2, a_e3, a_e4, a_e5;
  plch_cache_unit #(.LINE_BYTES(L1_LINE_BYTES), .READ_LAT(L1_READ_LAT)) u_l1 (
    .clk, .rst_n, .req_valid(a_rv), .req_ready(a_rr), .req_we(a_we), .req_addr(a_ad),
    .req_wdata(a_wd), .rsp_valid(a_sv), .rsp_hit(a_sh), .rsp_rdata(a_rd),
    .mbist_mode(1'b0), .mbist_en(1'b0), .mbist_we(1'b0), .mbist_addr('0), .mbist_wdata('0),
    .mbist_rvalid(a_mrv), .mbist_rdata(a_mrd), .cfg_we(a_cfg), .cfg_reg(a_cr), .cfg_wdata(a_cd),
    .mode(a_mode), .err_pulse(a_ep), .err_sticky(a_es), .ev_start(a_e1), .ev_cmp_done(a_e2),
    .ev_cmp_skip(a_e3), .ev_held_st(a_e4), .ev_held_op(a_e5));

  // ---------------- L2 unit (array 0 of bank 0: 0x0000-0x7FFF) ----------------
  logic b_rv = 0, b_rr, b_we = 0, b_sv, b_sh, b_mrv, b_cfg = 0;
  logic [AW-1:0] b_ad = '0, b_cd = '0;
  logic [511:0] b_wd = '0, b_rd, b_mrd;
  cfg_reg_e b_cr = CFG_CTRL;
  array_mode_e b_mode;
  logic b_ep, b_es, b_e1, b_e2, b_e3, b_e4, b_e5;
  plch_cache_unit #(.LINE_BYTES(L2_LINE_BYTES), .READ_LAT(L2_READ_LAT),
                    .WIN_BASE(40'h0), .WIN_LAST(40'h7FFF)) u_l2 (
    .clk, .rst_n, .req_valid(b_rv), .req_ready(b_rr), .req_we(b_we), .req_addr(b_ad),
    .req_wdata(b_wd), .rsp_valid(b_sv), .rsp_hit(b_sh), .rsp_rdata(b_rd),
    .mbist_mode(1'b0), .mbist_en(1'b0), .mbist_we(1'b0), .mbist_addr('0), .mbist_wdata('0),
    .mbist_rvalid(b_mrv), .mbist_rdata(b_mrd), .cfg_we(b_cfg), .cfg_reg(b_cr), .cfg_wdata(b_cd),
    .mode(b_mode), .err_pulse(b_ep), .err_sticky(b_es), .ev_start(b_e1), .ev_cmp_done(b_e2),
    .ev_cmp_skip(b_e3), .ev_held_st(b_e4), .ev_held_op(b_e5));

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---- L1 driver and experiment ----
  task automatic a_op(input logic w, input logic [AW-1:0] ad, input logic [127:0] d);
    @(negedge clk); a_rv = 1; a_we = w; a_ad = ad; a_wd = d;
    while (!a_rr) @(negedge clk);
    @(posedge clk); #1 a_rv = 0;
  endtask
  task automatic a_cfgw(input cfg_reg_e r, input logic [AW-1:0] v);
    @(negedge clk); a_cfg = 1; a_cr = r; a_cd = v; @(negedge clk); a_cfg = 0;
  endtask
  // original line n of the L1 test: 0x0000-0x0FFF
  function automatic logic [AW-1:0] a_line(input int n); return AW'(n * 16); endfunction

  int a_lat [$], a_masked = 0;
  task automatic run_l1();
    for (int n = 0; n < 256; n++) begin
      a_op(1, a_line(n), {4{32'(n)}});
      a_op(1, a_line(n) + 40'h1000, {4{32'(n)}});
    end
    a_cfgw(CFG_ORIG_LO, 40'h0); a_cfgw(CFG_ORIG_HI, 40'h0FFF);
    a_cfgw(CFG_OP_MIN, 40'd5);  a_cfgw(CFG_CTRL, 40'h1);
    for (int t = 0; t < TRIALS; t++) begin
      int bug_line;
      longint t0;
      bit masked;
      repeat ($urandom_range(50, 400)) @(posedge clk);
      bug_line = $urandom_range(0, 255);
      a_op(1, a_line(bug_line), {4{32'hDEAD_0000 | 32'(t)}});    // corrupted by the bug
      t0 = cyc;
      a_op(1, a_line(bug_line) + 40'h1000, {4{32'(bug_line)}});
      masked = 0;
      while (!a_es && cyc - t0 < 20000) begin
        int n;
        repeat ($urandom_range(2, 5)) @(posedge clk);
        n = $urandom_range(0, 255);
        if ($urandom_range(0, 3) == 0) begin
          if (n == bug_line) masked = 1;
          a_op(1, a_line(n), {4{32'(n)}});
          a_op(1, a_line(n) + 40'h1000, {4{32'(n)}});
        end else a_op(0, a_line(n), '0);
      end
      if (a_es) a_lat.push_back(int'(cyc - t0));
      else if (masked) a_masked++;
      else chk(0, "L1: bug not detected");
      a_op(1, a_line(bug_line), {4{32'(bug_line)}});
      a_op(1, a_line(bug_line) + 40'h1000, {4{32'(bug_line)}});
      a_cfgw(CFG_CTRL, 40'h3);
    end
  endtask

  // ---- L2 driver and experiment ----
  task automatic b_op(input logic w, input logic [AW-1:0] ad, input logic [511:0] d);
    @(negedge clk); b_rv = 1; b_we = w; b_ad = ad; b_wd = d;
    while (!b_rr) @(negedge clk);
    @(posedge clk); #1 b_rv = 0;
  endtask
  task automatic b_cfgw(input cfg_reg_e r, input logic [AW-1:0] v);
    @(negedge clk); b_cfg = 1; b_cr = r; b_cd = v; @(negedge clk); b_cfg = 0;
  endtask
  // original line n of the L2 test: 64 lines in each of chunks 0, 2, 4, 6
  function automatic logic [AW-1:0] b_line(input int n);
    return AW'((n / 64) * 32'h2000 + (n % 64) * 64);
  endfunction

  int b_lat [$], b_masked = 0;
  task automatic run_l2();
    for (int n = 0; n < 256; n++) begin
      b_op(1, b_line(n), {16{32'(n)}});
      b_op(1, b_line(n) + 40'h1000, {16{32'(n)}});
    end
    b_cfgw(CFG_ORIG_LO, 40'h0); b_cfgw(CFG_ORIG_HI, 40'h7FFF);
    b_cfgw(CFG_OP_MIN, 40'd5);  b_cfgw(CFG_CTRL, 40'h1);
    for (int t = 0; t < TRIALS; t++) begin
      int bug_line;
      longint t0;
      bit masked;
      repeat ($urandom_range(50, 400)) @(posedge clk);
      bug_line = $urandom_range(0, 255);
      b_op(1, b_line(bug_line), {16{32'hDEAD_0000 | 32'(t)}});
      t0 = cyc;
      b_op(1, b_line(bug_line) + 40'h1000, {16{32'(bug_line)}});
      masked = 0;
      while (!b_es && cyc - t0 < 20000) begin
        int n;
        repeat ($urandom_range(2, 5)) @(posedge clk);
        n = $urandom_range(0, 255);
        if ($urandom_range(0, 3) == 0) begin
          if (n == bug_line) masked = 1;
          b_op(1, b_line(n), {16{32'(n)}});
          b_op(1, b_line(n) + 40'h1000, {16{32'(n)}});
        end else b_op(0, b_line(n), '0);
      end
      if (b_es) b_lat.push_back(int'(cyc - t0));
      else if (masked) b_masked++;
      else chk(0, "L2: bug not detected");
      b_op(1, b_line(bug_line), {16{32'(bug_line)}});
      b_op(1, b_line(bug_line) + 40'h1000, {16{32'(bug_line)}});
      b_cfgw(CFG_CTRL, 40'h3);
    end
  endtask

  task automatic report(input string name, input int lat [$], input int masked);
    int s [$];
    s = lat;
    s.sort();
    if (s.size() > 0) begin
      $display("%s: %0d detected, %0d masked, latency min %0d median %0d max %0d cycles",
               name, s.size(), masked, s[0], s[s.size() / 2], s[s.size() - 1]);
      chk(s[s.size() - 1] < 7000, $sformatf("%s: all detected within 7,000 cycles", name));
    end
    chk(s.size() >= TRIALS / 2, $sformatf("%s: most bugs detected", name));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      run_l1();
      run_l2();
    join
    report("L1", a_lat, a_masked);
    report("L2", b_lat, b_masked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
