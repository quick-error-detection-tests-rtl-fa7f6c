// tb_plch_addr_gen: self-checking test of plch_addr_gen.
//
// Configured as the checker of an L2 array that caches 0x0000-0x7FFF with
// 64-byte lines and 0x1000-byte chunks. For the reference example (original
// variables in 0x6000-0x6FFF and 0x8000-0x8FFF) and for random ranges, the
// expected walk is computed here line by line (original chunk, inside the
// range, inside the window) and the generator must visit exactly those
// lines in order and wrap. Also checks the EDDI-V address (A + 0x1000) and
// the original / EDDI-V classification of random addresses, and that a
// reload during an operation keeps the latched line for the EDDI-V read
// and restarts the walk at the first line.
module tb_plch_addr_gen;
  localparam int unsigned ADDR_W = 24, LB = 64, CHUNK = 32'h1000;
  localparam logic [ADDR_W-1:0] WB = 24'h0000, WL = 24'h7FFF;
  logic clk = 0, rst_n = 0;
  logic [ADDR_W-1:0] orig_lo = '0, orig_hi = '0, gen_addr, orig_addr, mon_addr = '0;
  logic reload = 0, capture = 0, advance = 0, sel_eddi = 0, rng_valid, mon_is_orig, mon_is_eddi;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  plch_addr_gen #(.ADDR_W(ADDR_W), .LINE_BYTES(LB), .CHUNK(CHUNK), .WIN_BASE(WB), .WIN_LAST(WL)) dut (.*);

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_range(input int lo, input int hi);
    int exp[$];
    for (int a = 0; a <= int'(WL); a += LB)
      if ((a & CHUNK) == 0 && a + LB - 1 >= lo && a <= hi) exp.push_back(a);
    @(negedge clk);
    orig_lo = ADDR_W'(lo); orig_hi = ADDR_W'(hi); reload = 1;
    @(negedge clk);
    reload = 0;
    chk(rng_valid == (exp.size() > 0), $sformatf("rng_valid for %h-%h", lo, hi));
    if (exp.size() > 0) begin
      for (int k = 0; k < exp.size() + 3; k++) begin
        int e;
        e = exp[k % exp.size()];
        sel_eddi = 0; #1;
        chk(int'(gen_addr) == e, $sformatf("walk step %0d: %h exp %h", k, gen_addr, e));
        capture = 1;
        @(negedge clk);
        capture = 0;
        sel_eddi = 1; #1;
        chk(int'(gen_addr) == e + CHUNK, "EDDI-V address");
        sel_eddi = 0;
        advance = 1;
        @(negedge clk);
        advance = 0;
      end
    end
    // classification
    for (int n = 0; n < 50; n++) begin
      int a;
      a = $urandom_range(0, 32'h11FFF);
      mon_addr = ADDR_W'(a); #1;
      chk(mon_is_orig == ((a & CHUNK) == 0 && a >= lo && a <= hi), $sformatf("is_orig %h", a));
      chk(mon_is_eddi == ((a & CHUNK) != 0 && a - CHUNK >= lo && a - CHUNK <= hi), $sformatf("is_eddi %h", a));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_range(32'h6000, 32'h8FFF);   // reference example: walks 0x6000-0x6FFF only
    run_range(32'h0000, 32'h7FFF);   // whole array
    run_range(32'h1100, 32'h10000);  // starts inside an EDDI-V chunk
    run_range(32'h8000, 32'h9FFF);   // nothing in this array
    // reload in the middle of an operation
    @(negedge clk); orig_lo = 24'h2000; orig_hi = 24'h2FFF; reload = 1;
    @(negedge clk); reload = 0;
    capture = 1; @(negedge clk); capture = 0;                   // operation on 0x2000
    advance = 1; @(negedge clk); advance = 0;                   // now at 0x2040
    capture = 1; @(negedge clk); capture = 0;                   // operation on 0x2040
    orig_lo = 24'h4000; orig_hi = 24'h4FFF; reload = 1; @(negedge clk); reload = 0;
    sel_eddi = 1; #1;
    chk(gen_addr == 24'h3040, "EDDI-V read of the latched line after reload");
    sel_eddi = 0; advance = 1; @(negedge clk); advance = 0; #1;
    chk(gen_addr == 24'h4000, "walk restarts at the first line after reload");
    for (int n = 0; n < 20; n++) begin
      int lo, hi;
      lo = $urandom_range(0, 32'h9000) & ~(LB - 1);
      hi = lo + $urandom_range(0, 32'h6000) + LB - 1;
      run_range(lo, hi);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
