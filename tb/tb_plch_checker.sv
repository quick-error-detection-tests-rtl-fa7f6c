// tb_plch_checker: self-checking test of plch_checker on an L1-sized array.
//
// The checker drives a 512 x 16-byte cache_array (one read per cycle). The
// testbench acts as the input buffer. It fills the original lines of
// 0x0000-0x0FFF and their EDDI-V copies, then checks:
//   - with no traffic and OP_cnt_min = 0, one PLC operation every 2 cycles,
//     all comparisons clean (the 256 original lines, i.e. all 512 entries,
//     are checked in 512 cycles);
//   - a store pair whose duplicate differs is flagged (sticky error), and
//     clearing works;
//   - an original store without its EDDI-V store yet holds checking
//     (ST_cnt != 0) until the duplicate store arrives;
//   - with OP_cnt_min = 5, at least 5 normal operations separate checks;
//   - a line that is not cached is skipped, not compared;
//   - in MBIST mode no check starts and MBIST writes reach the array.
module tb_plch_checker;
  import fastqed_pkg::*;
  localparam int unsigned AW = 40, LB = 16, LW = 128, ENT = 512, LAT = 1;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  cfg_reg_e cfg_reg = CFG_CTRL;
  logic [AW-1:0] cfg_wdata = '0;
  logic nrm_req = 0, nrm_we = 0, nrm_ready;
  logic [AW-1:0] nrm_addr = '0;
  logic [LW-1:0] nrm_wdata = '0;
  logic mbist_mode = 0, mbist_en = 0, mbist_we = 0;
  logic [AW-1:0] mbist_addr = '0;
  logic [LW-1:0] mbist_wdata = '0;
  logic arr_en, arr_we, arr_busy, arr_rvalid, arr_rhit;
  logic [AW-1:0] arr_addr;
  logic [LW-1:0] arr_wdata, arr_rdata;
  array_mode_e mode;
  logic err_pulse, err_sticky, ev_start, ev_cmp_done, ev_cmp_skip, ev_held_st, ev_held_op;
  int checks = 0, failures = 0;
  int n_start = 0, n_done = 0, n_skip = 0, n_err = 0, n_held_st = 0, n_held_op = 0, n_nrm = 0;
  always #5 clk = ~clk;

  plch_checker #(.ADDR_W(AW), .LINE_BYTES(LB), .READ_LAT(LAT)) dut (.*);
  cache_array #(.ADDR_W(AW), .LINE_BYTES(LB), .ENTRIES(ENT), .READ_LAT(LAT)) u_arr (
    .clk, .rst_n, .en(arr_en), .we(arr_we), .addr(arr_addr), .wdata(arr_wdata),
    .busy(arr_busy), .rvalid(arr_rvalid), .rhit(arr_rhit), .rdata(arr_rdata));

  always @(posedge clk) if (rst_n) begin
    n_start += int'(ev_start); n_done += int'(ev_cmp_done); n_skip += int'(ev_cmp_skip);
    n_err += int'(err_pulse); n_held_st += int'(ev_held_st); n_held_op += int'(ev_held_op);
    n_nrm += int'(nrm_req && nrm_ready);
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic cfg(input cfg_reg_e r, input logic [AW-1:0] v);
    @(negedge clk); cfg_we = 1; cfg_reg = r; cfg_wdata = v;
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic nrm(input logic w, input logic [AW-1:0] a, input logic [LW-1:0] d);
    @(negedge clk);
    nrm_req = 1; nrm_we = w; nrm_addr = a; nrm_wdata = d;
    #1;
    while (!nrm_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 nrm_req = 0;
  endtask

  function automatic logic [LW-1:0] pat(input int a);
    return {4{32'(a) ^ 32'h5A5A_0000}};
  endfunction


  // marks a PLC start so a test can measure normal ops between starts
  int last_nrm_at_start = 0, min_gap = 1 << 30;
  always @(posedge clk) if (rst_n && ev_start) begin
    if (n_nrm - last_nrm_at_start < min_gap) min_gap = n_nrm - last_nrm_at_start;
    last_nrm_at_start = n_nrm;
  end

  initial begin
    int s0, d0, e0, k0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    cfg(CFG_ORIG_LO, 40'h0000);
    cfg(CFG_ORIG_HI, 40'h0FFF);
    // fill: each original store followed by its EDDI-V store
    for (int a = 0; a < 32'h1000; a += LB) begin
      nrm(1, AW'(a), pat(a));
      nrm(1, AW'(a + 32'h1000), pat(a));
    end
    chk(n_start == 0, "no check while disabled");
    cfg(CFG_CTRL, 40'h1);
    s0 = n_start; d0 = n_done;
    repeat (512) @(posedge clk);
    chk(n_start - s0 >= 255 && n_start - s0 <= 256, $sformatf("256 operations in 512 cycles (got %0d)", n_start - s0));
    chk(n_done - d0 >= 254, "clean comparisons");
    chk(!err_sticky && n_err == 0, "no false error");

    // bug: duplicate of 0x0340 is corrupted
    nrm(1, 40'h0340, pat(32'h340));
    nrm(1, 40'h1340, pat(32'h340) ^ 128'h1);
    repeat (600) @(posedge clk);
    chk(err_sticky && n_err > 0, "mismatch detected");
    cfg(CFG_CTRL, 40'h3);   // clear error, keep enabled
    chk(!err_sticky, "error cleared");
    nrm(1, 40'h1340, pat(32'h340));   // repair; ST_cnt is now -1
    nrm(1, 40'h0340, pat(32'h340));   // ST_cnt back to 0
    e0 = n_err;

    // criterion 3: original store outstanding
    nrm(1, 40'h0500, pat(32'h500));
    s0 = n_start; k0 = n_held_st;
    repeat (50) @(posedge clk);
    chk(n_start == s0, "held while ST_cnt != 0");
    chk(n_held_st > k0, "held_by_st reported");
    nrm(1, 40'h1500, pat(32'h500));
    repeat (20) @(posedge clk);
    chk(n_start > s0, "resumes after EDDI-V store");

    // criterion 2: OP_cnt_min = 5 under load traffic
    cfg(CFG_OP_MIN, 40'd5);
    min_gap = 1 << 30; last_nrm_at_start = n_nrm;
    s0 = n_start;
    for (int i = 0; i < 200; i++) begin
      nrm(0, AW'((i * 16) & 32'h0FFF), '0);
      if (i % 3 == 0) @(negedge clk);
    end
    repeat (3) @(posedge clk);
    chk(n_start > s0, "checks happen under traffic");
    chk(min_gap >= 5, $sformatf("OP_cnt_min respected (min gap %0d)", min_gap));
    chk(n_held_op > 0, "held_by_op reported");
    cfg(CFG_OP_MIN, 40'd0);

    // skip: widen the range to a part that was never stored
    cfg(CFG_CTRL, 40'h0);
    cfg(CFG_ORIG_HI, 40'h2FFF);
    cfg(CFG_CTRL, 40'h1);
    k0 = n_skip;
    repeat (1100) @(posedge clk);
    chk(n_skip - k0 >= 200, $sformatf("uncached lines skipped (%0d)", n_skip - k0));
    chk(n_err == e0, "no error from skipped lines");

    // MBIST mode: no checks; MBIST write lands in the array
    @(negedge clk); mbist_mode = 1;
    @(negedge clk);
    s0 = n_start;
    mbist_en = 1; mbist_we = 1; mbist_addr = 40'h1000; mbist_wdata = '1;
    @(negedge clk); mbist_en = 0; mbist_we = 0;
    repeat (30) @(posedge clk);
    chk(n_start == s0, "no checks in MBIST mode");
    chk(mode == MODE_MBIST, "mode is MBIST");
    @(negedge clk); mbist_mode = 0;
    repeat (1100) @(posedge clk);
    chk(n_err > e0, "MBIST-written corruption found after MBIST mode");

    $display("starts=%0d done=%0d skip=%0d err=%0d held_st=%0d held_op=%0d",
             n_start, n_done, n_skip, n_err, n_held_st, n_held_op);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
