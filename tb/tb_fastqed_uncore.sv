// tb_fastqed_uncore: end-to-end test of fastqed_uncore at its default size
// (8 L1 arrays, 8 L2 banks x 16 arrays, 136 PLC-H checkers).
//
// Plays an EDDI-V transformed test: original lines and their duplicates at
// +0x1000 are stored into the L1 array of core 0 and core 5 and into L2
// bank 3 array 7 (window 0x1B8000-0x1BFFFF), then the three checkers are
// programmed and enabled over the configuration bus. It checks:
//   - idle checking rate: all 512 entries of an L1 array in 512 cycles,
//     all 512 entries of an L2 array in 1,024 cycles;
//   - no false error while the copies agree, error flags only for the
//     checker whose array holds a corrupted duplicate;
//   - ST_cnt hold, OP_cnt_min hold, tag-miss skip, input-buffer stall,
//     MBIST mode, and normal load results during checking.
// Each mechanism is counted and must have happened at least once.
module tb_fastqed_uncore;
  import fastqed_pkg::*;
  localparam int unsigned NC = 8, NB = 8, APB = 16, NL2 = NB * APB, NCHK = NC + NL2;
  localparam int unsigned AW = 40, L1W = 128, L2W = 512;
  localparam int unsigned L2K = 3 * APB + 7, L2ID = NC + L2K;
  localparam int unsigned L2BASE = L2K * 32'h8000;
  logic clk = 0, rst_n = 0;
  logic [NC-1:0] l1_req_valid = '0, l1_req_ready, l1_req_we = '0, l1_rsp_valid, l1_rsp_hit;
  logic [NC-1:0][AW-1:0] l1_req_addr = '0;
  logic [NC-1:0][L1W-1:0] l1_req_wdata = '0, l1_rsp_rdata;
  logic [NC-1:0] l1_mbist_mode = '0, l1_mbist_en = '0, l1_mbist_we = '0, l1_mbist_rvalid;
  logic [NC-1:0][AW-1:0] l1_mbist_addr = '0;
  logic [NC-1:0][L1W-1:0] l1_mbist_wdata = '0, l1_mbist_rdata;
  logic [NL2-1:0] l2_req_valid = '0, l2_req_ready, l2_req_we = '0, l2_rsp_valid, l2_rsp_hit;
  logic [NL2-1:0][AW-1:0] l2_req_addr = '0;
  logic [NL2-1:0][L2W-1:0] l2_req_wdata = '0, l2_rsp_rdata;
  logic [NL2-1:0] l2_mbist_mode = '0, l2_mbist_en = '0, l2_mbist_we = '0, l2_mbist_rvalid;
  logic [NL2-1:0][AW-1:0] l2_mbist_addr = '0;
  logic [NL2-1:0][L2W-1:0] l2_mbist_wdata = '0, l2_mbist_rdata;
  logic cfg_we = 0;
  logic [$clog2(NCHK)-1:0] cfg_id = '0;
  cfg_reg_e cfg_reg = CFG_CTRL;
  logic [AW-1:0] cfg_wdata = '0;
  logic [NCHK-1:0] err_sticky, ev_start, ev_cmp_done, ev_cmp_skip, ev_error, ev_held_st, ev_held_op;
  logic err_any;
  always #5 clk = ~clk;

  fastqed_uncore dut (.*);

  int checks = 0, failures = 0;
  int n_start [NCHK], n_done [NCHK];
  int n_skip = 0, n_err = 0, n_held_st = 0, n_held_op = 0, n_stall = 0, n_mbist = 0, n_load = 0;
  int l1_rsp_exp [$];   // expected first word of L1 core 0 load results
  initial for (int i = 0; i < NCHK; i++) begin n_start[i] = 0; n_done[i] = 0; end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < NCHK; i++) begin
      n_start[i] += int'(ev_start[i]);
      n_done[i]  += int'(ev_cmp_done[i]);
    end
    n_skip += $countones(ev_cmp_skip);
    n_err += $countones(ev_error);
    n_held_st += $countones(ev_held_st);
    n_held_op += $countones(ev_held_op);
    n_stall += $countones(l2_req_valid & ~l2_req_ready) + $countones(l1_req_valid & ~l1_req_ready);
    n_mbist += $countones(l1_mbist_mode) + $countones(l2_mbist_mode);
    if (l1_rsp_valid[0]) begin
      n_load++;
      if (l1_rsp_exp.size() == 0) chk(0, "unexpected L1 load result");
      else chk(l1_rsp_hit[0] && l1_rsp_rdata[0][31:0] == 32'(l1_rsp_exp.pop_front()), "L1 load result");
    end
  end

  task automatic cfg(input int id, input cfg_reg_e r, input logic [AW-1:0] v);
    @(negedge clk); cfg_we = 1; cfg_id = ($clog2(NCHK))'(id); cfg_reg = r; cfg_wdata = v;
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic l1_op(input int c, input logic w, input logic [AW-1:0] a, input logic [L1W-1:0] d);
    @(negedge clk);
    l1_req_valid[c] = 1; l1_req_we[c] = w; l1_req_addr[c] = a; l1_req_wdata[c] = d;
    while (!l1_req_ready[c]) @(negedge clk);
    @(posedge clk);
    #1 l1_req_valid[c] = 0;
  endtask

  task automatic l2_store(input int k, input logic [AW-1:0] a, input logic [L2W-1:0] d);
    @(negedge clk);
    l2_req_valid[k] = 1; l2_req_we[k] = 1; l2_req_addr[k] = a; l2_req_wdata[k] = d;
    while (!l2_req_ready[k]) @(negedge clk);
    @(posedge clk);
    #1 l2_req_valid[k] = 0;
  endtask

  // back-to-back L2 stores, one per cycle while not stalled
  task automatic l2_burst(input int k, input int base, input int n, input int salt);
    for (int i = 0; i < n; i++) begin
      int off;
      off = (i / 64) * 32'h2000 + (i % 64) * 64;
      l2_store(k, AW'(base + off), {16{32'(base + off + salt)}});
      l2_store(k, AW'(base + off + 32'h1000), {16{32'(base + off + salt)}});
    end
  endtask

  initial begin
    int s0, s1, d0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---- fill: L1 core 0 and core 5 (0x0000-0x0FFF + duplicates), L2 bank 3 array 7
    for (int a = 0; a < 32'h1000; a += 16) begin
      l1_op(0, 1, AW'(a), {4{32'(a)}});
      l1_op(0, 1, AW'(a + 32'h1000), {4{32'(a)}});
      l1_op(5, 1, AW'(a), {4{32'(a)}});
      l1_op(5, 1, AW'(a + 32'h1000), {4{32'(a)}});
    end
    l2_burst(L2K, L2BASE, 256, 0);   // every entry of the 32 KB array
    // ---- program and enable the three checkers
    cfg(0, CFG_ORIG_LO, 40'h0);          cfg(0, CFG_ORIG_HI, 40'h0FFF);
    cfg(5, CFG_ORIG_LO, 40'h0);          cfg(5, CFG_ORIG_HI, 40'h0FFF);
    cfg(L2ID, CFG_ORIG_LO, 40'h0);       cfg(L2ID, CFG_ORIG_HI, 40'h3F_FFFF);
    @(negedge clk); cfg_we = 1; cfg_reg = CFG_CTRL; cfg_wdata = 40'h1; cfg_id = 0;
    @(negedge clk); cfg_id = 5;
    @(negedge clk); cfg_id = ($clog2(NCHK))'(L2ID);
    @(negedge clk); cfg_we = 0;
    // ---- idle rate
    s0 = n_start[0]; s1 = n_start[L2ID];
    repeat (1024) @(posedge clk);
    chk(n_start[0] - s0 >= 2 * 255, $sformatf("L1: 512 entries in 512 cycles (%0d ops in 1024)", n_start[0] - s0));
    chk(n_start[L2ID] - s1 >= 255, $sformatf("L2: 512 entries in 1024 cycles (%0d ops)", n_start[L2ID] - s1));
    chk(n_done[L2ID] >= 255 && n_done[0] >= 500, "clean comparisons");
    chk(err_sticky == '0, "no false error");
    for (int i = 0; i < NCHK; i++)
      if (i != 0 && i != 5 && i != L2ID) chk(n_start[i] == 0, $sformatf("unprogrammed checker %0d idle", i));
    // ---- stall: long L2 burst into an array with a 2-cycle access
    l2_burst(L2K, L2BASE, 64, 0);
    chk(n_stall > 0, "input buffer full stalls the requester");
    // ---- ST_cnt hold on L1 core 5
    l1_op(5, 1, 40'h0200, {4{32'h200}});
    s0 = n_start[5];
    repeat (40) @(posedge clk);
    chk(n_start[5] == s0, "no check while an original store waits for its duplicate");
    l1_op(5, 1, 40'h1200, {4{32'h200}});
    repeat (10) @(posedge clk);
    chk(n_start[5] > s0, "checking resumes");
    // ---- OP_cnt_min = 5 on core 0 with loads in flight
    cfg(0, CFG_OP_MIN, 40'd5);
    for (int i = 0; i < 60; i++) begin
      l1_rsp_exp.push_back((i * 16) & 32'h0FF0);
      l1_op(0, 0, AW'((i * 16) & 32'h0FF0), '0);
      if (i % 4 == 0) repeat (2) @(negedge clk);
    end
    repeat (10) @(posedge clk);
    chk(l1_rsp_exp.size() == 0 && n_load == 60, $sformatf("loads answered during checking (%0d)", n_load));
    cfg(0, CFG_OP_MIN, 40'd0);
    // ---- MBIST mode on core 5's array corrupts a duplicate behind the test's back
    @(negedge clk); l1_mbist_mode[5] = 1;
    @(negedge clk); s0 = n_start[5];
    l1_mbist_en[5] = 1; l1_mbist_we[5] = 1; l1_mbist_addr[5] = 40'h1300; l1_mbist_wdata[5] = '1;
    @(negedge clk); l1_mbist_en[5] = 0; l1_mbist_we[5] = 0;
    repeat (20) @(posedge clk);
    chk(n_start[5] == s0, "no check in MBIST mode");
    @(negedge clk); l1_mbist_mode[5] = 0;
    // ---- a bug corrupts a duplicate in the L2 array (store pair disagrees)
    l2_store(L2K, AW'(L2BASE + 32'h4440), {16{32'h1111_1111}});
    l2_store(L2K, AW'(L2BASE + 32'h5440), {16{32'h2222_2222}});
    // ---- widen core 0's range past what is cached: tag misses are skipped
    cfg(0, CFG_CTRL, 40'h0); cfg(0, CFG_ORIG_HI, 40'h2FFF); cfg(0, CFG_CTRL, 40'h1);
    repeat (1500) @(posedge clk);
    chk(err_sticky[5] && err_sticky[L2ID] && err_any, "both corruptions detected");
    chk(!err_sticky[0], "core 0 has no error");
    chk($countones(err_sticky) == 2, "no other checker flags an error");
    // ---- mechanism coverage
    chk(n_skip > 0, "tag-miss skip happened");
    chk(n_held_st > 0, "ST_cnt hold happened");
    chk(n_held_op > 0, "OP_cnt_min hold happened");
    chk(n_mbist > 0, "MBIST mode happened");
    chk(n_err > 0, "mismatch happened");
    $display("mechanisms: skip=%0d err=%0d held_st=%0d held_op=%0d stall=%0d mbist=%0d loads=%0d",
             n_skip, n_err, n_held_st, n_held_op, n_stall, n_mbist, n_load);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
