// tb_plch_cache_unit: self-checking test of plch_cache_unit (L2 sizes:
// 512 x 64-byte lines, 2-cycle reads, 8-entry input buffer).
//
// A requester issues one operation per cycle whenever it is not stalled:
// stores of original lines followed by their EDDI-V copies, and loads. Load
// results are checked in order against a line model, including the hit flag
// for never-written lines. The array takes one operation every 2 cycles,
// so the buffer fills and the requester must be stalled; the test counts
// stalls, PLC operations that ran between normal operations, and checks
// that no operation is lost. A corrupted duplicate is then detected.
module tb_plch_cache_unit;
  import fastqed_pkg::*;
  localparam int unsigned AW = 40, LB = 64, LW = 512, LAT = 2;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready, req_we = 0, rsp_valid, rsp_hit;
  logic [AW-1:0] req_addr = '0;
  logic [LW-1:0] req_wdata = '0, rsp_rdata;
  logic mbist_mode = 0, mbist_en = 0, mbist_we = 0, mbist_rvalid;
  logic [AW-1:0] mbist_addr = '0;
  logic [LW-1:0] mbist_wdata = '0, mbist_rdata;
  logic cfg_we = 0;
  cfg_reg_e cfg_reg = CFG_CTRL;
  logic [AW-1:0] cfg_wdata = '0;
  array_mode_e mode;
  logic err_pulse, err_sticky, ev_start, ev_cmp_done, ev_cmp_skip, ev_held_st, ev_held_op;
  int checks = 0, failures = 0;
  int n_stall = 0, n_start = 0, n_done = 0, n_err = 0, n_rsp = 0;
  always #5 clk = ~clk;

  plch_cache_unit #(.ADDR_W(AW), .LINE_BYTES(LB), .READ_LAT(LAT)) dut (.*);

  typedef struct { logic hit; logic [LW-1:0] d; } exp_t;
  exp_t expq[$];
  logic [LW-1:0] model [logic [AW-1:0]];

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    n_stall += int'(req_valid && !req_ready);
    n_start += int'(ev_start); n_done += int'(ev_cmp_done); n_err += int'(err_pulse);
    if (rsp_valid) begin
      n_rsp++;
      if (expq.size() == 0) chk(0, "unexpected response");
      else begin
        exp_t e;
        e = expq.pop_front();
        chk(rsp_hit == e.hit, "load hit flag");
        if (e.hit) chk(rsp_rdata == e.d, "load data");
      end
    end
  end

  task automatic cfg(input cfg_reg_e r, input logic [AW-1:0] v);
    @(negedge clk); cfg_we = 1; cfg_reg = r; cfg_wdata = v;
    @(negedge clk); cfg_we = 0;
  endtask

  // issue one operation; waits while stalled
  task automatic op(input logic w, input logic [AW-1:0] a, input logic [LW-1:0] d);
    @(negedge clk);
    req_valid = 1; req_we = w; req_addr = a; req_wdata = d;
    while (!req_ready) @(negedge clk);
    @(posedge clk);
    if (w) model[a] = d;
    else expq.push_back('{model.exists(a), model.exists(a) ? model[a] : '0});
    #1 req_valid = 0;
  endtask

  function automatic logic [LW-1:0] pat(input int a, input int salt);
    return {16{32'(a) * 32'h9E37_79B9 ^ 32'(salt)}};
  endfunction

  initial begin
    int loads;
    repeat (2) @(negedge clk);
    rst_n = 1;
    cfg(CFG_ORIG_LO, 40'h0000);
    cfg(CFG_ORIG_HI, 40'h0FFF);
    cfg(CFG_CTRL, 40'h1);
    @(negedge clk);
    loads = 0;
    for (int r = 0; r < 4; r++) begin
      for (int a = 0; a < 32'h1000; a += LB) begin
        op(1, AW'(a), pat(a, r));
        op(1, AW'(a + 32'h1000), pat(a, r));
        op(0, AW'((a * 7) & 32'h1FC0), '0);
        loads++;
        if (a % 1024 == 0) repeat (40) @(posedge clk);   // idle gaps: checks run
      end
    end
    op(0, 40'h0000_4000, '0);   // never written: miss
    loads++;
    repeat (20) @(posedge clk);
    chk(expq.size() == 0 && n_rsp == loads, $sformatf("all %0d loads answered (%0d)", loads, n_rsp));
    chk(n_stall > 0, $sformatf("requester stalled by a full buffer (%0d cycles)", n_stall));
    chk(n_start > 0 && n_done > 0, $sformatf("PLC operations ran (%0d, %0d compared)", n_start, n_done));
    chk(n_err == 0 && !err_sticky, "no false error");
    // bug: corrupted duplicate
    op(1, 40'h0280, pat(1, 1));
    op(1, 40'h1280, pat(2, 2));
    repeat (600) @(posedge clk);
    chk(err_sticky, "corrupted duplicate detected");
    $display("stalls=%0d starts=%0d compared=%0d errors=%0d", n_stall, n_start, n_done, n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
