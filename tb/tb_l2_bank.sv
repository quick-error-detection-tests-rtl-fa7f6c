// tb_l2_bank: self-checking test of l2_bank (reduced: 4 arrays of 64
// entries x 64 bytes, 0x400-byte chunks, bank 1).
//
// Every checker is given the same wide original range; each must only walk
// the lines of its own array's window. All arrays are filled through their
// own ports, checks run concurrently in all enabled arrays, and a corrupted
// duplicate in one array must raise the error of that array only. Array 3
// is left disabled to check the configuration-bus decoding.
module tb_l2_bank;
  import fastqed_pkg::*;
  localparam int unsigned AR = 4, AW = 40, LB = 64, LW = 512, ENT = 64, LAT = 2, CH = 32'h400;
  localparam int unsigned WIN = LB * ENT, BANK = 1;
  logic clk = 0, rst_n = 0;
  logic [AR-1:0] req_valid = '0, req_ready, req_we = '0, rsp_valid, rsp_hit;
  logic [AR-1:0][AW-1:0] req_addr = '0;
  logic [AR-1:0][LW-1:0] req_wdata = '0, rsp_rdata;
  logic [AR-1:0] mbist_mode = '0, mbist_en = '0, mbist_we = '0, mbist_rvalid;
  logic [AR-1:0][AW-1:0] mbist_addr = '0;
  logic [AR-1:0][LW-1:0] mbist_wdata = '0, mbist_rdata;
  logic cfg_we = 0;
  logic [1:0] cfg_idx = '0;
  cfg_reg_e cfg_reg = CFG_CTRL;
  logic [AW-1:0] cfg_wdata = '0;
  array_mode_e [AR-1:0] mode;
  logic [AR-1:0] err_sticky, ev_start, ev_cmp_done, ev_cmp_skip, ev_error, ev_held_st, ev_held_op;
  logic err_any;
  int checks = 0, failures = 0;
  int n_start [AR], n_done [AR], n_skip = 0;
  always #5 clk = ~clk;

  l2_bank #(.BANK_ID(BANK), .ARRAYS(AR), .ENTRIES(ENT), .CHUNK(CH)) dut (.*);

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial for (int a = 0; a < AR; a++) begin n_start[a] = 0; n_done[a] = 0; end
  always @(posedge clk) if (rst_n) for (int a = 0; a < AR; a++) begin
    n_start[a] += int'(ev_start[a]);
    n_done[a]  += int'(ev_cmp_done[a]);
    n_skip     += int'(ev_cmp_skip[a]);
  end

  task automatic cfg(input int idx, input cfg_reg_e r, input logic [AW-1:0] v);
    @(negedge clk); cfg_we = 1; cfg_idx = 2'(idx); cfg_reg = r; cfg_wdata = v;
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic store(input int a, input logic [AW-1:0] addr, input logic [LW-1:0] d);
    @(negedge clk);
    req_valid[a] = 1; req_we[a] = 1; req_addr[a] = addr; req_wdata[a] = d;
    while (!req_ready[a]) @(negedge clk);
    @(posedge clk);
    #1 req_valid[a] = 0;
  endtask

  function automatic int base(input int a);
    return (BANK * AR + a) * WIN;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < AR; a++) begin
      cfg(a, CFG_ORIG_LO, 40'h0);
      cfg(a, CFG_ORIG_HI, 40'hF_FFFF);
    end
    // fill every array's window: original lines and their duplicates
    for (int a = 0; a < AR; a++)
      for (int off = 0; off < WIN; off += LB)
        if ((off & CH) == 0) begin
          store(a, AW'(base(a) + off), {16{32'(base(a) + off)}});
          store(a, AW'(base(a) + off + CH), {16{32'(base(a) + off)}});
        end
    for (int a = 0; a < AR - 1; a++) cfg(a, CFG_CTRL, 40'h1);
    repeat (400) @(posedge clk);
    for (int a = 0; a < AR - 1; a++)
      chk(n_start[a] > 20 && n_done[a] > 20, $sformatf("array %0d checks its lines (%0d)", a, n_done[a]));
    chk(n_start[AR-1] == 0, "disabled array not checked");
    // every line of each window is cached, so a read outside the window
    // would miss and be skipped
    chk(n_skip == 0, $sformatf("checkers stay inside their windows (%0d skips)", n_skip));
    chk(err_sticky == '0 && !err_any, "no false error");
    // corrupted duplicate in array 2
    store(2, AW'(base(2) + 32'h80 + CH), {16{32'hBAD0_0BAD}});
    store(2, AW'(base(2) + 32'h80), {16{32'h600D_600D}});
    repeat (400) @(posedge clk);
    chk(err_sticky == 4'b0100 && err_any, $sformatf("only array 2 flags an error (%b)", err_sticky));
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
