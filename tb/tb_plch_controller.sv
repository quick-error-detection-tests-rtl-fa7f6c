// tb_plch_controller: self-checking test of plch_controller.
//
// The testbench plays the array (one access every 2 cycles, as an L2
// array) and the input buffer, and keeps its own cycle model of the three
// start criteria (idle array, OP_cnt >= OP_cnt_min, ST_cnt == 0) and of the
// two-read operation. Under random traffic, random original / EDDI-V
// stores, random OP_cnt_min and occasional MBIST mode it compares every
// output each cycle. A final phase with no traffic and OP_cnt_min = 0
// checks the rate: one PLC operation (two reads) every 4 cycles.
module tb_plch_controller;
  localparam int unsigned OW = 16, SW = 16, LAT = 2;
  logic clk = 0, rst_n = 0;
  logic plch_en = 0, mbist_mode = 0, rng_valid = 1, nrm_req = 0, nrm_we = 0;
  logic nrm_is_orig = 0, nrm_is_eddi = 0, arr_busy, nrm_take;
  logic [OW-1:0] op_cnt_min = '0, op_cnt;
  logic signed [SW-1:0] st_cnt;
  logic plch_active, rd_orig, rd_eddi, advance, start, held_by_st, held_by_op;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  plch_controller #(.OPCNT_W(OW), .STCNT_W(SW)) dut (.*);

  // array: busy for LAT-1 cycles after an access
  int occ = 0;
  assign arr_busy = (occ != 0);
  assign nrm_take = nrm_req && !plch_active && !mbist_mode && !arr_busy;

  // reference model
  int m_op = 0, m_st = 0;
  bit m_eddi = 0;
  int n_start = 0, n_held_st = 0, n_held_op = 0;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  always @(negedge clk) if (rst_n) begin
    bit free, e_start, e_eddi;
    free    = !nrm_req && !arr_busy;
    e_start = !m_eddi && plch_en && rng_valid && !mbist_mode && free && m_st == 0 && m_op >= int'(op_cnt_min);
    e_eddi  = m_eddi && !mbist_mode && !arr_busy;
    chk(start == e_start, "start");
    chk(rd_orig == e_start, "rd_orig");
    chk(rd_eddi == e_eddi && advance == e_eddi, "rd_eddi/advance");
    chk(plch_active == (e_start || (m_eddi && !mbist_mode)), "plch_active");
    chk(held_by_st == (!m_eddi && plch_en && rng_valid && !mbist_mode && free && m_st != 0), "held_by_st");
    chk(int'(op_cnt) == m_op && int'(st_cnt) == m_st, "counters");
    if (e_start) n_start++;
    if (held_by_st) n_held_st++;
    if (held_by_op) n_held_op++;
  end

  always @(posedge clk) if (rst_n) begin
    bit acc;
    acc = nrm_take || rd_orig || rd_eddi || (mbist_mode && $urandom_range(0, 1) == 1);
    if (acc && !arr_busy) occ <= LAT - 1; else if (occ != 0) occ <= occ - 1;
    if (start) m_op = 0;
    else if (nrm_take && m_op < 65535) m_op++;
    if (nrm_take && nrm_we && nrm_is_orig) m_st++;
    else if (nrm_take && nrm_we && nrm_is_eddi) m_st--;
    if (!m_eddi && start) m_eddi = 1;
    else if (m_eddi && (rd_eddi || mbist_mode)) m_eddi = 0;
  end

  initial begin
    int outstanding;
    repeat (2) @(negedge clk);
    rst_n = 1;
    plch_en = 1;
    outstanding = 0;
    for (int n = 0; n < 4000; n++) begin
      @(posedge clk); #1;
      if (!nrm_req || nrm_take) begin
        // new request: stores to original addresses are followed later by
        // their EDDI-V stores, as an EDDI-V transformed test does
        nrm_req = ($urandom_range(0, 2) == 0);
        nrm_we = 0; nrm_is_orig = 0; nrm_is_eddi = 0;
        if (nrm_req && $urandom_range(0, 1) == 1 && !mbist_mode) begin
          nrm_we = 1;
          if (outstanding > 0 && $urandom_range(0, 1) == 1) begin nrm_is_eddi = 1; outstanding--; end
          else if ($urandom_range(0, 2) != 0) begin nrm_is_orig = 1; outstanding++; end
        end
      end
      if (n % 500 == 0) op_cnt_min = OW'($urandom_range(0, 6));
      mbist_mode = (n % 1000) > 960;
    end
    // drain stores, then measure the idle checking rate
    mbist_mode = 0;
    nrm_req = 1; nrm_we = 1; nrm_is_orig = 0;
    while (m_st != 0) begin
      nrm_is_eddi = (m_st > 0); nrm_is_orig = (m_st < 0);
      @(posedge clk); #1;
    end
    @(posedge clk); #1;
    nrm_req = 0; nrm_is_eddi = 0; op_cnt_min = 0; mbist_mode = 0;
    repeat (4) @(posedge clk);
    #1;
    begin
      int s0;
      s0 = n_start;
      repeat (400) @(posedge clk);
      chk(n_start - s0 == 100, $sformatf("idle rate: %0d operations in 400 cycles", n_start - s0));
    end
    chk(n_held_st > 0, "ST_cnt hold seen");
    chk(n_held_op > 0, "OP_cnt_min hold seen");
    $display("starts=%0d held_st=%0d held_op=%0d", n_start, n_held_st, n_held_op);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
