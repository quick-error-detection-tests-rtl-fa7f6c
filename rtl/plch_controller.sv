// plch_controller: the PLC-H controller.
//
// Decides when the checker may take its array for one PLC operation and
// sequences that operation. Following the controller flowchart, every
// normal load/store that the array accepts increments OP_cnt; a store to an
// original address increments ST_cnt and a store to an EDDI-V address
// decrements it. A PLC operation starts only when
//   1. no normal operation is pending at the array (its enable is low) and
//      no array access is in progress,
//   2. OP_cnt >= OP_cnt_min, so checks never crowd out the test, and
//   3. ST_cnt == 0, so no original store is waiting for its duplicate store
//      (EDDI-V stores follow the original stores in the same order).
// The operation clears OP_cnt, switches the array to PLC-H mode, reads the
// current original line and, as soon as the array accepts another access
// (READ_LAT cycles later), the matching EDDI-V line, then advances the
// address generator and hands the array back to normal mode. The data
// register load and the comparison happen READ_LAT cycles after each read
// and are timed by the checker. With OP_cnt_min = 0 and no traffic the array
// is read every cycle (L1) or every other cycle (L2).
//
// The flowchart's ">=" test is used for criterion 2; a start condition that
// needed OP_cnt to equal OP_cnt_min exactly could be missed while ST_cnt is
// non-zero. OP_cnt saturates. Entering MBIST mode abandons an operation.
//
// Timing: go, plch_active and rd_* are combinational from registered state
// and the present inputs; counters update on the rising edge.
module plch_controller #(
  parameter int unsigned OPCNT_W = 16,
  parameter int unsigned STCNT_W = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      plch_en,      // checker enabled by debugger
  input  logic                      mbist_mode,   // MBIST owns the array
  input  logic                      rng_valid,    // address generator has lines
  input  logic [OPCNT_W-1:0]        op_cnt_min,
  input  logic                      nrm_req,      // normal enable at the array input
  input  logic                      nrm_take,     // normal access accepted this cycle
  input  logic                      nrm_we,
  input  logic                      nrm_is_orig,
  input  logic                      nrm_is_eddi,
  input  logic                      arr_busy,
  output logic                      plch_active,  // PLC-H mode this cycle
  output logic                      rd_orig,      // read the original line now
  output logic                      rd_eddi,      // read the EDDI-V line now
  output logic                      advance,      // step the address generator
  output logic                      start,        // a PLC operation begins
  output logic                      held_by_st,   // idle array, but ST_cnt != 0
  output logic                      held_by_op,   // idle array, but OP_cnt < OP_cnt_min
  output logic [OPCNT_W-1:0]        op_cnt,
  output logic signed [STCNT_W-1:0] st_cnt
);

  typedef enum logic [0:0] { S_IDLE, S_EDDI } state_e;
  state_e state;

  logic array_free, st_zero, op_ok;
  assign array_free = !nrm_req && !arr_busy;
  assign st_zero    = (st_cnt == '0);
  assign op_ok      = (op_cnt >= op_cnt_min);

  assign start      = (state == S_IDLE) && plch_en && rng_valid && !mbist_mode
                      && array_free && st_zero && op_ok;
  assign held_by_st = (state == S_IDLE) && plch_en && rng_valid && !mbist_mode
                      && array_free && !st_zero;
  assign held_by_op = (state == S_IDLE) && plch_en && rng_valid && !mbist_mode
                      && array_free && st_zero && !op_ok;

  assign rd_orig     = start;
  assign rd_eddi     = (state == S_EDDI) && !mbist_mode && !arr_busy;
  assign advance     = rd_eddi;
  assign plch_active = start || ((state == S_EDDI) && !mbist_mode);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
    end else begin
      unique case (state)
        S_IDLE: if (start) state <= S_EDDI;
        S_EDDI: if (rd_eddi || mbist_mode) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_cnt <= '0;
      st_cnt <= '0;
    end else begin
      if (start)                               op_cnt <= '0;
      else if (nrm_take && (op_cnt != '1))     op_cnt <= op_cnt + 1'b1;
      if (nrm_take && nrm_we && nrm_is_orig)   st_cnt <= st_cnt + 1'b1;
      else if (nrm_take && nrm_we && nrm_is_eddi) st_cnt <= st_cnt - 1'b1;
    end
  end

  a_no_start_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
                                          start |-> !nrm_req && !arr_busy);
  a_one_class: assert property (@(posedge clk) disable iff (!rst_n)
                                !(nrm_is_orig && nrm_is_eddi));

endmodule
