// plch_checker: one PLC-H (Proactive Load and Check, hardware) checker.
//
// The checker shares a cache memory array with normal traffic. When its
// controller finds the array idle, the operation count high enough and no
// original store waiting for its duplicate, it switches the array to PLC-H
// mode, reads the current original line A into the data register, reads
// the EDDI-V line A+CHUNK and compares the two. A mismatch sets the sticky
// error flag that the on-chip debug logic reads. If either line is not in
// the array (tag miss) the comparison is skipped. The address generator
// then moves to the next original line of the programmed range.
//
// Parts: plch_controller, plch_addr_gen, plch_data_reg, plch_comparator and
// plch_mode_mux, plus the debugger-written configuration registers
// (fastqed_pkg::cfg_reg_e: ORIG_LO, ORIG_HI, OP_MIN, CTRL with bit 0 =
// enable and bit 1 = clear error; this register map is this design's own).
// MBIST mode (mbist_mode high) gives the array to the memory BIST engine
// and stops all checking.
//
// Timing: the array returns read data READ_LAT cycles after a read; the
// checker delays its own read strobes by READ_LAT to load the data register
// and to compare. nrm_ready tells the input buffer that a normal access can
// be issued this cycle. Any configuration write restarts the address walk;
// ranges should be programmed while the checker is disabled.
module plch_checker
  import fastqed_pkg::*;
#(
  parameter int unsigned ADDR_W     = 40,
  parameter int unsigned LINE_BYTES = 16,
  parameter int unsigned READ_LAT   = 1,
  parameter int unsigned CHUNK      = 32'h1000,
  parameter int unsigned OPCNT_W    = 16,
  parameter int unsigned STCNT_W    = 16,
  parameter logic [ADDR_W-1:0] WIN_BASE = '0,
  parameter logic [ADDR_W-1:0] WIN_LAST = '1,
  localparam int unsigned LINE_BITS = 8 * LINE_BYTES
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // debugger configuration
  input  logic                 cfg_we,
  input  cfg_reg_e             cfg_reg,
  input  logic [ADDR_W-1:0]    cfg_wdata,
  // normal access waiting at the array input (head of the input buffer)
  input  logic                 nrm_req,
  input  logic                 nrm_we,
  input  logic [ADDR_W-1:0]    nrm_addr,
  input  logic [LINE_BITS-1:0] nrm_wdata,
  output logic                 nrm_ready,
  // MBIST engine side
  input  logic                 mbist_mode,
  input  logic                 mbist_en,
  input  logic                 mbist_we,
  input  logic [ADDR_W-1:0]    mbist_addr,
  input  logic [LINE_BITS-1:0] mbist_wdata,
  // cache memory array
  output logic                 arr_en,
  output logic                 arr_we,
  output logic [ADDR_W-1:0]    arr_addr,
  output logic [LINE_BITS-1:0] arr_wdata,
  input  logic                 arr_busy,
  input  logic                 arr_rvalid,
  input  logic                 arr_rhit,
  input  logic [LINE_BITS-1:0] arr_rdata,
  // results and events
  output array_mode_e          mode,
  output logic                 err_pulse,
  output logic                 err_sticky,
  output logic                 ev_start,
  output logic                 ev_cmp_done,
  output logic                 ev_cmp_skip,
  output logic                 ev_held_st,
  output logic                 ev_held_op
);

  // ---------------- configuration registers ----------------
  logic [ADDR_W-1:0]  orig_lo, orig_hi;
  logic [OPCNT_W-1:0] op_min;
  logic               enable, clr_err;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      orig_lo <= '0;
      orig_hi <= '0;
      op_min  <= '0;
      enable  <= 1'b0;
    end else if (cfg_we) begin
      unique case (cfg_reg)
        CFG_ORIG_LO: orig_lo <= cfg_wdata;
        CFG_ORIG_HI: orig_hi <= cfg_wdata;
        CFG_OP_MIN:  op_min  <= cfg_wdata[OPCNT_W-1:0];
        CFG_CTRL:    enable  <= cfg_wdata[0];
        default: ;
      endcase
    end
  end
  assign clr_err = cfg_we && (cfg_reg == CFG_CTRL) && cfg_wdata[1];

  // ---------------- controller and address generator ----------------
  logic plch_active, rd_orig, rd_eddi, advance, rng_valid;
  logic nrm_take, is_orig, is_eddi;
  logic [ADDR_W-1:0] gen_addr, orig_addr;
  logic [OPCNT_W-1:0] op_cnt;
  logic signed [STCNT_W-1:0] st_cnt;

  assign mode      = mbist_mode ? MODE_MBIST : (plch_active ? MODE_PLCH : MODE_NORMAL);
  assign nrm_ready = (mode == MODE_NORMAL) && !arr_busy;
  assign nrm_take  = nrm_req && nrm_ready;

  plch_addr_gen #(
    .ADDR_W(ADDR_W), .LINE_BYTES(LINE_BYTES), .CHUNK(CHUNK),
    .WIN_BASE(WIN_BASE), .WIN_LAST(WIN_LAST)
  ) u_agen (
    .clk, .rst_n,
    .orig_lo, .orig_hi,
    .reload   (cfg_we),
    .capture  (rd_orig),
    .advance,
    .sel_eddi (rd_eddi),
    .gen_addr, .orig_addr, .rng_valid,
    .mon_addr    (nrm_addr),
    .mon_is_orig (is_orig),
    .mon_is_eddi (is_eddi)
  );

  plch_controller #(.OPCNT_W(OPCNT_W), .STCNT_W(STCNT_W)) u_ctrl (
    .clk, .rst_n,
    .plch_en     (enable),
    .mbist_mode,
    .rng_valid,
    .op_cnt_min  (op_min),
    .nrm_req,
    .nrm_take,
    .nrm_we,
    .nrm_is_orig (is_orig),
    .nrm_is_eddi (is_eddi),
    .arr_busy,
    .plch_active, .rd_orig, .rd_eddi, .advance,
    .start       (ev_start),
    .held_by_st  (ev_held_st),
    .held_by_op  (ev_held_op),
    .op_cnt, .st_cnt
  );

  // ---------------- array input multiplexers ----------------
  plch_mode_mux #(.ADDR_W(ADDR_W), .LINE_BITS(LINE_BITS)) u_mux (
    .mode,
    .nrm_en      (nrm_take),
    .nrm_we, .nrm_addr, .nrm_wdata,
    .plch_en     (rd_orig || rd_eddi),
    .plch_addr   (gen_addr),
    .mbist_en, .mbist_we, .mbist_addr, .mbist_wdata,
    .arr_en, .arr_we, .arr_addr, .arr_wdata
  );

  // ---------------- read-data alignment ----------------
  logic [READ_LAT-1:0] orig_d, eddi_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      orig_d <= '0;
      eddi_d <= '0;
    end else begin
      orig_d[0] <= rd_orig && !mbist_mode;
      eddi_d[0] <= rd_eddi;
      for (int i = 1; i < READ_LAT; i++) begin
        orig_d[i] <= orig_d[i-1];
        eddi_d[i] <= eddi_d[i-1];
      end
    end
  end

  logic [LINE_BITS-1:0] ref_data;
  logic                 ref_hit;

  plch_data_reg #(.LINE_BITS(LINE_BITS)) u_dreg (
    .clk, .rst_n,
    .load   (orig_d[READ_LAT-1] && arr_rvalid),
    .d      (arr_rdata),
    .hit_in (arr_rhit),
    .q      (ref_data),
    .q_hit  (ref_hit)
  );

  plch_comparator #(.LINE_BITS(LINE_BITS)) u_cmp (
    .cmp_en   (eddi_d[READ_LAT-1] && arr_rvalid),
    .ref_data, .ref_hit,
    .cur_data (arr_rdata),
    .cur_hit  (arr_rhit),
    .done     (ev_cmp_done),
    .skip     (ev_cmp_skip),
    .error    (err_pulse)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         err_sticky <= 1'b0;
    else if (err_pulse) err_sticky <= 1'b1;
    else if (clr_err)   err_sticky <= 1'b0;
  end

endmodule
