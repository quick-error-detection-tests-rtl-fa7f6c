// plch_cache_unit: a cache memory array with its input buffer and PLC-H checker.
//
// Normal loads and stores enter the input buffer (BUF_DEPTH entries) and
// are issued to the array one at a time whenever the array is in normal
// mode and free. While the checker performs a PLC operation, or while the
// memory BIST engine owns the array, operations wait in the buffer; when the
// buffer is full, req_ready drops and the requester stalls. The checker
// watches the buffer head as the array's enable for its "no operation in
// progress" rule.
//
// Interface: req_* is a valid/ready load/store port (whole-line stores);
// a load's result appears on rsp_valid/rsp_hit/rsp_rdata READ_LAT cycles
// after it leaves the buffer, in order. mbist_* is the MBIST engine's side
// of the array multiplexers; mbist_rvalid/mbist_rdata return its reads.
// cfg_* programs the checker. The per-array buffer and the valid/ready
// handshake are this design's choices.
module plch_cache_unit
  import fastqed_pkg::*;
#(
  parameter int unsigned ADDR_W     = 40,
  parameter int unsigned LINE_BYTES = 16,
  parameter int unsigned ENTRIES    = 512,
  parameter int unsigned READ_LAT   = 1,
  parameter int unsigned BUF_DEPTH  = 8,
  parameter int unsigned CHUNK      = 32'h1000,
  parameter int unsigned OPCNT_W    = 16,
  parameter int unsigned STCNT_W    = 16,
  parameter logic [ADDR_W-1:0] WIN_BASE = '0,
  parameter logic [ADDR_W-1:0] WIN_LAST = '1,
  localparam int unsigned LINE_BITS = 8 * LINE_BYTES
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 req_valid,
  output logic                 req_ready,
  input  logic                 req_we,
  input  logic [ADDR_W-1:0]    req_addr,
  input  logic [LINE_BITS-1:0] req_wdata,
  output logic                 rsp_valid,
  output logic                 rsp_hit,
  output logic [LINE_BITS-1:0] rsp_rdata,
  input  logic                 mbist_mode,
  input  logic                 mbist_en,
  input  logic                 mbist_we,
  input  logic [ADDR_W-1:0]    mbist_addr,
  input  logic [LINE_BITS-1:0] mbist_wdata,
  output logic                 mbist_rvalid,
  output logic [LINE_BITS-1:0] mbist_rdata,
  input  logic                 cfg_we,
  input  cfg_reg_e             cfg_reg,
  input  logic [ADDR_W-1:0]    cfg_wdata,
  output array_mode_e          mode,
  output logic                 err_pulse,
  output logic                 err_sticky,
  output logic                 ev_start,
  output logic                 ev_cmp_done,
  output logic                 ev_cmp_skip,
  output logic                 ev_held_st,
  output logic                 ev_held_op
);

  logic                 b_valid, b_ready, b_we;
  logic [ADDR_W-1:0]    b_addr;
  logic [LINE_BITS-1:0] b_wdata;
  logic [$clog2(BUF_DEPTH+1)-1:0] b_count;

  cache_input_buffer #(.ADDR_W(ADDR_W), .LINE_BITS(LINE_BITS), .DEPTH(BUF_DEPTH)) u_buf (
    .clk, .rst_n,
    .in_valid (req_valid), .in_ready (req_ready), .in_we (req_we),
    .in_addr  (req_addr),  .in_wdata (req_wdata),
    .out_valid (b_valid), .out_ready (b_ready), .out_we (b_we),
    .out_addr  (b_addr),  .out_wdata (b_wdata),
    .count     (b_count)
  );

  logic                 a_en, a_we, a_busy, a_rvalid, a_rhit;
  logic [ADDR_W-1:0]    a_addr;
  logic [LINE_BITS-1:0] a_wdata, a_rdata;

  plch_checker #(
    .ADDR_W(ADDR_W), .LINE_BYTES(LINE_BYTES), .READ_LAT(READ_LAT), .CHUNK(CHUNK),
    .OPCNT_W(OPCNT_W), .STCNT_W(STCNT_W), .WIN_BASE(WIN_BASE), .WIN_LAST(WIN_LAST)
  ) u_chk (
    .clk, .rst_n,
    .cfg_we, .cfg_reg, .cfg_wdata,
    .nrm_req (b_valid), .nrm_we (b_we), .nrm_addr (b_addr), .nrm_wdata (b_wdata),
    .nrm_ready (b_ready),
    .mbist_mode, .mbist_en, .mbist_we, .mbist_addr, .mbist_wdata,
    .arr_en (a_en), .arr_we (a_we), .arr_addr (a_addr), .arr_wdata (a_wdata),
    .arr_busy (a_busy), .arr_rvalid (a_rvalid), .arr_rhit (a_rhit), .arr_rdata (a_rdata),
    .mode, .err_pulse, .err_sticky,
    .ev_start, .ev_cmp_done, .ev_cmp_skip, .ev_held_st, .ev_held_op
  );

  cache_array #(
    .ADDR_W(ADDR_W), .LINE_BYTES(LINE_BYTES), .ENTRIES(ENTRIES), .READ_LAT(READ_LAT)
  ) u_arr (
    .clk, .rst_n,
    .en (a_en), .we (a_we), .addr (a_addr), .wdata (a_wdata),
    .busy (a_busy), .rvalid (a_rvalid), .rhit (a_rhit), .rdata (a_rdata)
  );

  // Tag normal loads so that their results are told apart from checker reads.
  logic [READ_LAT-1:0] ld_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ld_d <= '0;
    else begin
      ld_d[0] <= b_valid && b_ready && !b_we;
      for (int i = 1; i < READ_LAT; i++) ld_d[i] <= ld_d[i-1];
    end
  end

  assign rsp_valid    = ld_d[READ_LAT-1] && a_rvalid;
  assign rsp_hit      = a_rhit;
  assign rsp_rdata    = a_rdata;
  assign mbist_rvalid = mbist_mode && a_rvalid;
  assign mbist_rdata  = a_rdata;

endmodule
