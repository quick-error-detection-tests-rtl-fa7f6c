// l2_bank: one bank of the shared L2 cache with a PLC-H checker per array.
//
// A bank is built from ARRAYS separate memory arrays (16 in the target
// SoC), each with its own input buffer and PLC-H checker, so that all
// arrays of the bank are checked at the same time. Array a of bank b caches
// the ARRAY_BYTES-byte address window starting at (b*ARRAYS + a) *
// ARRAY_BYTES (array 0 of bank 0 holds 0x0000-0x7FFF); each checker only
// walks the original lines that fall in its own window. The bank decodes
// the checker-configuration bus (cfg_idx picks the array) and ORs the
// error flags. Routing of requests to the arrays by address belongs to the
// crossbar and the L2 controller, outside this design, so each array's
// load/store port is brought out.
//
// Interface and timing per array are those of plch_cache_unit (READ_LAT
// = 2: an L2 entry takes two cycles to read).
module l2_bank
  import fastqed_pkg::*;
#(
  parameter int unsigned BANK_ID    = 0,
  parameter int unsigned ARRAYS     = 16,
  parameter int unsigned ADDR_W     = ADDR_W_DEF,
  parameter int unsigned LINE_BYTES = L2_LINE_BYTES,
  parameter int unsigned ENTRIES    = ENTRIES_DEF,
  parameter int unsigned READ_LAT   = L2_READ_LAT,
  parameter int unsigned BUF_DEPTH  = BUF_DEPTH_DEF,
  parameter int unsigned CHUNK      = CHUNK_DEF,
  localparam int unsigned LINE_BITS = 8 * LINE_BYTES,
  localparam int unsigned IDX_W     = (ARRAYS > 1) ? $clog2(ARRAYS) : 1
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic [ARRAYS-1:0]                    req_valid,
  output logic [ARRAYS-1:0]                    req_ready,
  input  logic [ARRAYS-1:0]                    req_we,
  input  logic [ARRAYS-1:0][ADDR_W-1:0]        req_addr,
  input  logic [ARRAYS-1:0][LINE_BITS-1:0]     req_wdata,
  output logic [ARRAYS-1:0]                    rsp_valid,
  output logic [ARRAYS-1:0]                    rsp_hit,
  output logic [ARRAYS-1:0][LINE_BITS-1:0]     rsp_rdata,
  input  logic [ARRAYS-1:0]                    mbist_mode,
  input  logic [ARRAYS-1:0]                    mbist_en,
  input  logic [ARRAYS-1:0]                    mbist_we,
  input  logic [ARRAYS-1:0][ADDR_W-1:0]        mbist_addr,
  input  logic [ARRAYS-1:0][LINE_BITS-1:0]     mbist_wdata,
  output logic [ARRAYS-1:0]                    mbist_rvalid,
  output logic [ARRAYS-1:0][LINE_BITS-1:0]     mbist_rdata,
  input  logic                                 cfg_we,
  input  logic [IDX_W-1:0]                     cfg_idx,
  input  cfg_reg_e                             cfg_reg,
  input  logic [ADDR_W-1:0]                    cfg_wdata,
  output array_mode_e [ARRAYS-1:0]             mode,
  output logic [ARRAYS-1:0]                    err_sticky,
  output logic                                 err_any,
  output logic [ARRAYS-1:0]                    ev_start,
  output logic [ARRAYS-1:0]                    ev_cmp_done,
  output logic [ARRAYS-1:0]                    ev_cmp_skip,
  output logic [ARRAYS-1:0]                    ev_error,
  output logic [ARRAYS-1:0]                    ev_held_st,
  output logic [ARRAYS-1:0]                    ev_held_op
);

  localparam longint unsigned ARRAY_BYTES = longint'(LINE_BYTES) * longint'(ENTRIES);

  for (genvar a = 0; a < ARRAYS; a++) begin : g_arr
    localparam longint unsigned BASE = (longint'(BANK_ID) * ARRAYS + a) * ARRAY_BYTES;
    plch_cache_unit #(
      .ADDR_W(ADDR_W), .LINE_BYTES(LINE_BYTES), .ENTRIES(ENTRIES), .READ_LAT(READ_LAT),
      .BUF_DEPTH(BUF_DEPTH), .CHUNK(CHUNK),
      .WIN_BASE(ADDR_W'(BASE)), .WIN_LAST(ADDR_W'(BASE + ARRAY_BYTES - 1))
    ) u_unit (
      .clk, .rst_n,
      .req_valid (req_valid[a]), .req_ready (req_ready[a]), .req_we (req_we[a]),
      .req_addr  (req_addr[a]),  .req_wdata (req_wdata[a]),
      .rsp_valid (rsp_valid[a]), .rsp_hit (rsp_hit[a]), .rsp_rdata (rsp_rdata[a]),
      .mbist_mode (mbist_mode[a]), .mbist_en (mbist_en[a]), .mbist_we (mbist_we[a]),
      .mbist_addr (mbist_addr[a]), .mbist_wdata (mbist_wdata[a]),
      .mbist_rvalid (mbist_rvalid[a]), .mbist_rdata (mbist_rdata[a]),
      .cfg_we    (cfg_we && (cfg_idx == IDX_W'(a))),
      .cfg_reg, .cfg_wdata,
      .mode      (mode[a]),
      .err_pulse (ev_error[a]), .err_sticky (err_sticky[a]),
      .ev_start  (ev_start[a]), .ev_cmp_done (ev_cmp_done[a]), .ev_cmp_skip (ev_cmp_skip[a]),
      .ev_held_st (ev_held_st[a]), .ev_held_op (ev_held_op[a])
    );
  end

  assign err_any = |err_sticky;

endmodule
