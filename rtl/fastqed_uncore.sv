// fastqed_uncore: cache subsystem of an OpenSPARC T2-like multi-core SoC
// with hardware Proactive Load and Check (PLC-H) checkers for Fast QED.
//
// Fast QED (Quick Error Detection) tests duplicate every variable of a
// validation test: the copy of the variable at address A lives at A+CHUNK
// and every store is repeated on the copy. Instead of software loops that
// reload and compare both copies, a small checker beside each cache memory
// array does it in idle array cycles, so that a bug in a cache controller,
// memory controller or interconnect that corrupts, drops or delays data is
// caught within a few thousand cycles.
//
// This top holds the arrays that carry checkers in the target SoC:
//   - N_CORES private L1 data-cache arrays (512 entries of 16 bytes, one
//     read per cycle), one checker each;
//   - N_L2_BANKS L2 banks of L2_ARRAYS_PER_BANK arrays (512 entries of 64
//     bytes, two cycles per read), one checker per array.
// With the defaults that is 8 + 8*16 = 136 checkers, all working at once.
// The cores, the crossbar, the cache controllers, the memory controllers
// and the MBIST engines are outside this design: every array's load/store
// port and MBIST port is a top-level port.
//
// Checker numbering for the configuration bus and the error/event vectors:
// ids 0..N_CORES-1 are the L1 checkers, id N_CORES + bank*L2_ARRAYS_PER_BANK
// + array the L2 checkers. L2 port index is bank*L2_ARRAYS_PER_BANK + array.
// cfg_* is a write-only register bus standing in for the JTAG debugger.
module fastqed_uncore
  import fastqed_pkg::*;
#(
  parameter int unsigned N_CORES            = 8,
  parameter int unsigned N_L2_BANKS         = 8,
  parameter int unsigned L2_ARRAYS_PER_BANK = 16,
  parameter int unsigned ADDR_W             = ADDR_W_DEF,
  parameter int unsigned L1_LINE_B          = L1_LINE_BYTES,
  parameter int unsigned L2_LINE_B          = L2_LINE_BYTES,
  parameter int unsigned ENTRIES            = ENTRIES_DEF,
  parameter int unsigned BUF_DEPTH          = BUF_DEPTH_DEF,
  parameter int unsigned CHUNK              = CHUNK_DEF,
  localparam int unsigned L1W   = 8 * L1_LINE_B,
  localparam int unsigned L2W   = 8 * L2_LINE_B,
  localparam int unsigned N_L2  = N_L2_BANKS * L2_ARRAYS_PER_BANK,
  localparam int unsigned N_CHK = N_CORES + N_L2,
  localparam int unsigned ID_W  = $clog2(N_CHK),
  localparam int unsigned AI_W  = (L2_ARRAYS_PER_BANK > 1) ? $clog2(L2_ARRAYS_PER_BANK) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // L1 data-cache array ports (one per core)
  input  logic [N_CORES-1:0]            l1_req_valid,
  output logic [N_CORES-1:0]            l1_req_ready,
  input  logic [N_CORES-1:0]            l1_req_we,
  input  logic [N_CORES-1:0][ADDR_W-1:0] l1_req_addr,
  input  logic [N_CORES-1:0][L1W-1:0]   l1_req_wdata,
  output logic [N_CORES-1:0]            l1_rsp_valid,
  output logic [N_CORES-1:0]            l1_rsp_hit,
  output logic [N_CORES-1:0][L1W-1:0]   l1_rsp_rdata,
  input  logic [N_CORES-1:0]            l1_mbist_mode,
  input  logic [N_CORES-1:0]            l1_mbist_en,
  input  logic [N_CORES-1:0]            l1_mbist_we,
  input  logic [N_CORES-1:0][ADDR_W-1:0] l1_mbist_addr,
  input  logic [N_CORES-1:0][L1W-1:0]   l1_mbist_wdata,
  output logic [N_CORES-1:0]            l1_mbist_rvalid,
  output logic [N_CORES-1:0][L1W-1:0]   l1_mbist_rdata,
  // L2 array ports (bank-major)
  input  logic [N_L2-1:0]               l2_req_valid,
  output logic [N_L2-1:0]               l2_req_ready,
  input  logic [N_L2-1:0]               l2_req_we,
  input  logic [N_L2-1:0][ADDR_W-1:0]   l2_req_addr,
  input  logic [N_L2-1:0][L2W-1:0]      l2_req_wdata,
  output logic [N_L2-1:0]               l2_rsp_valid,
  output logic [N_L2-1:0]               l2_rsp_hit,
  output logic [N_L2-1:0][L2W-1:0]      l2_rsp_rdata,
  input  logic [N_L2-1:0]               l2_mbist_mode,
  input  logic [N_L2-1:0]               l2_mbist_en,
  input  logic [N_L2-1:0]               l2_mbist_we,
  input  logic [N_L2-1:0][ADDR_W-1:0]   l2_mbist_addr,
  input  logic [N_L2-1:0][L2W-1:0]      l2_mbist_wdata,
  output logic [N_L2-1:0]               l2_mbist_rvalid,
  output logic [N_L2-1:0][L2W-1:0]      l2_mbist_rdata,
  // debugger side
  input  logic                          cfg_we,
  input  logic [ID_W-1:0]               cfg_id,
  input  cfg_reg_e                      cfg_reg,
  input  logic [ADDR_W-1:0]             cfg_wdata,
  output logic [N_CHK-1:0]              err_sticky,
  output logic                          err_any,
  // per-checker event strobes (observation / performance counting)
  output logic [N_CHK-1:0]              ev_start,
  output logic [N_CHK-1:0]              ev_cmp_done,
  output logic [N_CHK-1:0]              ev_cmp_skip,
  output logic [N_CHK-1:0]              ev_error,
  output logic [N_CHK-1:0]              ev_held_st,
  output logic [N_CHK-1:0]              ev_held_op
);

  // ---------------- L1 data caches ----------------
  for (genvar c = 0; c < N_CORES; c++) begin : g_l1
    array_mode_e mode_unused;
    plch_cache_unit #(
      .ADDR_W(ADDR_W), .LINE_BYTES(L1_LINE_B), .ENTRIES(ENTRIES), .READ_LAT(L1_READ_LAT),
      .BUF_DEPTH(BUF_DEPTH), .CHUNK(CHUNK)
    ) u_l1 (
      .clk, .rst_n,
      .req_valid (l1_req_valid[c]), .req_ready (l1_req_ready[c]), .req_we (l1_req_we[c]),
      .req_addr  (l1_req_addr[c]),  .req_wdata (l1_req_wdata[c]),
      .rsp_valid (l1_rsp_valid[c]), .rsp_hit (l1_rsp_hit[c]), .rsp_rdata (l1_rsp_rdata[c]),
      .mbist_mode (l1_mbist_mode[c]), .mbist_en (l1_mbist_en[c]), .mbist_we (l1_mbist_we[c]),
      .mbist_addr (l1_mbist_addr[c]), .mbist_wdata (l1_mbist_wdata[c]),
      .mbist_rvalid (l1_mbist_rvalid[c]), .mbist_rdata (l1_mbist_rdata[c]),
      .cfg_we    (cfg_we && (cfg_id == ID_W'(c))),
      .cfg_reg, .cfg_wdata,
      .mode      (mode_unused),
      .err_pulse (ev_error[c]), .err_sticky (err_sticky[c]),
      .ev_start  (ev_start[c]), .ev_cmp_done (ev_cmp_done[c]), .ev_cmp_skip (ev_cmp_skip[c]),
      .ev_held_st (ev_held_st[c]), .ev_held_op (ev_held_op[c])
    );
  end

  // ---------------- L2 banks ----------------
  for (genvar b = 0; b < N_L2_BANKS; b++) begin : g_l2
    localparam int unsigned LO = b * L2_ARRAYS_PER_BANK;
    localparam int unsigned ID0 = N_CORES + LO;
    logic bank_sel, bank_err;
    array_mode_e [L2_ARRAYS_PER_BANK-1:0] mode_unused;
    logic [ID_W-1:0] rel_id;
    assign rel_id   = cfg_id - ID_W'(ID0);
    assign bank_sel = (cfg_id >= ID_W'(ID0)) && (rel_id < ID_W'(L2_ARRAYS_PER_BANK));

    l2_bank #(
      .BANK_ID(b), .ARRAYS(L2_ARRAYS_PER_BANK), .ADDR_W(ADDR_W), .LINE_BYTES(L2_LINE_B),
      .ENTRIES(ENTRIES), .READ_LAT(L2_READ_LAT), .BUF_DEPTH(BUF_DEPTH), .CHUNK(CHUNK)
    ) u_bank (
      .clk, .rst_n,
      .req_valid (l2_req_valid[LO +: L2_ARRAYS_PER_BANK]),
      .req_ready (l2_req_ready[LO +: L2_ARRAYS_PER_BANK]),
      .req_we    (l2_req_we[LO +: L2_ARRAYS_PER_BANK]),
      .req_addr  (l2_req_addr[LO +: L2_ARRAYS_PER_BANK]),
      .req_wdata (l2_req_wdata[LO +: L2_ARRAYS_PER_BANK]),
      .rsp_valid (l2_rsp_valid[LO +: L2_ARRAYS_PER_BANK]),
      .rsp_hit   (l2_rsp_hit[LO +: L2_ARRAYS_PER_BANK]),
      .rsp_rdata (l2_rsp_rdata[LO +: L2_ARRAYS_PER_BANK]),
      .mbist_mode   (l2_mbist_mode[LO +: L2_ARRAYS_PER_BANK]),
      .mbist_en     (l2_mbist_en[LO +: L2_ARRAYS_PER_BANK]),
      .mbist_we     (l2_mbist_we[LO +: L2_ARRAYS_PER_BANK]),
      .mbist_addr   (l2_mbist_addr[LO +: L2_ARRAYS_PER_BANK]),
      .mbist_wdata  (l2_mbist_wdata[LO +: L2_ARRAYS_PER_BANK]),
      .mbist_rvalid (l2_mbist_rvalid[LO +: L2_ARRAYS_PER_BANK]),
      .mbist_rdata  (l2_mbist_rdata[LO +: L2_ARRAYS_PER_BANK]),
      .cfg_we    (cfg_we && bank_sel),
      .cfg_idx   (AI_W'(rel_id)),
      .cfg_reg, .cfg_wdata,
      .mode      (mode_unused),
      .err_sticky  (err_sticky[ID0 +: L2_ARRAYS_PER_BANK]),
      .err_any     (bank_err),
      .ev_start    (ev_start[ID0 +: L2_ARRAYS_PER_BANK]),
      .ev_cmp_done (ev_cmp_done[ID0 +: L2_ARRAYS_PER_BANK]),
      .ev_cmp_skip (ev_cmp_skip[ID0 +: L2_ARRAYS_PER_BANK]),
      .ev_error    (ev_error[ID0 +: L2_ARRAYS_PER_BANK]),
      .ev_held_st  (ev_held_st[ID0 +: L2_ARRAYS_PER_BANK]),
      .ev_held_op  (ev_held_op[ID0 +: L2_ARRAYS_PER_BANK])
    );
  end

  assign err_any = |err_sticky;

endmodule
