// plch_mode_mux: the multiplexers in front of a cache memory array.
//
// Four multiplexers (address, data_in, enable, load/store) choose which
// source drives the array: normal loads/stores, the PLC-H checker, or the
// memory BIST engine. During normal and MBIST modes the checker performs no
// PLC operation; during PLC-H mode normal operations wait in the input
// buffer. The checker only reads, so its load/store input is a constant
// load. Purely combinational; the mode encoding is from fastqed_pkg.
module plch_mode_mux
  import fastqed_pkg::*;
#(
  parameter int unsigned ADDR_W    = 40,
  parameter int unsigned LINE_BITS = 128
) (
  input  array_mode_e          mode,
  input  logic                 nrm_en,
  input  logic                 nrm_we,
  input  logic [ADDR_W-1:0]    nrm_addr,
  input  logic [LINE_BITS-1:0] nrm_wdata,
  input  logic                 plch_en,
  input  logic [ADDR_W-1:0]    plch_addr,
  input  logic                 mbist_en,
  input  logic                 mbist_we,
  input  logic [ADDR_W-1:0]    mbist_addr,
  input  logic [LINE_BITS-1:0] mbist_wdata,
  output logic                 arr_en,
  output logic                 arr_we,
  output logic [ADDR_W-1:0]    arr_addr,
  output logic [LINE_BITS-1:0] arr_wdata
);

  always_comb begin
    unique case (mode)
      MODE_PLCH: begin
        arr_en    = plch_en;
        arr_we    = 1'b0;
        arr_addr  = plch_addr;
        arr_wdata = nrm_wdata;
      end
      MODE_MBIST: begin
        arr_en    = mbist_en;
        arr_we    = mbist_we;
        arr_addr  = mbist_addr;
        arr_wdata = mbist_wdata;
      end
      default: begin
        arr_en    = nrm_en;
        arr_we    = nrm_we;
        arr_addr  = nrm_addr;
        arr_wdata = nrm_wdata;
      end
    endcase
  end

endmodule
