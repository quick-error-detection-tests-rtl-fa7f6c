// plch_comparator: the PLC-H comparator.
//
// When cmp_en is high (the EDDI-V line is on the array output) it compares
// that line with the original line held in the data register. If both reads
// hit, done pulses and error pulses on any difference. If either read
// missed, the variable was not cached and the check is skipped (skip
// pulses). Combinational; the outputs are valid in the cycle of cmp_en.
module plch_comparator #(
  parameter int unsigned LINE_BITS = 128
) (
  input  logic                 cmp_en,
  input  logic [LINE_BITS-1:0] ref_data,
  input  logic                 ref_hit,
  input  logic [LINE_BITS-1:0] cur_data,
  input  logic                 cur_hit,
  output logic                 done,
  output logic                 skip,
  output logic                 error
);

  assign done  = cmp_en && ref_hit && cur_hit;
  assign skip  = cmp_en && !(ref_hit && cur_hit);
  assign error = done && (ref_data != cur_data);

endmodule
