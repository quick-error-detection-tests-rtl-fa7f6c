// plch_data_reg: the PLC-H data register.
//
// Captures the line loaded from an original address when the controller's
// load strobe arrives together with the array's read data, and keeps it for
// the comparison with the EDDI-V line. Besides the data it keeps whether the
// original read hit in the tag entries (this design's choice), so that a
// missing original line cancels the comparison. Loads on the rising edge;
// cleared by reset.
module plch_data_reg #(
  parameter int unsigned LINE_BITS = 128
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic [LINE_BITS-1:0] d,
  input  logic                 hit_in,
  output logic [LINE_BITS-1:0] q,
  output logic                 q_hit
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q     <= '0;
      q_hit <= 1'b0;
    end else if (load) begin
      q     <= d;
      q_hit <= hit_in;
    end
  end

endmodule
