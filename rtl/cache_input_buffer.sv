// cache_input_buffer: the input buffer in front of a cache memory array.
//
// Holds pending load/store operations while the array is busy, for example
// while its PLC-H checker performs a PLC operation, so that no operation is
// lost. It is a first-in first-out queue of DEPTH entries (8 in the target
// SoC); when it is full, in_ready drops and the requester is stalled.
// Operations leave in arrival order.
//
// Interface: valid/ready on both sides; an entry moves when valid and ready
// are both high at a rising clock edge. out_* shows the oldest entry with no
// added latency; a pushed entry can leave on the next cycle. The valid/ready
// handshake is this design's choice.
module cache_input_buffer #(
  parameter int unsigned ADDR_W    = 40,
  parameter int unsigned LINE_BITS = 128,
  parameter int unsigned DEPTH     = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic                 in_we,
  input  logic [ADDR_W-1:0]    in_addr,
  input  logic [LINE_BITS-1:0] in_wdata,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic                 out_we,
  output logic [ADDR_W-1:0]    out_addr,
  output logic [LINE_BITS-1:0] out_wdata,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic                 q_we    [DEPTH];
  logic [ADDR_W-1:0]    q_addr  [DEPTH];
  logic [LINE_BITS-1:0] q_wdata [DEPTH];
  logic [PW-1:0]        rd_ptr, wr_ptr;

  logic push, pop;
  assign in_ready  = (count != ($bits(count))'(DEPTH));
  assign out_valid = (count != '0);
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= inc(wr_ptr);
      if (pop)  rd_ptr <= inc(rd_ptr);
      count <= count + $bits(count)'(push) - $bits(count)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) begin
      q_we[wr_ptr]    <= in_we;
      q_addr[wr_ptr]  <= in_addr;
      q_wdata[wr_ptr] <= in_wdata;
    end
  end

  assign out_we    = q_we[rd_ptr];
  assign out_addr  = q_addr[rd_ptr];
  assign out_wdata = q_wdata[rd_ptr];

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) count <= ($bits(count))'(DEPTH));
  a_hold_pending: assert property (@(posedge clk) disable iff (!rst_n)
                                   out_valid && !out_ready |=> out_valid);

endmodule
