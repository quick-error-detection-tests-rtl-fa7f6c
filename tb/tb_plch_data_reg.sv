// tb_plch_data_reg: self-checking test of plch_data_reg.
//
// Checks reset to zero, capture of data and hit flag on load, and that the
// register holds its value while load is low.
module tb_plch_data_reg;
  localparam int unsigned LW = 128;
  logic clk = 0, rst_n = 0, load = 0, hit_in = 0, q_hit;
  logic [LW-1:0] d = '0, q, exp_q;
  logic exp_hit;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  plch_data_reg #(.LINE_BITS(LW)) dut (.*);

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    d = '1; hit_in = 1;
    repeat (2) @(negedge clk);
    chk(q == '0 && !q_hit, "reset value");
    rst_n = 1;
    exp_q = '0; exp_hit = 0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      load = ($urandom_range(0, 2) == 0);
      d = {4{$urandom()}}; hit_in = 1'($urandom());
      if (load) begin exp_q = d; exp_hit = hit_in; end
      @(negedge clk);
      load = 0;
      chk(q == exp_q && q_hit == exp_hit, "register contents");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
