// tb_plch_comparator: self-checking test of plch_comparator.
//
// Random reference/current lines (half of them equal, some differing in a
// single bit) with random hit flags; checks done, skip and error against
// the rule: compare only when both reads hit, error on any difference.
module tb_plch_comparator;
  localparam int unsigned LW = 128;
  logic cmp_en, ref_hit, cur_hit, done, skip, error;
  logic [LW-1:0] ref_data, cur_data;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  plch_comparator #(.LINE_BITS(LW)) dut (.*);

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int n = 0; n < 1000; n++) begin
      logic same, both;
      cmp_en = ($urandom_range(0, 3) != 0);
      ref_hit = ($urandom_range(0, 3) != 0); cur_hit = ($urandom_range(0, 3) != 0);
      ref_data = {4{$urandom()}};
      same = 1'($urandom());
      cur_data = same ? ref_data : ref_data ^ (LW'(1) << $urandom_range(0, LW - 1));
      @(posedge clk);
      both = ref_hit && cur_hit;
      chk(done == (cmp_en && both), "done");
      chk(skip == (cmp_en && !both), "skip");
      chk(error == (cmp_en && both && !same), "error");
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
