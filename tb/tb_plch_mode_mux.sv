// tb_plch_mode_mux: self-checking test of plch_mode_mux.
//
// Drives random values on the normal, PLC-H and MBIST sources in each mode
// and checks that the array inputs follow the selected source, and that
// PLC-H mode never writes the array.
module tb_plch_mode_mux;
  import fastqed_pkg::*;
  localparam int unsigned ADDR_W = 40, LW = 128;
  array_mode_e mode;
  logic nrm_en, nrm_we, plch_en, mbist_en, mbist_we, arr_en, arr_we;
  logic [ADDR_W-1:0] nrm_addr, plch_addr, mbist_addr, arr_addr;
  logic [LW-1:0] nrm_wdata, mbist_wdata, arr_wdata;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  plch_mode_mux #(.ADDR_W(ADDR_W), .LINE_BITS(LW)) dut (.*);

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int n = 0; n < 300; n++) begin
      int m;
      m = $urandom_range(0, 2);
      mode = array_mode_e'(m);
      nrm_en = 1'($urandom()); nrm_we = 1'($urandom()); plch_en = 1'($urandom());
      mbist_en = 1'($urandom()); mbist_we = 1'($urandom());
      nrm_addr = {$urandom(), $urandom()}; plch_addr = {$urandom(), $urandom()};
      mbist_addr = {$urandom(), $urandom()};
      nrm_wdata = {4{$urandom()}}; mbist_wdata = {4{$urandom()}};
      @(posedge clk);
      case (m)
        0: begin
          chk(arr_en == nrm_en && arr_we == nrm_we, "normal en/we");
          chk(arr_addr == nrm_addr && arr_wdata == nrm_wdata, "normal addr/data");
        end
        1: begin
          chk(arr_en == plch_en && arr_we == 1'b0, "plch en, load only");
          chk(arr_addr == plch_addr, "plch addr");
        end
        default: begin
          chk(arr_en == mbist_en && arr_we == mbist_we, "mbist en/we");
          chk(arr_addr == mbist_addr && arr_wdata == mbist_wdata, "mbist addr/data");
        end
      endcase
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
