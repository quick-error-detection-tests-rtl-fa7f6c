// tb_cache_array: self-checking test of cache_array.
//
// Runs random whole-line loads and stores over a few tags that alias onto a
// small array (READ_LAT = 2, 16 entries) and compares hit/data with a
// reference model kept in the testbench. Also checks the read latency (data
// exactly READ_LAT cycles after the access) and that busy stays high for
// READ_LAT-1 cycles after each access.
module tb_cache_array;
  localparam int unsigned ADDR_W = 20, LB = 16, ENT = 16, LAT = 2, LW = 8 * LB;
  logic clk = 0, rst_n = 0;
  logic en = 0, we = 0, busy, rvalid, rhit;
  logic [ADDR_W-1:0] addr = '0;
  logic [LW-1:0] wdata = '0, rdata;
  int checks = 0, failures = 0;

  cache_array #(.ADDR_W(ADDR_W), .LINE_BYTES(LB), .ENTRIES(ENT), .READ_LAT(LAT)) dut (.*);

  always #5 clk = ~clk;

  // reference model
  logic [LW-1:0] m_data [ENT];
  logic [ADDR_W-1:0] m_tagaddr [ENT];
  logic m_vld [ENT];

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic access(input logic w, input logic [ADDR_W-1:0] a, input logic [LW-1:0] d);
    int idx, lat;
    logic exp_hit;
    idx = int'(a[$clog2(LB) +: $clog2(ENT)]);
    @(negedge clk);
    chk(!busy, "array idle before access");
    en = 1; we = w; addr = a; wdata = d;
    exp_hit = m_vld[idx] && (m_tagaddr[idx][ADDR_W-1:$clog2(LB)+$clog2(ENT)] == a[ADDR_W-1:$clog2(LB)+$clog2(ENT)]);
    if (w) begin m_data[idx] = d; m_tagaddr[idx] = a; m_vld[idx] = 1; end
    @(negedge clk);
    en = 0;
    chk(busy == (LAT > 1), "busy after access");
    if (!w) begin
      lat = 1;
      while (!rvalid && lat < 10) begin @(negedge clk); lat++; end
      chk(lat == LAT, $sformatf("read latency %0d", lat));
      chk(rhit == exp_hit, $sformatf("hit %0b exp %0b addr %h", rhit, exp_hit, a));
      if (exp_hit) chk(rdata == m_data[idx], "read data");
    end else begin
      repeat (LAT - 1) @(negedge clk);
    end
  endtask

  initial begin
    for (int i = 0; i < ENT; i++) m_vld[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      logic [ADDR_W-1:0] a;
      a = ADDR_W'(($urandom_range(0, 3) << ($clog2(LB) + $clog2(ENT))) | ($urandom_range(0, ENT - 1) << $clog2(LB)) | $urandom_range(0, LB - 1));
      access($urandom_range(0, 2) == 0, a, {4{$urandom()}});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
