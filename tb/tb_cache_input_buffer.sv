// tb_cache_input_buffer: self-checking test of cache_input_buffer.
//
// Fills the buffer with no draining and checks that exactly DEPTH (8)
// operations are accepted before the requester is stalled, then runs
// random push/pop traffic against a queue model, checking order, contents,
// the full/empty flags and the occupancy count.
module tb_cache_input_buffer;
  localparam int unsigned ADDR_W = 16, LW = 32, DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_we = 0, out_valid, out_ready = 0, out_we;
  logic [ADDR_W-1:0] in_addr = '0, out_addr;
  logic [LW-1:0] in_wdata = '0, out_wdata;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  typedef struct packed { logic we; logic [ADDR_W-1:0] a; logic [LW-1:0] d; } ent_t;
  ent_t q[$];

  cache_input_buffer #(.ADDR_W(ADDR_W), .LINE_BITS(LW), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int accepted, stalls;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // fill without draining
    accepted = 0; stalls = 0;
    for (int i = 0; i < 12; i++) begin
      @(negedge clk);
      in_valid = 1; in_we = i[0]; in_addr = ADDR_W'(i * 3); in_wdata = LW'(i * 77);
      if (in_ready) accepted++;
      else stalls++;
    end
    @(negedge clk); in_valid = 0;
    chk(accepted == DEPTH, $sformatf("accepted %0d before stall", accepted));
    chk(stalls == 12 - DEPTH, "stalled when full");
    chk(count == DEPTH, "count when full");
    // random traffic
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      chk(in_ready == (q.size() < DEPTH), "in_ready matches model");
      chk(out_valid == (q.size() > 0), "out_valid matches model");
      chk(int'(count) == q.size(), "count matches model");
      if (out_valid) chk({out_we, out_addr, out_wdata} == q[0], "head entry");
      in_valid = ($urandom_range(0, 1) == 1);
      in_we = 1'($urandom()); in_addr = ADDR_W'($urandom()); in_wdata = $urandom();
      out_ready = ($urandom_range(0, 2) != 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model update on the clock edge from the handshakes seen just before it
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) void'(q.pop_front());
    if (in_valid && in_ready) q.push_back({in_we, in_addr, in_wdata});
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
