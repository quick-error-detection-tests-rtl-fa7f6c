// plch_addr_gen: the PLC-H address generator.
//
// Test memory is split into chunks of CHUNK bytes (0x1000 by default) that
// alternate between original variables (even chunks: bit log2(CHUNK) of the
// address clear) and their EDDI-V duplicates (odd chunks); the duplicate of
// the original variable at A lives at A+CHUNK. The debugger programs the
// range [orig_lo, orig_hi] of original variables. This generator walks, one
// cache line per PLC operation, the original lines of that range that this
// array caches (the window WIN_BASE..WIN_LAST), jumping over the EDDI-V
// chunks, and wraps to the first line after the last (wrapping is this
// design's choice). gen_addr is the current original line, or with sel_eddi
// its EDDI-V duplicate.
//
// It also classifies a monitored address: mon_is_orig when it lies in the
// programmed original range and in an even chunk, mon_is_eddi when it is
// the duplicate of such an address. The controller uses this to count
// outstanding original stores.
//
// Timing: capture (the original read of a PLC operation) latches the
// current line, and sel_eddi gives the duplicate of that latched line, so a
// reload in the middle of an operation cannot pair two unrelated lines.
// advance moves to the next line at the rising edge; reload (any
// configuration write) restarts at the first line, and the advance of an
// operation that was in flight during a reload is then ignored. rng_valid
// is low when the programmed range has no original line inside the window.
module plch_addr_gen #(
  parameter int unsigned ADDR_W     = 40,
  parameter int unsigned LINE_BYTES = 16,
  parameter int unsigned CHUNK      = 32'h1000,
  parameter logic [ADDR_W-1:0] WIN_BASE = '0,
  parameter logic [ADDR_W-1:0] WIN_LAST = '1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] orig_lo,
  input  logic [ADDR_W-1:0] orig_hi,
  input  logic              reload,
  input  logic              capture,
  input  logic              advance,
  input  logic              sel_eddi,
  output logic [ADDR_W-1:0] gen_addr,
  output logic [ADDR_W-1:0] orig_addr,
  output logic              rng_valid,
  input  logic [ADDR_W-1:0] mon_addr,
  output logic              mon_is_orig,
  output logic              mon_is_eddi
);

  // One extra bit so that stepping past the top of memory is not lost.
  localparam logic [ADDR_W:0] CH   = (ADDR_W+1)'(CHUNK);
  localparam logic [ADDR_W:0] LINE = (ADDR_W+1)'(LINE_BYTES);

  logic [ADDR_W:0] lo_c, hi_c, lo_a, first, nxt, nxt_skip;
  logic [ADDR_W-1:0] ptr, cur;
  logic              fresh;

  always_comb begin
    lo_c  = {1'b0, (orig_lo > WIN_BASE) ? orig_lo : WIN_BASE};
    hi_c  = {1'b0, (orig_hi < WIN_LAST) ? orig_hi : WIN_LAST};
    lo_a  = lo_c & ~(LINE - 1);
    first = ((lo_a & CH) != '0) ? ((lo_a & ~(CH - 1)) + CH) : lo_a;
    nxt      = {1'b0, ptr} + LINE;
    nxt_skip = ((nxt & CH) != '0) ? nxt + CH : nxt;
  end

  assign rng_valid = (orig_lo <= orig_hi) && (first <= hi_c);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr   <= '0;
      cur   <= '0;
      fresh <= 1'b0;
    end else begin
      if (capture) cur <= ptr;
      if (reload) begin
        ptr   <= first[ADDR_W-1:0];
        fresh <= 1'b1;
      end else if (capture) begin
        fresh <= 1'b0;
      end
      if (!reload && advance && !(fresh && !capture)) begin
        if (nxt_skip > hi_c)       ptr <= first[ADDR_W-1:0];
        else                       ptr <= nxt_skip[ADDR_W-1:0];
      end
    end
  end

  assign orig_addr = ptr;
  assign gen_addr  = sel_eddi ? cur + CH[ADDR_W-1:0] : ptr;

  logic [ADDR_W-1:0] mon_dup;
  assign mon_dup     = mon_addr - CH[ADDR_W-1:0];
  assign mon_is_orig = ((mon_addr & CH[ADDR_W-1:0]) == '0)
                       && (mon_addr >= orig_lo) && (mon_addr <= orig_hi);
  assign mon_is_eddi = ((mon_addr & CH[ADDR_W-1:0]) != '0) && (mon_addr >= CH[ADDR_W-1:0])
                       && (mon_dup >= orig_lo) && (mon_dup <= orig_hi);

endmodule
