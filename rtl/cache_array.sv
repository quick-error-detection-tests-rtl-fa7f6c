// cache_array: one cache memory array together with its tag entries.
//
// The array holds ENTRIES cache lines of LINE_BYTES bytes. A byte address is
// split into line offset, entry index and tag; every entry keeps a valid bit
// and the tag of the line it holds, so a lookup tells whether an address is
// cached (hit) and, if so, returns its line. The organisation is direct
// indexed with write-allocate of whole lines: the simplest organisation
// that gives a tag lookup and the entry positions of the reference example
// (0x0000 in entry 0, 0x1000 in entry 256 of a 512 x 16-byte L1 array).
// Miss handling and refill belong to the cache controller, outside this
// design; a store here writes the whole line and installs its tag.
//
// Interface: en/we/addr/wdata form one access. A load's rdata/rhit/rvalid
// appear READ_LAT cycles after the access was taken. The array takes one
// access every READ_LAT cycles: busy is high for the READ_LAT-1 cycles that
// follow an access (1 for L1 arrays, 2 for L2 arrays, as in the target
// SoC), and an access must not be presented while busy is high.
module cache_array #(
  parameter int unsigned ADDR_W     = 40,
  parameter int unsigned LINE_BYTES = 16,
  parameter int unsigned ENTRIES    = 512,
  parameter int unsigned READ_LAT   = 1,
  localparam int unsigned LINE_BITS = 8 * LINE_BYTES,
  localparam int unsigned OFF_W     = $clog2(LINE_BYTES),
  localparam int unsigned IDX_W     = $clog2(ENTRIES),
  localparam int unsigned TAG_W     = ADDR_W - OFF_W - IDX_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 we,
  input  logic [ADDR_W-1:0]    addr,
  input  logic [LINE_BITS-1:0] wdata,
  output logic                 busy,
  output logic                 rvalid,
  output logic                 rhit,
  output logic [LINE_BITS-1:0] rdata
);

  logic [LINE_BITS-1:0] data_mem [ENTRIES];
  logic [TAG_W-1:0]     tag_mem  [ENTRIES];
  logic [ENTRIES-1:0]   vld;

  logic [IDX_W-1:0] idx;
  logic [TAG_W-1:0] tag;
  assign idx = addr[OFF_W +: IDX_W];
  assign tag = addr[ADDR_W-1 -: TAG_W];

  logic take;
  assign take = en && !busy;

  // Occupancy counter: cycles left before the next access may start.
  logic [$clog2(READ_LAT+1)-1:0] occ;
  assign busy = (occ != '0);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        occ <= '0;
    else if (take)     occ <= ($bits(occ))'(READ_LAT - 1);
    else if (occ != 0) occ <= occ - 1'b1;
  end

  // Line storage (no reset: contents are only meaningful where vld is set).
  always_ff @(posedge clk) begin
    if (take && we) begin
      data_mem[idx] <= wdata;
      tag_mem[idx]  <= tag;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            vld <= '0;
    else if (take && we)   vld[idx] <= 1'b1;
  end

  // Read pipeline: stage 0 is the array read, the others add latency.
  logic [READ_LAT-1:0]                pv, ph;
  logic [READ_LAT-1:0][LINE_BITS-1:0] pd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pv <= '0;
      ph <= '0;
    end else begin
      pv[0] <= take && !we;
      ph[0] <= take && !we && vld[idx] && (tag_mem[idx] == tag);
      for (int i = 1; i < READ_LAT; i++) begin
        pv[i] <= pv[i-1];
        ph[i] <= ph[i-1];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (take && !we) pd[0] <= data_mem[idx];
    for (int i = 1; i < READ_LAT; i++) pd[i] <= pd[i-1];
  end

  assign rvalid = pv[READ_LAT-1];
  assign rhit   = ph[READ_LAT-1];
  assign rdata  = pd[READ_LAT-1];

  a_no_access_while_busy: assert property (@(posedge clk) disable iff (!rst_n) !(en && busy))
    else $error("cache_array: access presented while busy");

endmodule
