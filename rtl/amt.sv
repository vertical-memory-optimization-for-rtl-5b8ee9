// Address miss table (AMT) of one SM.
//
// A one-bit table, indexed by the low bits of the cache-block address of an
// L1 data cache miss, remembering whether that block has already missed.  It
// keeps a warp's miss counter from counting the same block twice when the
// block is evicted and fetched again, so the miss count approximates the
// number of distinct blocks the warp touches (its working set).
//
// Interface: `miss_valid`/`miss_blk` present a miss; `first_miss` says (in the
// same cycle) that the entry was clear, and the entry is set at the clock
// edge.  `clear` empties the whole table in one cycle (it is cleared
// periodically, every N_pred finished warps).  Table size follows the
// described 8192 entries; direct indexing by the low address bits, without
// tags, is this design's choice (aliasing only makes the estimate smaller).
// Lint note: the upper bits of `miss_blk` are unused for that reason; the
// port keeps the full block address so a tagged table can replace this one.
module amt #(
  parameter int unsigned ENTRIES = 8192,
  parameter int unsigned BLK_W   = 25,        // cache-block address width
  localparam int unsigned IW     = $clog2(ENTRIES)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             miss_valid,
  input  logic [BLK_W-1:0] miss_blk,
  output logic             first_miss
);
  logic [ENTRIES-1:0] tab;
  logic [IW-1:0]      idx;

  assign idx        = miss_blk[IW-1:0];
  assign first_miss = miss_valid && !tab[idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          tab      <= '0;
    else if (clear)      tab      <= '0;
    else if (miss_valid) tab[idx] <= 1'b1;
  end
endmodule
