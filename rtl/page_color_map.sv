// Page-colouring DRAM address map for thread-batch memory partitioning.
//
// The DRAM address is split so that the channel and bank bits (the "colour")
// sit directly above the page offset:
//   addr = { row | bank | channel | page offset (column + byte) }.
// Because the colour lies inside the physical page number, whoever allocates
// a page frame chooses its channel and bank.  Every SM owns
// COLORS / N_SM colours, so the pages of the thread batches that run on an SM
// go only to that SM's banks and SMs stop interfering in the DRAM.
//
// Two functions in one block:
//  * decode (for the memory controller): `addr` -> channel, bank, row,
//    column, the SM owning the colour and whether the access is local to the
//    requesting SM `req_sm` (for the local-access ratio);
//  * frame (for page allocation): the `seq`-th page of SM `alloc_sm` gets
//    colour alloc_sm*CPS + seq mod CPS and row seq / CPS, counted from row 0
//    for GPU pages and down from the top row for CPU pages (`alloc_cpu`), so
//    CPU and GPU pages sit in separate row ranges of every bank.  CPU pages
//    cycle through all colours.
// Purely combinational.  The field order (channel below bank) and the row
// numbering are this design's choices; the colour-above-offset layout, 4 KB
// pages, 2 channels x 16 banks and 8 SMs follow the evaluated system.
module page_color_map #(
  parameter int unsigned ADDR_W    = 32,
  parameter int unsigned PAGE_BITS = 12,   // 4 KB pages
  parameter int unsigned CHANNELS  = 2,
  parameter int unsigned BANKS     = 16,   // per channel
  parameter int unsigned N_SM      = 8,
  localparam int unsigned CHW      = (CHANNELS > 1) ? $clog2(CHANNELS) : 1,
  localparam int unsigned BKW      = $clog2(BANKS),
  localparam int unsigned COLORS   = CHANNELS * BANKS,
  localparam int unsigned CW       = $clog2(COLORS),
  localparam int unsigned ROW_W    = ADDR_W - PAGE_BITS - CW,
  localparam int unsigned SMW      = (N_SM > 1) ? $clog2(N_SM) : 1,
  localparam int unsigned FRAME_W  = ADDR_W - PAGE_BITS
) (
  // decode
  input  logic [ADDR_W-1:0]    addr,
  input  logic [SMW-1:0]       req_sm,
  output logic [CHW-1:0]       channel,
  output logic [BKW-1:0]       bank,
  output logic [ROW_W-1:0]     row,
  output logic [PAGE_BITS-1:0] column,
  output logic [SMW-1:0]       owner_sm,
  output logic                 local_access,
  // frame allocation
  input  logic [SMW-1:0]       alloc_sm,
  input  logic                 alloc_cpu,
  input  logic [FRAME_W-1:0]   seq,
  output logic [FRAME_W-1:0]   frame
);
  localparam int unsigned CPS = COLORS / N_SM;   // colours per SM

  logic [CW-1:0] color;

  always_comb begin
    color        = addr[PAGE_BITS +: CW];
    column       = addr[PAGE_BITS-1:0];
    channel      = CHW'(int'(color) % CHANNELS);
    bank         = BKW'(int'(color) / CHANNELS);
    row          = addr[ADDR_W-1 -: ROW_W];
    owner_sm     = SMW'(int'(color) / CPS);
    local_access = (owner_sm == req_sm);
  end

  always_comb begin
    logic [CW-1:0]    fcol;
    logic [ROW_W-1:0] frow;
    if (alloc_cpu) begin
      fcol = CW'(int'(seq) % COLORS);
      frow = ~ROW_W'(int'(seq) / COLORS);          // from the top row down
    end else begin
      fcol = CW'(int'(alloc_sm) * CPS + int'(seq) % CPS);
      frow = ROW_W'(int'(seq) / CPS);
    end
    frame = {frow, fcol};
  end
endmodule
