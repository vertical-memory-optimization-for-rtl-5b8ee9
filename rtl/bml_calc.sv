// Register remapping: where a warp register lives in the racetrack RF.
//
// Registers are first allocated densely, as in a conventional GPU register
// file: the warp's registers follow each other, linear index
// L = warp*num_reg_warp + reg, interleaved over the banks (bank = L mod
// NUM_BANKS, row-in-bank r = L / NUM_BANKS).  Register remapping then packs the
// used rows of a bank around the access ports instead of stacking them from
// the top of the track: row r goes to port r mod PORTS at bit-map location
// (BML) r / PORTS + offset, where `offset` is the number of empty bits above
// the first used bit of every port segment.  The largest shift a request can
// need is then ceil(rows_used / PORTS), not rows_used.
//
// With NUM_SCHED > 1 the block applies warp-register remapping instead: warp w
// belongs to scheduler w mod NUM_SCHED and all its registers go to that
// scheduler's private group of NUM_BANKS/NUM_SCHED banks, so schedulers never
// move each other's tracks.
//
// num_reg_warp and offset are kernel-launch constants.  The block is purely
// combinational (the arithmetic is small fixed-point on 6-bit values).  The
// dense-then-pack arrangement is this design's concrete form of the remapping;
// see the README for how it relates to the per-warp segment formula.
module bml_calc #(
  parameter int unsigned NUM_BANKS = gpu_pkg::NUM_BANKS,
  parameter int unsigned PORTS     = gpu_pkg::PORTS,
  parameter int unsigned SEG       = gpu_pkg::SEG,
  parameter int unsigned NUM_SCHED = 1,
  localparam int unsigned BKW      = $clog2(NUM_BANKS),
  localparam int unsigned PW       = (PORTS > 1) ? $clog2(PORTS) : 1,
  localparam int unsigned BW       = $clog2(SEG)
) (
  input  logic [5:0]     warp,
  input  logic [5:0]     regid,
  input  logic [5:0]     num_reg_warp,  // registers allocated per warp
  input  logic [BW-1:0]  offset,        // empty bits above each segment
  output logic [BKW-1:0] bank,
  output logic [PW-1:0]  port,
  output logic [BW-1:0]  bml
);
  localparam int unsigned BPS = NUM_BANKS / NUM_SCHED;  // banks per scheduler

  logic [31:0] lin, row, sched, wloc;

  always_comb begin
    sched = int'(warp) % NUM_SCHED;
    wloc  = int'(warp) / NUM_SCHED;
    lin   = wloc * int'(num_reg_warp) + int'(regid);
    bank  = BKW'(sched * BPS + lin % BPS);
    row   = lin / BPS;
    port  = PW'(row % PORTS);
    bml   = BW'(row / PORTS + int'(offset));
  end
endmodule
