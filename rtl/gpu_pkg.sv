// Shared constants and types for the SM memory-side logic.
//
// The numbers are those of a Fermi-like streaming multiprocessor: 16
// register-file banks of 64 warp registers, each warp register 32 x 32 bits,
// racetrack tracks of 64 bits with 4 access ports (port segment of 16 bits),
// 48 resident warps, a write buffer of 2 entries per bank, 8 resident thread
// blocks.  Widths of IDs (6-bit warp and register IDs, 4-bit in-flight read
// counter) follow the write-buffer info table description.  Everything here
// is a constant or a type; no logic.
package gpu_pkg;
  localparam int unsigned NUM_BANKS  = 16;   // RF banks per SM
  localparam int unsigned ENTRIES    = 64;   // warp registers per bank
  localparam int unsigned TRACK_LEN  = 64;   // bits per racetrack
  localparam int unsigned PORTS      = 4;    // access ports per track
  localparam int unsigned SEG        = TRACK_LEN / PORTS; // port segment
  localparam int unsigned DATA_W     = 1024; // one warp register
  localparam int unsigned NUM_WARPS  = 48;   // resident warps per SM
  localparam int unsigned WB_WAYS    = 2;    // WBDA entries per bank
  localparam int unsigned MAX_SRC    = 3;    // source operands per instr.
  localparam int unsigned F_W        = 4;    // in-flight read counter width

  typedef logic [5:0] warp_id_t;
  typedef logic [5:0] reg_id_t;
  typedef logic [$clog2(NUM_BANKS)-1:0] bank_id_t;
  typedef logic [$clog2(SEG)-1:0]       bml_t;
  typedef logic [$clog2(PORTS)-1:0]     port_t;

  // One write-buffer info table entry (Fig. 9(b) fields).
  typedef struct packed {
    logic           v;     // entry holds a write request
    logic           r;     // data has arrived from writeback
    warp_id_t       warp;
    reg_id_t        regid;
    logic [F_W-1:0] f;     // in-flight reads that will read this entry
  } wbit_entry_t;

  // Location of one operand in the racetrack RF.
  typedef struct packed {
    logic     valid;
    bank_id_t bank;
    port_t    port;
    bml_t     bml;
  } opnd_loc_t;
endpackage
