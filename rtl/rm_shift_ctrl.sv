// Racetrack shift controller of one register-file bank.
//
// All tracks of a bank share one shift driver and move together, so the
// position of the whole bank is one number: the bit-map location (BML) that
// currently sits under every access port.  That number is held in the
// location register.  When a request is active (`en`), the controller compares
// the requested BML with the location register and emits one shift pulse per
// cycle in the required direction until they match; `aligned` then reports
// that the target bit is under its port.  One bit moves per cycle, the
// conservative shift timing the design assumes.
//
// The comparator / location register / pulse generator split follows the
// described shift controller; the pulse encoding (`shift_pulse` plus a
// direction bit) and the reset location 0 are choices of this design.
module rm_shift_ctrl #(
  parameter int unsigned SEG = 16            // bits per port segment
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,         // a request wants a target
  input  logic [$clog2(SEG)-1:0] tgt_bml,    // requested location
  output logic [$clog2(SEG)-1:0] loc,        // location register
  output logic                   aligned,    // loc == tgt_bml
  output logic                   shift_pulse,// a shift happens this cycle
  output logic                   shift_dir   // 1: toward larger BML
);
  assign aligned     = (loc == tgt_bml);
  assign shift_pulse = en && !aligned;
  assign shift_dir   = (tgt_bml > loc);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      loc <= '0;
    else if (shift_pulse)
      loc <= shift_dir ? loc + 1'b1 : loc - 1'b1;
  end
endmodule
