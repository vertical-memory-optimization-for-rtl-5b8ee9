// Intra-CTA locality (IntraCL) warp selection.
//
// IWL decides how many warps may run (`n_act`); IntraCL decides which.  A
// CTA occupies consecutive warp slots, so taking the first n_act occupied
// slots in slot order, starting from the lowest occupied slot, activates the
// warps of as few CTAs as possible: whole CTAs first, and at most one CTA
// partly.  Output `active` marks the chosen slots.
//
// Purely combinational (a prefix count over the slots).  Starting from the
// lowest occupied slot (the oldest resident CTA under serial dispatch) is this
// design's choice; the document gives the goal, not the circuit.
module intracl #(
  parameter int unsigned NUM_WARPS = 48,
  localparam int unsigned WW       = $clog2(NUM_WARPS)
) (
  input  logic [NUM_WARPS-1:0] slot_valid,
  input  logic [WW:0]          n_act,
  output logic [NUM_WARPS-1:0] active
);
  always_comb begin
    logic [31:0] cnt;
    cnt = 0;
    for (int w = 0; w < NUM_WARPS; w++) begin
      active[w] = slot_valid[w] && (cnt < int'(n_act));
      if (slot_valid[w]) cnt++;
    end
  end
endmodule
