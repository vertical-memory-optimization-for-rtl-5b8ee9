// RM-aware warp scheduler (RMWS).
//
// Every cycle the scheduler picks, among the warps whose next instruction may
// issue, the one whose register reads need the shortest track shift.  The
// reference point of a bank is the bit-map location (BML) of the newest read
// already queued for it, since the bank's arbitrator serves its queue in
// order; the scheduler keeps one such BML per bank and updates it when it
// issues an instruction.
//
// Score hardware, per operand:
//   1. preprocess: BMLpp = (1 << (SEG-1)) >>> BML (arithmetic shift), a
//      thermometer code with BML+1 ones from the top bit down;
//   2. XOR with the BMLpp of the bank's newest pending request: a run of
//      |distance| ones;
//   3. shift that run right until its LSB is set (zero stays zero): a
//      thermometer of the distance from bit 0 ("normalized bit distance");
//   4. OR the operands of one instruction: the thermometer of the largest
//      distance, the instruction's scheduling score.
// Selection: the scores form an array; scanning columns from bit 0 upward,
// the first column whose AND over the candidate rows is 0 marks the
// minimum, and the lowest-numbered warp with a 0 there is chosen.  Warps that
// may not issue (no ready instruction, scoreboard or write-buffer stall) are
// left out of the scan, so the search continues to the next-best score.
//
// Interface: one issue per cycle, combinational select, bank BML registers
// updated at the clock edge of an issue.  Ties going to the lowest warp
// number, and bank BMLs resetting to 0, are choices of this design.
module rmws_sched #(
  parameter int unsigned NUM_WARPS = gpu_pkg::NUM_WARPS,
  parameter int unsigned NUM_BANKS = gpu_pkg::NUM_BANKS,
  parameter int unsigned SEG       = gpu_pkg::SEG,
  parameter int unsigned MAX_SRC   = gpu_pkg::MAX_SRC,
  localparam int unsigned WW       = $clog2(NUM_WARPS),
  localparam int unsigned BKW      = $clog2(NUM_BANKS),
  localparam int unsigned BW       = $clog2(SEG)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [NUM_WARPS-1:0] eligible,              // may issue this cycle
  input  logic                 src_valid [NUM_WARPS][MAX_SRC], // RF read
  input  logic [BKW-1:0]       src_bank  [NUM_WARPS][MAX_SRC],
  input  logic [BW-1:0]        src_bml   [NUM_WARPS][MAX_SRC],
  input  logic                 issue_ack,             // issue accepted
  output logic                 issue_valid,
  output logic [WW-1:0]        issue_warp,
  output logic [SEG-1:0]       issue_score,           // thermometer code
  output logic [BW-1:0]        bank_bml [NUM_BANKS]   // newest pending BML
);
  logic [SEG-1:0] score [NUM_WARPS];

  function automatic logic [SEG-1:0] bml_pp(input logic [BW-1:0] b);
    logic signed [SEG-1:0] one_top;
    one_top = {1'b1, {(SEG-1){1'b0}}};
    return SEG'(one_top >>> b);
  endfunction

  // Step 3: shift right until bit 0 is set (a zero vector stays zero).
  function automatic logic [SEG-1:0] normalize(input logic [SEG-1:0] x);
    logic [SEG-1:0] y;
    logic           done;
    y    = x;
    done = 1'b0;
    for (int i = 0; i < SEG; i++) begin
      if (!done && y != '0 && !y[0]) y = y >> 1;
      else                           done = 1'b1;
    end
    return y;
  endfunction

  always_comb begin
    for (int w = 0; w < NUM_WARPS; w++) begin
      score[w] = '0;
      for (int s = 0; s < MAX_SRC; s++)
        if (src_valid[w][s])
          score[w] |= normalize(bml_pp(src_bml[w][s]) ^
                                bml_pp(bank_bml[src_bank[w][s]]));
      if (!eligible[w]) score[w] = '1;   // out of the scan
    end
  end

  // Step 5: column scan from bit 0 upward.
  always_comb begin
    logic found;
    found       = 1'b0;
    issue_warp  = '0;
    issue_score = '0;
    for (int c = 0; c < SEG; c++) begin
      for (int w = 0; w < NUM_WARPS; w++) begin
        if (!found && !score[w][c]) begin
          found       = 1'b1;
          issue_warp  = WW'(w);
          issue_score = score[w];
        end
      end
    end
    issue_valid = found && (eligible != '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NUM_BANKS; b++) bank_bml[b] <= '0;
    end else if (issue_valid && issue_ack) begin
      for (int s = 0; s < MAX_SRC; s++)
        if (src_valid[issue_warp][s])
          bank_bml[src_bank[issue_warp][s]] <= src_bml[issue_warp][s];
    end
  end
endmodule
