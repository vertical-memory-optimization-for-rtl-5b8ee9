// One register-file bank built from racetrack memory.
//
// A bank holds ENTRIES warp registers of DATA_W bits: DATA_W tracks of
// TRACK_LEN bits, one bit of every register per track.  Each track has PORTS
// evenly spaced access ports, so every port serves a segment of
// SEG = TRACK_LEN/PORTS bits.  Register (port p, location b) sits in row
// p*SEG + b and can only be read or written when the bank's location register
// equals b.  The bank accepts one request at a time (`req_ready`), shifts the
// tracks one bit per cycle through rm_shift_ctrl, then spends RD_LAT cycles
// on a read or WR_LAT cycles on a write at the port.  A read returns its data
// with `rsp_valid` for one cycle; a write also pulses `rsp_valid`.
//
// Timing: with d bits to shift, the response appears d + LAT cycles after
// the clock edge that accepted the request.  The latencies (read 1 cycle,
// write 2 cycles, one cycle per shifted bit) are the ones the design is
// evaluated with.  The magnetic array itself is modelled as a register array
// indexed by row; reset clears the location register, not the data.
module rm_bank #(
  parameter int unsigned ENTRIES = 64,
  parameter int unsigned PORTS   = 4,
  parameter int unsigned DATA_W  = 1024,
  parameter int unsigned RD_LAT  = 1,
  parameter int unsigned WR_LAT  = 2,
  localparam int unsigned SEG    = ENTRIES / PORTS,
  localparam int unsigned BW     = $clog2(SEG),
  localparam int unsigned PW     = (PORTS > 1) ? $clog2(PORTS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  output logic              req_ready,
  input  logic              req_we,
  input  logic [PW-1:0]     req_port,
  input  logic [BW-1:0]     req_bml,
  input  logic [DATA_W-1:0] req_wdata,
  output logic              rsp_valid,
  output logic              rsp_we,
  output logic [DATA_W-1:0] rsp_rdata,
  output logic [BW-1:0]     loc,          // BML under the ports now
  output logic              shift_pulse,  // for shift-energy accounting
  output logic              shift_dir     // 1: toward larger BML
);
  typedef enum logic {IDLE, SHIFT} state_t;
  state_t state;

  logic [DATA_W-1:0] mem [ENTRIES];
  logic              we_q;
  logic [PW-1:0]     port_q;
  logic [BW-1:0]     bml_q;
  logic [DATA_W-1:0] wdata_q;
  logic [2:0]        cnt;
  logic              aligned;
  logic [$clog2(ENTRIES)-1:0] row;

  assign req_ready = (state == IDLE);
  assign row       = $clog2(ENTRIES)'(int'(port_q) * SEG + int'(bml_q));

  rm_shift_ctrl #(.SEG(SEG)) u_shift (
    .clk, .rst_n,
    .en         (state == SHIFT),
    .tgt_bml    (bml_q),
    .loc,
    .aligned,
    .shift_pulse,
    .shift_dir
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      we_q      <= 1'b0;
      port_q    <= '0;
      bml_q     <= '0;
      cnt       <= '0;
      rsp_valid <= 1'b0;
      rsp_we    <= 1'b0;
    end else begin
      rsp_valid <= 1'b0;
      unique case (state)
        IDLE: if (req_valid) begin
          we_q   <= req_we;
          port_q <= req_port;
          bml_q  <= req_bml;
          cnt    <= '0;
          state  <= SHIFT;
        end
        SHIFT: if (aligned) begin
          if (int'(cnt) == (we_q ? WR_LAT : RD_LAT) - 1) begin
            rsp_valid <= 1'b1;
            rsp_we    <= we_q;
            state     <= IDLE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // Data path: capture write data with the request, access the row in the
  // last cycle at the port.
  always_ff @(posedge clk) begin
    if (state == IDLE && req_valid) wdata_q <= req_wdata;
    if (state == SHIFT && aligned && int'(cnt) == (we_q ? WR_LAT : RD_LAT) - 1) begin
      if (we_q) mem[row] <= wdata_q;
      else      rsp_rdata <= mem[row];
    end
  end
endmodule
