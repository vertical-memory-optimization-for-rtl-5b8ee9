// Serial thread-block dispatch queue of one SM, with thread-batch numbering.
//
// Instead of handing each new thread block to whichever SM has a free slot,
// the thread blocks of a kernel are split into consecutive runs, one run per
// SM, before launch, so consecutive blocks (which tend to share pages and
// cache blocks) execute on the same SM.  The queue is only two registers:
// `head` (next block ID to hand out) and `tail` (one past the last).  At
// `launch`, SM `sm_id` of `n_sm` takes the run
//   [sm_id*q, min((sm_id+1)*q, n_tb)),
//   q = stride * ceil(ceil(n_tb / stride) / n_sm),
// i.e. the thread batches are shared out and every batch goes to one SM as
// a whole (with stride 1 this is q = ceil(n_tb / n_sm)).
// Each `pop` (the SM has a free thread-block slot) returns `tb_id` = head and
// increments head; the queue is empty when head reaches tail.
//
// Thread batching: blocks tb_id with the same tb_id / stride form one thread
// batch; `batch_id` is returned with every block (stride is the thread-block
// stride found by profiling, a launch constant).
//
// Timing: `tb_id`/`batch_id` are valid combinationally while `!empty`; a
// pop takes effect at the clock edge.  The equal-share split is this design's
// reading of "similar amount of thread block ids" per SM.
module dispatch_queue #(
  parameter int unsigned ID_W = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            launch,
  input  logic [ID_W-1:0] n_tb,      // thread blocks in the grid
  input  logic [7:0]      n_sm,      // SMs sharing the grid (>= 1)
  input  logic [7:0]      sm_id,
  input  logic [ID_W-1:0] stride,    // thread-block stride (>= 1)
  input  logic            pop,
  output logic            empty,
  output logic [ID_W-1:0] tb_id,
  output logic [ID_W-1:0] batch_id,
  output logic [ID_W-1:0] head,
  output logic [ID_W-1:0] tail
);
  logic [ID_W-1:0] share, first, last;
  logic [31:0]     st, nbat;

  always_comb begin
    st    = (stride == '0) ? 32'd1 : 32'(stride);
    nbat  = (32'(n_tb) + st - 1) / st;
    share = ID_W'((nbat + 32'(n_sm) - 1) / ((n_sm == 0) ? 32'd1 : 32'(n_sm)) * st);
    first = ID_W'(int'(sm_id) * int'(share));
    last  = ID_W'(int'(first) + int'(share));
    if (int'(first) > int'(n_tb)) first = n_tb;
    if (int'(last)  > int'(n_tb)) last  = n_tb;
  end

  assign empty    = (head == tail);
  assign tb_id    = head;
  assign batch_id = head / ((stride == '0) ? ID_W'(1) : stride);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head <= '0;
      tail <= '0;
    end else if (launch) begin
      head <= first;
      tail <= last;
    end else if (pop && !empty) begin
      head <= head + 1'b1;
    end
  end
endmodule
