// miss_queue: the queue that carries L1 data-cache miss addresses from the
// primary processor's cache to the secondary prefetch engine.
//
// It is a first-in first-out circular buffer of DEPTH block addresses (default
// 10). A push that finds the queue full does not get lost: the oldest entry is
// discarded to make room, so the queue always holds the most recent misses.
// A push and a pop in the same cycle on a full queue need no discard.
// The FIFO order, the depth of 10 and the delete-oldest policy are the
// configuration the design was evaluated with; the ready/valid pop interface
// and the drop indication are this design's own choices.
//
// Interface and timing:
//   push/push_data : one miss address per cycle, written at the clock edge.
//   pop_valid/pop_data : head of the queue, valid whenever the queue is not
//                   empty; pop removes it at the clock edge.
//   dropped        : pulses in the cycle a full-queue push discards the oldest.
//   count          : number of entries held.
// A pushed entry can be popped from the next cycle on.
module miss_queue #(
  parameter int unsigned DEPTH = 10,
  parameter int unsigned W     = ip_pkg::BLK_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  logic [W-1:0]               push_data,
  output logic                       pop_valid,
  output logic [W-1:0]               pop_data,
  input  logic                       pop,
  output logic                       dropped,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  typedef logic [PTR_W-1:0] ptr_t;

  logic [W-1:0] mem [DEPTH];
  ptr_t head, tail;
  logic [$clog2(DEPTH+1)-1:0] cnt;

  function automatic ptr_t incr(ptr_t p);
    return (p == ptr_t'(DEPTH-1)) ? '0 : p + ptr_t'(1);
  endfunction

  logic full, empty, do_pop, drop;
  assign full      = (cnt == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign empty     = (cnt == '0);
  assign do_pop    = pop && !empty;
  // Delete-oldest: a push into a full queue that is not popping advances head.
  assign drop      = push && full && !do_pop;
  assign pop_valid = !empty;
  assign pop_data  = mem[head];
  assign dropped   = drop;
  assign count     = cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head <= '0;
      tail <= '0;
      cnt  <= '0;
    end else begin
      if (push) tail <= incr(tail);
      if (do_pop || drop) head <= incr(head);
      if (push && !do_pop && !drop) cnt <= cnt + 1'b1;
      else if (!push && do_pop)     cnt <= cnt - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[tail] <= push_data;
  end

  // A pop on an empty queue is ignored; flag it as a protocol error.
  a_no_pop_empty: assert property (@(posedge clk) disable iff (!rst_n) pop |-> pop_valid)
    else $error("miss_queue: pop while empty");

endmodule
