// sync_fifo: single-clock first-word-fall-through FIFO.
//
// Used for the ready-thread queue (job ids recycled while they wait for a CAM slot or a
// lock), for tuples streamed from memory, and to buffer channel requests and responses.
// Every queued item can be read in the cycle it reaches the head, so a waiting job is
// picked up in a single clock cycle. Storage is a DEPTH-entry array with wrapping read and
// write pointers and an occupancy counter.
//
// Interface: push/wdata writes when not full, pop removes rdata when not empty. A push and a
// pop may happen in the same cycle, also when the FIFO is full. rdata is valid whenever
// empty is low. Pushing a full FIFO without popping, or popping an empty one, is an error
// (asserted) and is ignored.
// Reset (rst_n low, synchronous) empties the FIFO. The queue itself is named in the
// source design; its depth and this implementation are this design's choices.
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16   // power of two
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  input  logic             pop,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic             full,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;

  logic do_push, do_pop;
  assign do_push = push && (!full || pop);   // a full FIFO accepts a push while it pops
  assign do_pop  = pop && !empty;

  assign empty = (count == 0);
  assign full  = (count == ($clog2(DEPTH)+1)'(DEPTH));
  assign rdata = mem[rptr];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_push) wptr <= wptr + 1'b1;  // DEPTH is a power of two
      if (do_pop)  rptr <= rptr + 1'b1;
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr] <= wdata;
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop))
    else $error("sync_fifo: push while full");
  assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty))
    else $error("sync_fifo: pop while empty");

endmodule
