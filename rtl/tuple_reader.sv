// tuple_reader: streams the input relation from memory over the tuple channel.
//
// After start it issues one read request per cycle (while the channel accepts) for the
// words rel_base .. rel_base+rel_count-1, each an 8-byte tuple. Read data is parsed on
// arrival: bits [63:32] of the tuple are the grouping key (the first 4 bytes, bits [31:0],
// hold the primary key, which COUNT aggregation does not need), and the key is queued in
// a FIFO for the aggregation engine. Requests are only issued while the FIFO has room for
// every outstanding response (credit scheme), so responses are never refused. Tuple order
// is irrelevant to aggregation, so responses may return in any order.
//
// Interface: start (one cycle, loads rel_base/rel_count), memory channel request
// (req_valid/req/req_ready) and response (rsp_valid/rsp, always accepted), key stream
// (key_valid/key/key_ready), all_read once every tuple has returned. Throughput is one
// tuple per cycle when memory keeps up.
// Streaming tuples over a dedicated channel follows the source design; the credit scheme
// and FIFO depth are this design's choices.
module tuple_reader
  import agg_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] rel_base,
  input  logic [ADDR_W-1:0] rel_count,
  // memory channel
  output logic              req_valid,
  output mem_req_t          req,
  input  logic              req_ready,
  input  logic              rsp_valid,
  input  mem_rsp_t          rsp,
  // grouping keys
  output logic              key_valid,
  output logic [KEY_W-1:0]  key,
  input  logic              key_ready,
  output logic              all_read
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH) + 1;

  logic [ADDR_W-1:0] next_idx, total, base;
  logic [CW-1:0]     outstanding;
  logic [CW-1:0]     fifo_count;
  logic              fifo_empty, fifo_full;
  logic              issuing;
  logic              take_rsp;

  assign take_rsp = rsp_valid && rsp.op == MEM_RD;
  assign req_valid = (next_idx < total) &&
                     ((outstanding + fifo_count) < CW'(FIFO_DEPTH));
  assign issuing   = req_valid && req_ready;

  always_comb begin
    req       = '0;
    req.op    = MEM_RD;
    req.addr  = base + next_idx;
    req.tag   = TAG_W'(next_idx[ENG_TAG_W-1:0]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      next_idx    <= '0;
      total       <= '0;
      base        <= '0;
      outstanding <= '0;
    end else if (start) begin
      next_idx    <= '0;
      total       <= rel_count;
      base        <= rel_base;
      outstanding <= '0;
    end else begin
      if (issuing) next_idx <= next_idx + 1'b1;
      case ({issuing, take_rsp})
        2'b10:   outstanding <= outstanding + 1'b1;
        2'b01:   outstanding <= outstanding - 1'b1;
        default: outstanding <= outstanding;
      endcase
    end
  end

  assign all_read = (next_idx == total) && (outstanding == 0);

  sync_fifo #(.WIDTH(KEY_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk   (clk),
    .rst_n (rst_n && !start),
    .push  (take_rsp),
    .wdata (rsp.rdata[63:32]),
    .pop   (key_valid && key_ready),
    .rdata (key),
    .empty (fifo_empty),
    .full  (fifo_full),
    .count (fifo_count)
  );

  assign key_valid = !fifo_empty;

  assert property (@(posedge clk) disable iff (!rst_n) take_rsp |-> !fifo_full)
    else $error("tuple_reader: response without credit");

endmodule
