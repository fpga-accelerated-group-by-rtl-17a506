// chan_arbiter: shares one memory channel between the two engines of a multiplexed pair.
//
// Requests: each cycle the channel is granted to one of the two requesting engines,
// round-robin when both request, so neither can starve the other. The granted engine's
// request is forwarded with the top bit of its tag replaced by the engine's index (engine
// tags must leave that bit zero). Arbitration is combinational: the channel sees a request
// in the same cycle an engine raises it, and the round-robin pointer moves only after an
// accepted request. Responses: the top tag bit selects the engine; it is cleared before
// the response is handed back. Responses are never stalled.
// Letting two engines use the same channel follows the source design; the round-robin
// policy and tag-based routing are this design's choices.
module chan_arbiter
  import agg_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  // engine side
  input  logic     in_req_valid [2],
  input  mem_req_t in_req       [2],
  output logic     in_req_ready [2],
  output logic     in_rsp_valid [2],
  output mem_rsp_t in_rsp       [2],
  // memory side
  output logic     out_req_valid,
  output mem_req_t out_req,
  input  logic     out_req_ready,
  input  logic     out_rsp_valid,
  input  mem_rsp_t out_rsp,
  // both engines requested in this cycle
  output logic     conflict
);
  logic last;   // engine granted most recently
  logic grant;

  always_comb begin
    if (in_req_valid[0] && in_req_valid[1]) grant = !last;
    else                                    grant = in_req_valid[1];
    conflict      = in_req_valid[0] && in_req_valid[1];
    out_req_valid = in_req_valid[grant];
    out_req       = in_req[grant];
    out_req.tag[TAG_W-1] = grant;
    in_req_ready[0] = out_req_ready && (grant == 1'b0);
    in_req_ready[1] = out_req_ready && (grant == 1'b1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n)                              last <= 1'b1;
    else if (out_req_valid && out_req_ready) last <= grant;
  end

  always_comb begin
    for (int e = 0; e < 2; e++) begin
      in_rsp_valid[e] = out_rsp_valid && (out_rsp.tag[TAG_W-1] == e[0]);
      in_rsp[e]       = out_rsp;
      in_rsp[e].tag[TAG_W-1] = 1'b0;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   in_req_valid[0] |-> !in_req[0].tag[TAG_W-1])
    else $error("chan_arbiter: engine 0 used the reserved tag bit");
  assert property (@(posedge clk) disable iff (!rst_n)
                   in_req_valid[1] |-> !in_req[1].tag[TAG_W-1])
    else $error("chan_arbiter: engine 1 used the reserved tag bit");

endmodule
