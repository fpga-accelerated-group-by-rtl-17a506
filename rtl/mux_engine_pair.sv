// mux_engine_pair: two aggregation engines multiplexed on one set of five memory channels.
//
// In a single engine the four channels are statically assigned to pipeline functions and
// stall when that function is back-pressured. Pairing two engines lets either engine use an
// idle channel. Channel use of the pair (index into the chan_* arrays):
//   0 tuple stream   shared by both engines through a chan_arbiter
//   1 hash table     engine 0 only
//   2 hash table     engine 1 only
//   3 bucket reads   shared through a chan_arbiter
//   4 bucket writes  shared through a chan_arbiter
// Each engine keeps its own Filter CAM, Lock CAM, hash table and node pool (cfg[e]), so the
// two engines never touch the same memory and their tables are merged afterwards.
// conflicts[c] is high while both engines request shared channel c (0, 3, 4).
// The five-channel pair with an extra hash-table channel follows the source design; which
// channel is shared and how is this design's reading of it.
module mux_engine_pair
  import agg_pkg::*;
#(
  parameter int unsigned NJOBS          = 128,
  parameter int unsigned FILTER_ENTRIES = 64,
  parameter int unsigned LOCK_ENTRIES   = 64,
  parameter int unsigned BUCKET_W       = 20,
  parameter int unsigned TUPLE_FIFO     = 256
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start [2],
  input  engine_cfg_t   cfg   [2],
  output logic          busy  [2],
  output logic          done  [2],
  output engine_stats_t stats [2],
  output logic          conflicts [PAIR_CHANNELS],
  output logic          chan_req_valid [PAIR_CHANNELS],
  output mem_req_t      chan_req       [PAIR_CHANNELS],
  input  logic          chan_req_ready [PAIR_CHANNELS],
  input  logic          chan_rsp_valid [PAIR_CHANNELS],
  input  mem_rsp_t      chan_rsp       [PAIR_CHANNELS]
);
  // engine-side channel bundles: [engine][engine channel]
  logic     e_req_valid [2][ENG_CHANNELS];
  mem_req_t e_req       [2][ENG_CHANNELS];
  logic     e_req_ready [2][ENG_CHANNELS];
  logic     e_rsp_valid [2][ENG_CHANNELS];
  mem_rsp_t e_rsp       [2][ENG_CHANNELS];

  for (genvar e = 0; e < 2; e++) begin : g_eng
    agg_engine #(
      .NJOBS          (NJOBS),
      .FILTER_ENTRIES (FILTER_ENTRIES),
      .LOCK_ENTRIES   (LOCK_ENTRIES),
      .BUCKET_W       (BUCKET_W),
      .TUPLE_FIFO     (TUPLE_FIFO)
    ) u_engine (
      .clk            (clk),
      .rst_n          (rst_n),
      .start          (start[e]),
      .cfg            (cfg[e]),
      .busy           (busy[e]),
      .done           (done[e]),
      .stats          (stats[e]),
      .chan_req_valid (e_req_valid[e]),
      .chan_req       (e_req[e]),
      .chan_req_ready (e_req_ready[e]),
      .chan_rsp_valid (e_rsp_valid[e]),
      .chan_rsp       (e_rsp[e])
    );

    // dedicated hash-table channel
    assign chan_req_valid[1 + e] = e_req_valid[e][CH_HT];
    assign chan_req[1 + e]       = e_req[e][CH_HT];
    assign e_req_ready[e][CH_HT] = chan_req_ready[1 + e];
    assign e_rsp_valid[e][CH_HT] = chan_rsp_valid[1 + e];
    assign e_rsp[e][CH_HT]       = chan_rsp[1 + e];
  end

  assign conflicts[1] = 1'b0;
  assign conflicts[2] = 1'b0;

  // shared channels: pair channel index and the engine channel it carries
  localparam int unsigned SHARED_PAIR [3] = '{0, 3, 4};
  localparam int unsigned SHARED_ENG  [3] = '{CH_TUPLE, CH_BLRD, CH_BLWR};

  for (genvar s = 0; s < 3; s++) begin : g_shared
    localparam int unsigned PC = SHARED_PAIR[s];
    localparam int unsigned EC = SHARED_ENG[s];
    logic     a_req_valid [2];
    mem_req_t a_req       [2];
    logic     a_req_ready [2];
    logic     a_rsp_valid [2];
    mem_rsp_t a_rsp       [2];

    for (genvar e = 0; e < 2; e++) begin : g_side
      assign a_req_valid[e]     = e_req_valid[e][EC];
      assign a_req[e]           = e_req[e][EC];
      assign e_req_ready[e][EC] = a_req_ready[e];
      assign e_rsp_valid[e][EC] = a_rsp_valid[e];
      assign e_rsp[e][EC]       = a_rsp[e];
    end

    chan_arbiter u_arb (
      .clk           (clk),
      .rst_n         (rst_n),
      .in_req_valid  (a_req_valid),
      .in_req        (a_req),
      .in_req_ready  (a_req_ready),
      .in_rsp_valid  (a_rsp_valid),
      .in_rsp        (a_rsp),
      .out_req_valid (chan_req_valid[PC]),
      .out_req       (chan_req[PC]),
      .out_req_ready (chan_req_ready[PC]),
      .out_rsp_valid (chan_rsp_valid[PC]),
      .out_rsp       (chan_rsp[PC]),
      .conflict      (conflicts[PC])
    );
  end

endmodule
