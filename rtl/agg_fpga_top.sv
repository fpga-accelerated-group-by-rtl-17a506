// agg_fpga_top: group-by COUNT aggregation on one FPGA of 16 memory channels, built from
// multiplexed engine pairs.
//
// A pair of engines needs five channels, so 16 channels hold floor(16/5) = 3 pairs, i.e.
// six engines; channel 15 is left unused (its request valid is held low). Engine 2p+e is
// engine e of pair p, and pair p uses channels 5p .. 5p+4 in the order given in
// mux_engine_pair. Each engine aggregates its own slice of the relation into its own hash
// table, described by cfg[engine]; the host splits the relation, starts the engines and
// merges the six tables afterwards.
//
// Interface: per-engine start/cfg/busy/done/stats, per shared channel conflict flags, and
// the 16 channels as arrays of request/response structs (agg_pkg). All outputs follow the
// timing of agg_engine. The channel count, the five-channel pair and the six-engine count
// follow the source design; the parameter values for jobs, CAM sizes and buckets are this
// design's choices.
module agg_fpga_top
  import agg_pkg::*;
#(
  parameter int unsigned CHANNELS       = 16,
  parameter int unsigned NJOBS          = 128,
  parameter int unsigned FILTER_ENTRIES = 64,
  parameter int unsigned LOCK_ENTRIES   = 64,
  parameter int unsigned BUCKET_W       = 20,
  parameter int unsigned TUPLE_FIFO     = 256,
  localparam int unsigned NPAIRS        = CHANNELS / PAIR_CHANNELS,
  localparam int unsigned NENGINES      = 2 * NPAIRS
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start [NENGINES],
  input  engine_cfg_t   cfg   [NENGINES],
  output logic          busy  [NENGINES],
  output logic          done  [NENGINES],
  output engine_stats_t stats [NENGINES],
  output logic          conflicts [CHANNELS],
  output logic          chan_req_valid [CHANNELS],
  output mem_req_t      chan_req       [CHANNELS],
  input  logic          chan_req_ready [CHANNELS],
  input  logic          chan_rsp_valid [CHANNELS],
  input  mem_rsp_t      chan_rsp       [CHANNELS]
);
  for (genvar p = 0; p < NPAIRS; p++) begin : g_pair
    logic          p_start [2];
    engine_cfg_t   p_cfg   [2];
    logic          p_busy  [2];
    logic          p_done  [2];
    engine_stats_t p_stats [2];
    logic          p_conf  [PAIR_CHANNELS];
    logic          p_req_valid [PAIR_CHANNELS];
    mem_req_t      p_req       [PAIR_CHANNELS];
    logic          p_req_ready [PAIR_CHANNELS];
    logic          p_rsp_valid [PAIR_CHANNELS];
    mem_rsp_t      p_rsp       [PAIR_CHANNELS];

    for (genvar e = 0; e < 2; e++) begin : g_e
      assign p_start[e]       = start[2*p + e];
      assign p_cfg[e]         = cfg[2*p + e];
      assign busy[2*p + e]    = p_busy[e];
      assign done[2*p + e]    = p_done[e];
      assign stats[2*p + e]   = p_stats[e];
    end

    for (genvar c = 0; c < PAIR_CHANNELS; c++) begin : g_c
      assign conflicts[PAIR_CHANNELS*p + c]      = p_conf[c];
      assign chan_req_valid[PAIR_CHANNELS*p + c] = p_req_valid[c];
      assign chan_req[PAIR_CHANNELS*p + c]       = p_req[c];
      assign p_req_ready[c] = chan_req_ready[PAIR_CHANNELS*p + c];
      assign p_rsp_valid[c] = chan_rsp_valid[PAIR_CHANNELS*p + c];
      assign p_rsp[c]       = chan_rsp[PAIR_CHANNELS*p + c];
    end

    mux_engine_pair #(
      .NJOBS          (NJOBS),
      .FILTER_ENTRIES (FILTER_ENTRIES),
      .LOCK_ENTRIES   (LOCK_ENTRIES),
      .BUCKET_W       (BUCKET_W),
      .TUPLE_FIFO     (TUPLE_FIFO)
    ) u_pair (
      .clk            (clk),
      .rst_n          (rst_n),
      .start          (p_start),
      .cfg            (p_cfg),
      .busy           (p_busy),
      .done           (p_done),
      .stats          (p_stats),
      .conflicts      (p_conf),
      .chan_req_valid (p_req_valid),
      .chan_req       (p_req),
      .chan_req_ready (p_req_ready),
      .chan_rsp_valid (p_rsp_valid),
      .chan_rsp       (p_rsp)
    );
  end

  // channels left over after the pairs
  for (genvar c = PAIR_CHANNELS * NPAIRS; c < CHANNELS; c++) begin : g_unused
    assign conflicts[c]      = 1'b0;
    assign chan_req_valid[c] = 1'b0;
    assign chan_req[c]       = '0;
  end

endmodule
