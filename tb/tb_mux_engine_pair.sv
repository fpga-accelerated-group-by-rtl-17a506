// tb_mux_engine_pair: two engines sharing five channels. Each engine aggregates its own
// half of a random relation into its own hash table; the testbench walks both tables,
// checks bucket placement and uniqueness, merges them and compares with counts computed
// while generating the relation. It also checks that both engines really contended for
// each of the three shared channels (tuple, bucket read, bucket write), that the two
// hash-table channels are never flagged, and that requests on hash-table channel e carry
// engine e's job tags only (top tag bit clear, no arbiter on that channel).
module tb_mux_engine_pair;
  import agg_pkg::*;

  localparam int unsigned BW = 6;
  localparam int unsigned N_PER = 3000;
  localparam int unsigned CARD = 300;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = !clk;

  logic          start [2];
  engine_cfg_t   cfg   [2];
  logic          busy  [2];
  logic          done  [2];
  engine_stats_t stats [2];
  logic          conflicts [PAIR_CHANNELS];
  logic          req_valid [PAIR_CHANNELS];
  mem_req_t      req       [PAIR_CHANNELS];
  logic          req_ready [PAIR_CHANNELS];
  logic          rsp_valid [PAIR_CHANNELS];
  mem_rsp_t      rsp       [PAIR_CHANNELS];

  mux_engine_pair #(.NJOBS(32), .FILTER_ENTRIES(16), .LOCK_ENTRIES(16), .BUCKET_W(BW),
                    .TUPLE_FIFO(64)) dut (
    .clk, .rst_n, .start, .cfg, .busy, .done, .stats, .conflicts,
    .chan_req_valid (req_valid), .chan_req (req), .chan_req_ready (req_ready),
    .chan_rsp_valid (rsp_valid), .chan_rsp (rsp)
  );

  mem_model #(.NPORTS(PAIR_CHANNELS), .LATENCY(40), .JITTER(10), .STALL_PCT(10)) mem (
    .clk, .rst_n, .req_valid, .req, .req_ready, .rsp_valid, .rsp
  );

  int checks = 0;
  int failures = 0;
  int unsigned expected [int unsigned];
  int unsigned merged [int unsigned];
  longint conf [PAIR_CHANNELS];
  longint ht_tag_errors = 0;

  always @(posedge clk) begin
    for (int c = 0; c < PAIR_CHANNELS; c++) if (conflicts[c]) conf[c] <= conf[c] + 1;
    for (int e = 0; e < 2; e++)
      if (rst_n && req_valid[1 + e] && (req[1 + e].tag[TAG_W-1] || req[1 + e].addr[24] != e[0]))
        ht_tag_errors <= ht_tag_errors + 1;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic int unsigned ref_bucket(int unsigned key);
    longint unsigned p = (longint'(key) * 64'h9E37_79B1) & 64'hFFFF_FFFF;
    return int'(p >> (32 - BW));
  endfunction

  localparam logic [ADDR_W-1:0] REL  = 32'h0100_0000;
  localparam logic [ADDR_W-1:0] HT   = 32'h1000_0000;   // engine e: HT + e * 2**24
  localparam logic [ADDR_W-1:0] NODE = 32'h2000_0000;   // engine e: NODE + e * 2**24

  task automatic walk_table(int e);
    int unsigned seen [int unsigned];
    logic [ADDR_W-1:0] ht = HT + (e << 24);
    logic [ADDR_W-1:0] nb = NODE + (e << 24);
    for (int unsigned b = 0; b < (1 << BW); b++) begin
      logic [63:0] ptr;
      int guard;
      ptr = mem.read_word(ht + b);
      guard = 0;
      while (ptr != 0 && guard < 100000) begin
        logic [63:0] w0;
        int unsigned k;
        w0 = mem.read_word(nb + 2 * ptr[31:0]);
        k = w0[63:32];
        check(ref_bucket(k) == b, $sformatf("engine %0d: key %0h in bucket %0d", e, k, b));
        check(!seen.exists(k), $sformatf("engine %0d: key %0h stored twice", e, k));
        seen[k] = 1;
        if (merged.exists(k)) merged[k] += w0[31:0];
        else merged[k] = w0[31:0];
        ptr = mem.read_word(nb + 2 * ptr[31:0] + 1);
        guard++;
      end
    end
  endtask

  initial begin : watchdog
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < PAIR_CHANNELS; c++) conf[c] = 0;
    for (int e = 0; e < 2; e++) begin
      start[e] = 1'b0;
      cfg[e] = '0;
    end
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    for (int unsigned i = 0; i < 2 * N_PER; i++) begin
      int unsigned k;
      k = ($urandom_range(CARD - 1, 0) + 1) * 32'h85EB_CA6B;
      mem.write_word(REL + i, {k, i});
      if (expected.exists(k)) expected[k]++;
      else expected[k] = 1;
    end
    for (int e = 0; e < 2; e++) begin
      cfg[e].rel_base  = REL + e * N_PER;
      cfg[e].rel_count = N_PER;
      cfg[e].ht_base   = HT + (e << 24);
      cfg[e].node_base = NODE + (e << 24);
      cfg[e].node_cap  = 32'h0001_0000;
    end
    @(negedge clk);
    start[0] = 1'b1;
    start[1] = 1'b1;
    @(negedge clk);
    start[0] = 1'b0;
    start[1] = 1'b0;
    wait (done[0]);
    wait (done[1]);
    @(negedge clk);

    for (int e = 0; e < 2; e++) begin
      check(stats[e].tuples == N_PER, $sformatf("engine %0d took %0d tuples", e, stats[e].tuples));
      check(!stats[e].overflow, "no overflow");
      walk_table(e);
    end
    check(merged.num() == expected.num(),
          $sformatf("%0d merged keys, %0d expected", merged.num(), expected.num()));
    foreach (expected[k])
      check(merged.exists(k) && merged[k] == expected[k],
            $sformatf("key %0h: count %0d, expected %0d", k,
                      merged.exists(k) ? merged[k] : 0, expected[k]));
    check(conf[0] > 0, "tuple channel shared");
    check(conf[3] > 0, "bucket-read channel shared");
    check(conf[4] > 0, "bucket-write channel shared");
    check(conf[1] == 0 && conf[2] == 0, "hash-table channels are not shared");
    check(ht_tag_errors == 0, "hash-table channel e serves engine e only");
    $display("conflict cycles: tuple=%0d bl_rd=%0d bl_wr=%0d", conf[0], conf[3], conf[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
