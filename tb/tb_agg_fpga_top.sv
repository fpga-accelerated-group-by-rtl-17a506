// tb_agg_fpga_top: end-to-end test of the six-engine FPGA design at its default sizes.
//
// For each of the five key distributions the testbench writes a relation into the memory
// model, splits it into six contiguous slices, starts all engines together and waits for
// all of them to finish. It then walks the six hash tables in memory, checks that every
// node sits in the bucket its key hashes to and that no table holds a key twice, merges
// the six tables (the step that follows aggregation on the host) and compares the merged
// counts with counts computed while generating the relation. A last run gives engine 0 a
// node pool that is too small and checks its overflow flag.
// Every mechanism of the design is counted and must occur at least once: Filter CAM hits
// (early termination), Filter-full waits, lock waits, hash-table updates and inserts,
// bucket-list walks past a non-matching node, contention on a shared channel, memory
// back-pressure and node-pool overflow. Cycle counts per run are reported as tuples/cycle;
// each checked run must reach MIN_RATE, and the uniform rate at 2^22 keys must stay within
// 10 % of the rate at 2^10 keys, since hardware multithreading hides the extra cache misses
// that slow a processor down at high cardinality.
module tb_agg_fpga_top;
  import agg_pkg::*;

  // Grouping-key generators for the five evaluated key distributions.
  //
  // gen_key(kind, i, n, card) returns the grouping key of tuple i of an n-tuple relation with
  // about card distinct keys. A key index id in [0, card) is drawn, then mapped to a 32-bit
  // key by multiplying id+1 with an odd constant (a bijection modulo 2**32), so keys look
  // random but never collide.
  //   UNIFORM        id uniform in [0, card)
  //   HEAVY_HITTER   half of the tuples carry id 0, the rest are uniform
  //   MOVING_CLUSTER id uniform in a window of card/16 ids that slides from 0 to card over
  //                  the relation
  //   SELF_SIMILAR   80-20 rule: id = card * u ** (ln 0.2 / ln 0.8)
  //   ZIPF_05        skew 0.5 through the continuous inverse CDF: id = card * u ** 2
  // u is uniform in [0, 1). The last two are continuous approximations of the published
  // generators, adequate for exercising the hardware.
  typedef enum int {UNIFORM, HEAVY_HITTER, MOVING_CLUSTER, SELF_SIMILAR, ZIPF_05} dataset_e;

  function automatic int unsigned id_to_key(int unsigned id);
    return (id + 1) * 32'h85EB_CA6B;
  endfunction

  function automatic real uniform01();
    return real'($urandom) / 4294967296.0;
  endfunction

  function automatic int unsigned gen_key(dataset_e kind, int unsigned i, int unsigned n,
                                          int unsigned card);
    int unsigned id;
    int unsigned w;
    real u;
    u = uniform01();
    case (kind)
      HEAVY_HITTER:   id = ($urandom_range(1, 0) == 0) ? 0 : $urandom_range(card - 1, 0);
      MOVING_CLUSTER: begin
        w  = (card >= 16) ? card / 16 : 1;
        id = int'((longint'(i) * (card - w)) / n) + $urandom_range(w - 1, 0);
      end
      SELF_SIMILAR:   id = int'($floor(real'(card) * (u ** ($ln(0.2) / $ln(0.8)))));
      ZIPF_05:        id = int'($floor(real'(card) * u * u));
      default:        id = $urandom_range(card - 1, 0);
    endcase
    if (id >= card) id = card - 1;
    return id_to_key(id);
  endfunction

  localparam int unsigned CH   = 16;
  localparam int unsigned NENG = 6;
  localparam int unsigned BW   = 20;          // must match the top's BUCKET_W default
  localparam int unsigned CARD = 1 << 10;
  // Lowest acceptable rate of the six engines together. Each engine keeps at most 64 jobs
  // past its Filter CAM, and a job that misses needs about three memory round trips of
  // 100-120 cycles (bucket head, node, write-complete), so six engines manage about
  // 6 * 64 / 360 = 1.07 tuples per cycle when every tuple misses.
  localparam real MIN_RATE = 0.9;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = !clk;

  logic          start [NENG];
  engine_cfg_t   cfg   [NENG];
  logic          busy  [NENG];
  logic          done  [NENG];
  engine_stats_t stats [NENG];
  logic          conflicts [CH];
  logic          req_valid [CH];
  mem_req_t      req       [CH];
  logic          req_ready [CH];
  logic          rsp_valid [CH];
  mem_rsp_t      rsp       [CH];

  agg_fpga_top dut (
    .clk, .rst_n, .start, .cfg, .busy, .done, .stats, .conflicts,
    .chan_req_valid (req_valid), .chan_req (req), .chan_req_ready (req_ready),
    .chan_rsp_valid (rsp_valid), .chan_rsp (rsp)
  );

  mem_model #(.NPORTS(CH), .LATENCY(100), .JITTER(20), .STALL_PCT(5)) mem (
    .clk, .rst_n, .req_valid, .req, .req_ready, .rsp_valid, .rsp
  );

  int checks = 0;
  int failures = 0;
  int unsigned expected [int unsigned];
  int unsigned merged [int unsigned];
  longint conflict_cycles = 0;
  real    last_rate, rate_lo_card;
  longint cyc = 0;
  longint n_fh = 0, n_fw = 0, n_lw = 0, n_up = 0, n_in = 0, n_walk = 0, n_ovf = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int c = 0; c < CH; c++) if (rst_n && conflicts[c]) conflict_cycles <= conflict_cycles + 1;
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

  // walk one engine's table and add it to the merged result
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

  task automatic run(dataset_e kind, int unsigned card, int unsigned N_PER_ENGINE,
                     int unsigned cap0, bit verify);
    int unsigned n = N_PER_ENGINE * NENG;
    longint t0, t1;
    mem.clear();
    expected.delete();
    merged.delete();
    for (int unsigned i = 0; i < n; i++) begin
      int unsigned k;
      k = gen_key(kind, i, n, card);
      mem.write_word(REL + i, {k, i});
      if (expected.exists(k)) expected[k]++;
      else expected[k] = 1;
    end
    for (int e = 0; e < NENG; e++) begin
      cfg[e].rel_base  = REL + e * N_PER_ENGINE;
      cfg[e].rel_count = N_PER_ENGINE;
      cfg[e].ht_base   = HT + (e << 24);
      cfg[e].node_base = NODE + (e << 24);
      cfg[e].node_cap  = (e == 0) ? cap0 : 32'h0010_0000;
    end
    @(negedge clk);
    for (int e = 0; e < NENG; e++) start[e] = 1'b1;
    t0 = cyc;
    @(negedge clk);
    for (int e = 0; e < NENG; e++) start[e] = 1'b0;
    for (int e = 0; e < NENG; e++) wait (done[e]);
    t1 = cyc;
    @(negedge clk);
    for (int e = 0; e < NENG; e++) begin
      n_fh += stats[e].filter_hits;
      n_fw += stats[e].filter_waits;
      n_lw += stats[e].lock_waits;
      n_up += stats[e].ht_updates;
      n_in += stats[e].ht_inserts;
      n_walk += stats[e].node_reads - stats[e].ht_updates;
      n_ovf += stats[e].overflow;
      check(stats[e].tuples == N_PER_ENGINE, $sformatf("engine %0d took %0d tuples", e, stats[e].tuples));
      if (verify) begin
        check(!stats[e].overflow, $sformatf("engine %0d: no overflow", e));
        check(stats[e].filter_hits + stats[e].ht_updates + stats[e].ht_inserts == N_PER_ENGINE,
              $sformatf("engine %0d: every tuple merged, updated or inserted", e));
      end
    end
    last_rate = real'(n) / real'(t1 - t0);
    $display("%s card=%0d: %0d tuples in %0d cycles (%0.2f tuples/cycle), %0d distinct keys",
             kind.name(), card, n, t1 - t0, last_rate, expected.num());
    if (verify) begin
      check(last_rate >= MIN_RATE,
            $sformatf("%s card=%0d: %0.2f tuples/cycle, expected at least %0.2f",
                      kind.name(), card, last_rate, MIN_RATE));
      for (int e = 0; e < NENG; e++) walk_table(e);
      check(merged.num() == expected.num(),
            $sformatf("%0d merged keys, %0d expected", merged.num(), expected.num()));
      foreach (expected[k])
        check(merged.exists(k) && merged[k] == expected[k],
              $sformatf("key %0h: count %0d, expected %0d", k,
                        merged.exists(k) ? merged[k] : 0, expected[k]));
    end
  endtask

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < NENG; e++) begin
      start[e] = 1'b0;
      cfg[e] = '0;
    end
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    run(UNIFORM,        CARD,    1024, 32'h0010_0000, 1);
    rate_lo_card = last_rate;
    run(SELF_SIMILAR,   CARD,    1024, 32'h0010_0000, 1);
    run(MOVING_CLUSTER, CARD,    1024, 32'h0010_0000, 1);
    run(HEAVY_HITTER,   CARD,    1024, 32'h0010_0000, 1);
    run(ZIPF_05,        CARD,    1024, 32'h0010_0000, 1);
    run(UNIFORM,        1 << 16, 4096, 32'h0010_0000, 1);
    run(UNIFORM,        1 << 22, 8192, 32'h0010_0000, 1);
    // The engines' rate should hardly depend on the key cardinality.
    check(last_rate > 0.9 * rate_lo_card && last_rate < 1.1 * rate_lo_card,
          $sformatf("uniform rate at 2^22 keys (%0.2f) within 10%% of the rate at 2^10 keys (%0.2f)",
                    last_rate, rate_lo_card));
    run(UNIFORM,        CARD,    1024, 32'd20, 0);      // engine 0 runs out of nodes
    check(stats[0].overflow, "engine 0 reports node-pool overflow");

    $display("mechanisms: filter_hits=%0d filter_waits=%0d lock_waits=%0d updates=%0d inserts=%0d list_walk_steps=%0d shared_channel_conflicts=%0d memory_stalls=%0d overflows=%0d",
             n_fh, n_fw, n_lw, n_up, n_in, n_walk, conflict_cycles, mem.stalls, n_ovf);
    check(n_fh > 0, "mechanism: Filter CAM hit (early termination)");
    check(n_fw > 0, "mechanism: wait for Filter CAM space");
    check(n_lw > 0, "mechanism: wait for a bucket lock");
    check(n_up > 0, "mechanism: hash-table entry update");
    check(n_in > 0, "mechanism: hash-table entry insert");
    check(n_walk > 0, "mechanism: bucket list walked past a non-matching node");
    check(conflict_cycles > 0, "mechanism: both engines of a pair on a shared channel");
    check(mem.stalls > 0, "mechanism: memory back-pressure");
    check(n_ovf > 0, "mechanism: node-pool overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
