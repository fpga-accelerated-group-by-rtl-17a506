// tb_agg_engine: self-checking test of one aggregation engine against the memory model.
//
// Phase 1 replays the worked example of the design: keys A, C, A, B, A where A and C fall
// into the same bucket, and checks the final table {(A,3), (B,1), (C,1)} and that the
// second A was merged in the Filter CAM and C had to wait for the lock.
// Phase 2 aggregates a random relation with few distinct keys and small CAMs so that
// Filter CAM hits, Filter-full waits, lock waits, list walks, updates and inserts all
// happen. Phase 3 gives the engine a node pool that is too small and checks the overflow
// flag. Expected counts are computed by the testbench from the relation it generated; the
// hash table is read back from memory and walked bucket by bucket.
module tb_agg_engine;
  import agg_pkg::*;

  localparam int unsigned BW     = 4;
  localparam int unsigned NJOBS  = 16;
  localparam int unsigned FILT   = 8;
  localparam int unsigned LOCKS  = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = !clk;

  logic          start = 1'b0;
  engine_cfg_t   cfg;
  logic          busy, done;
  engine_stats_t stats;
  logic          req_valid [ENG_CHANNELS];
  mem_req_t      req       [ENG_CHANNELS];
  logic          req_ready [ENG_CHANNELS];
  logic          rsp_valid [ENG_CHANNELS];
  mem_rsp_t      rsp       [ENG_CHANNELS];

  agg_engine #(.NJOBS(NJOBS), .FILTER_ENTRIES(FILT), .LOCK_ENTRIES(LOCKS),
               .BUCKET_W(BW), .TUPLE_FIFO(8)) dut (
    .clk, .rst_n, .start, .cfg, .busy, .done, .stats,
    .chan_req_valid (req_valid), .chan_req (req), .chan_req_ready (req_ready),
    .chan_rsp_valid (rsp_valid), .chan_rsp (rsp)
  );

  mem_model #(.NPORTS(ENG_CHANNELS), .LATENCY(30), .JITTER(10), .STALL_PCT(10)) mem (
    .clk, .rst_n, .req_valid, .req, .req_ready, .rsp_valid, .rsp
  );

  int checks = 0;
  int failures = 0;
  int unsigned expected [int unsigned];
  int unsigned got [int unsigned];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int unsigned ref_bucket(int unsigned key);
    longint unsigned p = (longint'(key) * 64'h9E37_79B1) & 64'hFFFF_FFFF;
    return int'(p >> (32 - BW));
  endfunction

  localparam logic [ADDR_W-1:0] REL  = 32'h0001_0000;
  localparam logic [ADDR_W-1:0] HT   = 32'h0010_0000;
  localparam logic [ADDR_W-1:0] NODE = 32'h0020_0000;

  // read the hash table back and check its structure
  task automatic walk_table();
    got.delete();
    for (int unsigned b = 0; b < (1 << BW); b++) begin
      logic [63:0] ptr = mem.read_word(HT + b);
      int guard = 0;
      while (ptr != 0 && guard < 100000) begin
        logic [63:0] w0 = mem.read_word(NODE + 2 * ptr[31:0]);
        int unsigned k = w0[63:32];
        check(ref_bucket(k) == b, $sformatf("key %0h stored in bucket %0d", k, b));
        check(!got.exists(k), $sformatf("key %0h stored twice", k));
        got[k] = w0[31:0];
        ptr = mem.read_word(NODE + 2 * ptr[31:0] + 1);
        guard++;
      end
    end
  endtask

  task automatic run(int unsigned n, int unsigned cap);
    cfg.rel_base  = REL;
    cfg.rel_count = n;
    cfg.ht_base   = HT;
    cfg.node_base = NODE;
    cfg.node_cap  = cap;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    wait (done);
    @(negedge clk);
  endtask

  task automatic compare(string phase);
    int unsigned total = 0;
    walk_table();
    check(got.num() == expected.num(),
          $sformatf("%s: %0d keys in table, %0d expected", phase, got.num(), expected.num()));
    foreach (expected[k]) begin
      check(got.exists(k) && got[k] == expected[k],
            $sformatf("%s: key %0h count %0d expected %0d", phase, k,
                      got.exists(k) ? got[k] : 0, expected[k]));
      total += expected[k];
    end
    check(stats.tuples == total, $sformatf("%s: tuples %0d", phase, stats.tuples));
    check(stats.filter_hits + stats.ht_updates + stats.ht_inserts == stats.tuples,
          $sformatf("%s: every tuple merged, updated or inserted", phase));
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned keyA, keyB, keyC;
  int unsigned sum_fh, sum_fw, sum_lw, sum_up, sum_in, sum_nr;

  initial begin
    cfg = '0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // ---------------- phase 1: A, C, A, B, A with hash(A) == hash(C)
    keyA = 32'h0000_0A0A;
    keyC = keyA + 1;
    while (ref_bucket(keyC) != ref_bucket(keyA)) keyC++;
    keyB = keyA + 1;
    while (ref_bucket(keyB) == ref_bucket(keyA)) keyB++;
    mem.clear();
    mem.write_word(REL + 0, {keyA, 32'd1});
    mem.write_word(REL + 1, {keyC, 32'd2});
    mem.write_word(REL + 2, {keyA, 32'd3});
    mem.write_word(REL + 3, {keyB, 32'd4});
    mem.write_word(REL + 4, {keyA, 32'd5});
    expected.delete();
    expected[keyA] = 3;
    expected[keyB] = 1;
    expected[keyC] = 1;
    run(5, 1024);
    compare("example");
    check(stats.filter_hits >= 1, "example: a duplicate A merged in the Filter CAM");
    check(stats.lock_waits >= 1, "example: C waited for the lock held by A");
    check(stats.ht_inserts >= 3, "example: A, B and C inserted");
    check(!stats.overflow, "example: no overflow");
    sum_fh = stats.filter_hits;  sum_lw = stats.lock_waits;  sum_fw = stats.filter_waits;
    sum_up = stats.ht_updates;   sum_in = stats.ht_inserts;  sum_nr = stats.node_reads;

    // ---------------- phase 2: random relation, 2000 tuples over 60 keys
    mem.clear();
    expected.delete();
    for (int i = 0; i < 2000; i++) begin
      int unsigned k;
      k = 32'h5000 + $urandom_range(59, 0) * 37;
      mem.write_word(REL + i, {k, 32'(i)});
      if (expected.exists(k)) expected[k]++;
      else expected[k] = 1;
    end
    run(2000, 1024);
    compare("random");
    $display("random: %0d keys expected, %0d found", expected.num(), got.num());
    check(!stats.overflow, "random: no overflow");
    sum_fh += stats.filter_hits;  sum_lw += stats.lock_waits;  sum_fw += stats.filter_waits;
    sum_up += stats.ht_updates;   sum_in += stats.ht_inserts;  sum_nr += stats.node_reads;
    $display("random: tuples=%0d filter_hits=%0d filter_waits=%0d lock_waits=%0d updates=%0d inserts=%0d node_reads=%0d",
             stats.tuples, stats.filter_hits, stats.filter_waits, stats.lock_waits,
             stats.ht_updates, stats.ht_inserts, stats.node_reads);

    // ---------------- phase 3: node pool too small
    mem.clear();
    for (int i = 0; i < 40; i++) mem.write_word(REL + i, {32'h9000 + 32'(i), 32'(i)});
    run(40, 6);
    check(stats.overflow, "overflow: flag raised when the node pool runs out");
    check(stats.ht_inserts == 5, $sformatf("overflow: %0d inserts, 5 expected", stats.ht_inserts));

    // every mechanism must have happened at least once
    check(sum_fh > 0, "mechanism: Filter CAM hit");
    check(sum_fw > 0, "mechanism: Filter CAM full wait");
    check(sum_lw > 0, "mechanism: lock wait");
    check(sum_up > 0, "mechanism: hash-table update");
    check(sum_in > 0, "mechanism: hash-table insert");
    check(sum_nr > sum_up + sum_in - 60, "mechanism: bucket lists walked past their head");
    check(mem.stalls > 0, "mechanism: channel back-pressure");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
