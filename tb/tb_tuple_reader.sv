// tb_tuple_reader: streams relations from the memory model and checks that every grouping
// key (upper 32 bits of each tuple) comes out exactly once, that all_read rises only at
// the end, and that with an always-ready consumer the reader sustains one tuple per cycle
// (N tuples within N + latency + a few cycles). A second run stalls the consumer at random
// so that the credit limit holds requests back.
module tb_tuple_reader;
  import agg_pkg::*;

  localparam int unsigned LAT = 20;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = !clk;

  logic              start = 0;
  logic [ADDR_W-1:0] rel_base = '0, rel_count = '0;
  logic              key_valid, key_ready = 1'b1, all_read;
  logic [KEY_W-1:0]  key;
  logic              req_valid [1];
  mem_req_t          req       [1];
  logic              req_ready [1];
  logic              rsp_valid [1];
  mem_rsp_t          rsp       [1];

  tuple_reader #(.FIFO_DEPTH(32)) dut (
    .clk, .rst_n, .start, .rel_base, .rel_count,
    .req_valid (req_valid[0]), .req (req[0]), .req_ready (req_ready[0]),
    .rsp_valid (rsp_valid[0]), .rsp (rsp[0]),
    .key_valid, .key, .key_ready, .all_read
  );

  mem_model #(.NPORTS(1), .LATENCY(LAT), .JITTER(0), .STALL_PCT(0)) mem (
    .clk, .rst_n, .req_valid, .req, .req_ready, .rsp_valid, .rsp
  );

  int checks = 0;
  int failures = 0;
  int unsigned seen [int unsigned];
  int unsigned nseen;
  bit random_ready = 0;
  longint cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (key_valid && key_ready) begin
      if (seen.exists(key)) seen[key]++;
      else seen[key] = 1;
      nseen <= nseen + 1;
    end
  end
  always @(negedge clk) key_ready <= random_ready ? ($urandom_range(3, 0) == 0) : 1'b1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int unsigned n, logic [ADDR_W-1:0] base);
    longint t0;
    seen.delete();
    nseen = 0;
    for (int unsigned i = 0; i < n; i++) mem.write_word(base + i, {32'h7000_0000 + i, ~i});
    rel_base = base;
    rel_count = n;
    @(negedge clk) start = 1;
    t0 = cyc;
    @(negedge clk) start = 0;
    check(!all_read, "all_read low after start");
    while (nseen < n) @(negedge clk);
    @(negedge clk);
    if (!random_ready)
      check(cyc - t0 <= longint'(n + LAT + 8),
            $sformatf("%0d tuples took %0d cycles", n, cyc - t0));
    check(all_read, "all_read high at the end");
    check(!key_valid, "no extra keys");
    check(seen.num() == n, $sformatf("%0d distinct keys, %0d expected", seen.num(), n));
    for (int unsigned i = 0; i < n; i++)
      check(seen.exists(32'h7000_0000 + i) && seen[32'h7000_0000 + i] == 1,
            $sformatf("tuple %0d seen once", i));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    run(500, 32'h100);
    random_ready = 1;
    run(300, 32'h4000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
