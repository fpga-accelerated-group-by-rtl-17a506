// tb_chan_arbiter: two random requesters share one channel through the arbiter. Checks
// that every request reaches the channel exactly once with the engine's index in the top
// tag bit, that under contention the grant alternates (round-robin), that a requester
// holds its request until accepted, and that responses return to the engine named by the
// top tag bit with that bit cleared.
module tb_chan_arbiter;
  import agg_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = !clk;

  logic     in_req_valid [2];
  mem_req_t in_req       [2];
  logic     in_req_ready [2];
  logic     in_rsp_valid [2];
  mem_rsp_t in_rsp       [2];
  logic     out_req_valid, out_req_ready, out_rsp_valid, conflict;
  mem_req_t out_req;
  mem_rsp_t out_rsp;

  chan_arbiter dut (.*);

  int checks = 0;
  int failures = 0;
  int sent [2];
  int got_rsp [2];
  int conflicts = 0;
  logic last_grant;
  bit   have_last = 0;
  int   seq [2];
  bit   acc [2];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // requesters: hold a request until accepted, tag = sequence number
  initial begin
    for (int e = 0; e < 2; e++) begin
      in_req_valid[e] = 0; in_req[e] = '0; seq[e] = 0; sent[e] = 0; got_rsp[e] = 0;
    end
    out_req_ready = 0; out_rsp_valid = 0; out_rsp = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      for (int e = 0; e < 2; e++) begin
        if (!in_req_valid[e] && $urandom_range(2, 0) != 0) begin
          in_req_valid[e] = 1;
          in_req[e].op    = MEM_RD;
          in_req[e].addr  = 32'(e * 1000000 + seq[e]);
          in_req[e].tag   = TAG_W'(seq[e] % 1000);
        end
      end
      out_req_ready = ($urandom_range(4, 0) != 0);
      // a response for a random engine
      out_rsp_valid = ($urandom_range(1, 0) == 1);
      out_rsp.op    = MEM_RD;
      out_rsp.rdata = 64'($urandom);
      out_rsp.tag   = {1'($urandom_range(1, 0)), 15'($urandom_range(999, 0))};
      #1;
      if (out_rsp_valid) begin
        int e;
        e = out_rsp.tag[TAG_W-1];
        check(in_rsp_valid[e] && !in_rsp_valid[1-e], "response routed to one engine");
        check(in_rsp[e].tag == {1'b0, out_rsp.tag[TAG_W-2:0]} &&
              in_rsp[e].rdata == out_rsp.rdata, "response tag cleared, data kept");
        got_rsp[e]++;
      end else begin
        check(!in_rsp_valid[0] && !in_rsp_valid[1], "no spurious response");
      end
      check(out_req_valid == (in_req_valid[0] || in_req_valid[1]), "request forwarded");
      check(conflict == (in_req_valid[0] && in_req_valid[1]), "conflict flag");
      if (out_req_valid && out_req_ready) begin
        int g;
        g = out_req.tag[TAG_W-1];
        check(in_req_valid[g] && in_req_ready[g] && !in_req_ready[1-g], "single grant");
        check(out_req.addr == in_req[g].addr &&
              out_req.tag[TAG_W-2:0] == in_req[g].tag[TAG_W-2:0], "request payload");
        check(out_req.addr == 32'(g * 1000000 + seq[g]), "requests in order per engine");
        if (conflict) begin
          conflicts++;
          if (have_last) check(g[0] != last_grant, "round-robin under contention");
        end
        last_grant = g[0];
        have_last = 1;
      end
      acc[0] = in_req_valid[0] && in_req_ready[0];
      acc[1] = in_req_valid[1] && in_req_ready[1];
      @(posedge clk);
      #1;
      for (int e = 0; e < 2; e++) begin
        if (acc[e]) begin
          in_req_valid[e] = 0;
          seq[e]++;
          sent[e]++;
        end
      end
    end
    check(conflicts > 50 && sent[0] > 100 && sent[1] > 100 && got_rsp[0] > 100 && got_rsp[1] > 100,
          "both engines served, contention seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
