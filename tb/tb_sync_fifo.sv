// tb_sync_fifo: random pushes and pops against a reference queue, including pushes and
// pops in the same cycle (also while full), filling to full and draining to empty; checks data order,
// empty, full and count.
module tb_sync_fifo;
  localparam int unsigned W = 12;
  localparam int unsigned D = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = !clk;

  logic         push = 0, pop = 0, empty, full;
  logic [W-1:0] wdata = '0, rdata;
  logic [$clog2(D):0] count;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  int checks = 0;
  int failures = 0;
  logic [W-1:0] model [$];

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

  initial begin
    int fulls = 0, empties = 0, both = 0, full_swaps = 0, bias;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 4000; it++) begin
      @(negedge clk);
      check(count == ($clog2(D)+1)'(model.size()), "count");
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == D), "full");
      if (model.size() > 0) check(rdata == model[0], "head data");
      if (full) fulls++;
      if (empty) empties++;
      bias = ((it / 200) % 2 == 0) ? 70 : 30;
      pop  = !empty && ($urandom_range(99, 0) < 100 - bias);
      push = (!full || pop) && ($urandom_range(99, 0) < bias);   // full FIFO: push with pop
      if (full && push) full_swaps++;
      wdata = W'($urandom);
      if (push && pop) both++;
      if (pop) void'(model.pop_front());
      if (push) model.push_back(wdata);
    end
    @(negedge clk);
    push = 0; pop = 0;
    check(fulls > 0 && empties > 0 && both > 0 && full_swaps > 0,
          "full, empty, simultaneous push/pop and push/pop while full seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
