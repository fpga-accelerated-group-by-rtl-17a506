// tb_lock_cam: random acquire / release traffic on a small Lock CAM, checked against a
// reference set of locked buckets. A bucket must hit exactly while it is locked, full must
// track the number of locks held, and a released bucket can be locked again.
module tb_lock_cam;
  localparam int unsigned N = 8;
  localparam int unsigned IW = $clog2(N);
  localparam int unsigned BW = 6;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = !clk;

  logic [BW-1:0] search_bucket = '0;
  logic          hit, full, ins_en = 0, rm_en = 0;
  logic [IW-1:0] free_idx, rm_idx = '0;
  logic [IW:0]   used;

  lock_cam #(.ENTRIES(N), .BUCKET_W(BW)) dut (.*);

  int checks = 0;
  int failures = 0;
  bit            m_valid [N];
  logic [BW-1:0] m_bkt   [N];

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
    int n_used;
    bit m_hit;
    int fulls = 0;
    for (int i = 0; i < N; i++) m_valid[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      ins_en = 0; rm_en = 0;
      search_bucket = BW'($urandom_range(13, 0));
      #1;
      m_hit = 0; n_used = 0;
      for (int i = 0; i < N; i++) begin
        if (m_valid[i]) n_used++;
        if (m_valid[i] && m_bkt[i] == search_bucket) m_hit = 1;
      end
      check(hit == m_hit, $sformatf("hit for bucket %0d", search_bucket));
      check(full == (n_used == N), "full flag");
      check(used == (IW+1)'(n_used), "used count");
      if (full) fulls++;
      if (!hit && !full && $urandom_range(1, 0) == 1) begin
        ins_en = 1;
        m_valid[free_idx] = 1;
        m_bkt[free_idx] = search_bucket;
      end else begin
        int r;
        r = $urandom_range(N - 1, 0);
        if (m_valid[r] && $urandom_range(2, 0) == 0) begin
          rm_idx = IW'(r);
          rm_en = 1;
          m_valid[r] = 0;
        end
      end
    end
    @(negedge clk);
    ins_en = 0; rm_en = 0;
    check(fulls > 0, "the CAM became full at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
