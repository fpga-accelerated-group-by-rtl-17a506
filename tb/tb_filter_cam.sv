// tb_filter_cam: random search / increment / insert / remove traffic on a small Filter CAM,
// checked against a reference model kept in testbench arrays (slot -> key, count).
// Also checks: full is raised exactly when every slot holds a key, free_idx points at an
// empty slot, a removed entry returns the accumulated count, and a key inserted after its
// entry was removed starts again at count 1.
module tb_filter_cam;
  localparam int unsigned N = 8;
  localparam int unsigned IW = $clog2(N);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = !clk;

  logic [31:0]   search_key = '0;
  logic          hit, full, inc_en = 0, ins_en = 0, rm_en = 0;
  logic [IW-1:0] hit_idx, free_idx, rd_idx = '0;
  logic [31:0]   rd_key, rd_count;
  logic [IW:0]   used;

  filter_cam #(.ENTRIES(N), .KEY_W(32), .CNT_W(32)) dut (.*);

  int checks = 0;
  int failures = 0;
  bit          m_valid [N];
  logic [31:0] m_key   [N];
  logic [31:0] m_cnt   [N];

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
    int slot, n_used;
    bit m_hit;
    for (int i = 0; i < N; i++) m_valid[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      inc_en = 0; ins_en = 0; rm_en = 0;
      search_key = 32'(100 + $urandom_range(11, 0));
      #1;
      m_hit = 0; slot = -1; n_used = 0;
      for (int i = 0; i < N; i++) begin
        if (m_valid[i]) n_used++;
        if (m_valid[i] && m_key[i] == search_key) begin m_hit = 1; slot = i; end
      end
      check(hit == m_hit, $sformatf("hit for key %0d", search_key));
      if (m_hit) check(hit_idx == IW'(slot), "hit index");
      check(full == (n_used == N), "full flag");
      check(used == (IW+1)'(n_used), "used count");
      if (!full) check(!m_valid[free_idx], "free index points to an empty slot");
      case ($urandom_range(2, 0))
        0: if (hit) begin
             inc_en = 1;
             m_cnt[slot]++;
           end
        1: if (!hit && !full) begin
             ins_en = 1;
             m_valid[free_idx] = 1; m_key[free_idx] = search_key; m_cnt[free_idx] = 1;
           end
        default: begin
          int r;
          r = $urandom_range(N - 1, 0);
          if (m_valid[r]) begin
            rd_idx = IW'(r);
            #1;
            check(rd_key == m_key[r] && rd_count == m_cnt[r],
                  $sformatf("removed entry %0d: (%0d,%0d) expected (%0d,%0d)",
                            r, rd_key, rd_count, m_key[r], m_cnt[r]));
            rm_en = 1;
            m_valid[r] = 0;
          end
        end
      endcase
    end
    @(negedge clk);
    inc_en = 0; ins_en = 0; rm_en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
