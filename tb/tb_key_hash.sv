// tb_key_hash: compares the bucket index with the multiplicative hash computed in 64-bit
// arithmetic, and checks that 4096 consecutive keys spread over all 256 buckets of an
// 8-bit table with no bucket holding more than twice its share.
module tb_key_hash;
  localparam int unsigned BW = 8;
  logic [31:0]   key;
  logic [BW-1:0] bucket;

  key_hash #(.KEY_W(32), .BUCKET_W(BW)) dut (.key, .bucket);

  int checks = 0;
  int failures = 0;
  int hist [1 << BW];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned p;
    int maxc;
    for (int i = 0; i < (1 << BW); i++) hist[i] = 0;
    for (int i = 0; i < 4096 + 500; i++) begin
      key = (i < 4096) ? 32'(i) : $urandom;
      #1;
      p = (longint'(key) * 64'd2654435761) % 64'h1_0000_0000;
      check(bucket == BW'(p >> (32 - BW)), $sformatf("bucket of key %0h", key));
      if (i < 4096) hist[bucket]++;
    end
    maxc = 0;
    for (int i = 0; i < (1 << BW); i++) begin
      check(hist[i] > 0, $sformatf("bucket %0d never used", i));
      if (hist[i] > maxc) maxc = hist[i];
    end
    check(maxc <= 2 * 4096 / (1 << BW), $sformatf("largest bucket holds %0d keys", maxc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
