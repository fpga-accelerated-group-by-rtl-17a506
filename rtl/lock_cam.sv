// lock_cam: set of locked hash buckets, one exclusive lock per entry.
//
// A job that owns a Filter CAM entry searches this CAM with the bucket index of its key.
// A hit means another job is searching or modifying that bucket's list, and the job must
// wait and retry. A miss inserts the bucket index (the lock is acquired) and the job may
// read the bucket head. When the job's last hash-table write has completed, its entry is
// removed (the lock is released). Serializing all accesses to a bucket through this CAM
// keeps the read-modify-write of a bucket list atomic without memory-side locks.
//
// All entries are compared in parallel; search results are combinational. The lowest free
// slot is offered as free_idx. Updates take effect at the next clock edge:
//   ins_en : entry free_idx <= search_bucket (requires !hit and !full)
//   rm_en  : entry rm_idx is invalidated
// Behaviour follows the source design; size and port encoding are this design's choices.
module lock_cam #(
  parameter int unsigned ENTRIES  = 64,
  parameter int unsigned BUCKET_W = 20,
  localparam int unsigned IDX_W   = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [BUCKET_W-1:0] search_bucket,
  output logic                hit,
  output logic                full,
  output logic [IDX_W-1:0]    free_idx,
  input  logic                ins_en,
  input  logic                rm_en,
  input  logic [IDX_W-1:0]    rm_idx,
  output logic [IDX_W:0]      used
);
  logic [ENTRIES-1:0] valid;
  logic [BUCKET_W-1:0] buckets [ENTRIES];

  always_comb begin
    hit      = 1'b0;
    full     = 1'b1;
    free_idx = '0;
    used     = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (valid[i] && buckets[i] == search_bucket) hit = 1'b1;
      if (!valid[i]) begin
        full     = 1'b0;
        free_idx = IDX_W'(i);
      end
      used = used + (IDX_W+1)'(valid[i]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid <= '0;
    end else begin
      if (ins_en && !hit && !full) valid[free_idx] <= 1'b1;
      if (rm_en)                   valid[rm_idx]   <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (ins_en && !hit && !full) buckets[free_idx] <= search_bucket;
  end

  assert property (@(posedge clk) disable iff (!rst_n) ins_en |-> (!hit && !full))
    else $error("lock_cam: insert on hit or when full");
  assert property (@(posedge clk) disable iff (!rst_n) rm_en |-> valid[rm_idx])
    else $error("lock_cam: releasing a lock that is not held");

endmodule
