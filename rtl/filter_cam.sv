// filter_cam: synchronizing cache of (grouping key, partial COUNT) pairs.
//
// Every tuple first searches this CAM by its grouping key. On a hit the entry's count is
// incremented and the tuple's job ends at once (pre-aggregation on chip). On a miss, if a
// slot is free, a new entry (key, 1) is inserted and the job goes on to lock its bucket;
// if the CAM is full the job must wait for space. When a job has found or created its
// hash-table entry it reads the accumulated count of its entry and removes it in the same
// cycle, so tuples with the same key that arrive later start a fresh entry.
//
// Every entry is a register with its own comparator; all entries are compared in parallel,
// so a search completes in the same cycle (combinational hit/hit_idx). The lowest free slot
// is offered as free_idx. Updates take effect at the next clock edge:
//   inc_en : count of entry hit_idx += 1 (requires hit)
//   ins_en : entry free_idx <= (search_key, 1) (requires !hit and !full)
//   rm_en  : entry rd_idx is invalidated; rd_count/rd_key show it combinationally
// The CAM's behaviour follows the source design; its size and the port encoding are this
// design's choices. Reset clears all valid bits.
module filter_cam #(
  parameter int unsigned ENTRIES = 64,
  parameter int unsigned KEY_W   = 32,
  parameter int unsigned CNT_W   = 32,
  localparam int unsigned IDX_W  = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // search
  input  logic [KEY_W-1:0] search_key,
  output logic             hit,
  output logic [IDX_W-1:0] hit_idx,
  output logic             full,
  output logic [IDX_W-1:0] free_idx,
  // update
  input  logic             inc_en,
  input  logic             ins_en,
  input  logic             rm_en,
  input  logic [IDX_W-1:0] rd_idx,
  output logic [KEY_W-1:0] rd_key,
  output logic [CNT_W-1:0] rd_count,
  output logic [IDX_W:0]   used
);
  logic [ENTRIES-1:0] valid;
  logic [KEY_W-1:0]   keys   [ENTRIES];
  logic [CNT_W-1:0]   counts [ENTRIES];

  always_comb begin
    hit      = 1'b0;
    hit_idx  = '0;
    full     = 1'b1;
    free_idx = '0;
    used     = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (valid[i] && keys[i] == search_key) begin
        hit     = 1'b1;
        hit_idx = IDX_W'(i);
      end
      if (!valid[i]) begin
        full     = 1'b0;
        free_idx = IDX_W'(i);
      end
      used = used + (IDX_W+1)'(valid[i]);
    end
  end

  assign rd_key   = keys[rd_idx];
  assign rd_count = counts[rd_idx];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid <= '0;
    end else begin
      if (ins_en && !hit && !full) valid[free_idx] <= 1'b1;
      if (rm_en)                   valid[rd_idx]   <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (ins_en && !hit && !full) begin
      keys[free_idx]   <= search_key;
      counts[free_idx] <= CNT_W'(1);
    end
    if (inc_en && hit) counts[hit_idx] <= counts[hit_idx] + 1'b1;
  end

  assert property (@(posedge clk) disable iff (!rst_n) inc_en |-> hit)
    else $error("filter_cam: increment without a hit");
  assert property (@(posedge clk) disable iff (!rst_n) ins_en |-> (!hit && !full))
    else $error("filter_cam: insert on hit or when full");
  assert property (@(posedge clk) disable iff (!rst_n) rm_en |-> valid[rd_idx])
    else $error("filter_cam: removing an empty entry");

endmodule
