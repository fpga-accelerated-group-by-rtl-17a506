// agg_pkg: types and constants shared by the group-by aggregation engines.
//
// Memory is reached through channels in the style of the Convey HC-2ex: each channel
// carries one 64-bit (8-byte) read or write request per cycle, with a valid/ready
// handshake, and returns one response per cycle (read data, or a write-complete
// acknowledgement) carrying the request's tag. Addresses are 64-bit word addresses.
//
// Memory layout used by one engine (all words 64 bits):
//   relation : tuple i at rel_base + i; bits [31:0] primary key, bits [63:32] grouping key
//   hash table: bucket b at ht_base + b holds the index of the first node, 0 = empty
//   node pool : node k (k >= 1) at node_base + 2k and node_base + 2k + 1
//               word 0 = {grouping key, COUNT}, word 1 = index of the next node, 0 = end
// The hash table and node pool must be zero when an engine is started.
// The 8-byte tuple and its key split follow the evaluated tuple format; the node layout,
// word addressing and tag widths are this design's own choices.
package agg_pkg;

  localparam int unsigned ADDR_W = 32;   // word address width
  localparam int unsigned DATA_W = 64;   // channel data width (8 bytes)
  localparam int unsigned TAG_W  = 16;   // request tag width on a channel
  localparam int unsigned ENG_TAG_W = TAG_W - 1;  // tag bits an engine may use; the MSB
                                                  // is taken by a channel multiplexer
  localparam int unsigned KEY_W  = 32;   // grouping key
  localparam int unsigned CNT_W  = 32;   // COUNT aggregate
  localparam int unsigned PTR_W  = 32;   // node index

  // Channels of one engine
  localparam int unsigned CH_TUPLE = 0;  // streaming the relation
  localparam int unsigned CH_HT    = 1;  // bucket heads of the hash table
  localparam int unsigned CH_BLRD  = 2;  // bucket-list reads
  localparam int unsigned CH_BLWR  = 3;  // bucket-list writes
  localparam int unsigned ENG_CHANNELS  = 4;
  localparam int unsigned PAIR_CHANNELS = 5;  // a multiplexed pair

  typedef enum logic [0:0] {
    MEM_RD = 1'b0,
    MEM_WR = 1'b1
  } mem_op_e;

  typedef struct packed {
    mem_op_e             op;
    logic [ADDR_W-1:0]   addr;
    logic [DATA_W-1:0]   wdata;
    logic [TAG_W-1:0]    tag;
  } mem_req_t;

  typedef struct packed {
    mem_op_e             op;     // MEM_RD: read data, MEM_WR: write complete
    logic [DATA_W-1:0]   rdata;
    logic [TAG_W-1:0]    tag;
  } mem_rsp_t;

  typedef struct packed {
    logic [ADDR_W-1:0] rel_base;   // word address of tuple 0
    logic [ADDR_W-1:0] rel_count;  // number of tuples
    logic [ADDR_W-1:0] ht_base;    // word address of bucket 0
    logic [ADDR_W-1:0] node_base;  // node k lives at node_base + 2k
    logic [PTR_W-1:0]  node_cap;   // node indices 1 .. node_cap-1 may be allocated
  } engine_cfg_t;

  // Event counters of one engine, cleared by start
  typedef struct packed {
    logic [31:0] tuples;        // tuples taken in
    logic [31:0] filter_hits;   // tuples merged into a Filter CAM entry (early termination)
    logic [31:0] filter_waits;  // job recycled because the Filter CAM was full
    logic [31:0] lock_waits;    // job recycled because its bucket was locked (or Lock CAM full)
    logic [31:0] ht_updates;    // existing hash-table entries updated
    logic [31:0] ht_inserts;    // new hash-table entries inserted
    logic [31:0] node_reads;    // bucket-list nodes examined
    logic        overflow;      // node pool exhausted: some counts were dropped
  } engine_stats_t;

  function automatic logic [DATA_W-1:0] node_word0(logic [KEY_W-1:0] key, logic [CNT_W-1:0] cnt);
    return {key, cnt};
  endfunction

endpackage
