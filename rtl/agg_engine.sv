// agg_engine: one multithreaded group-by (COUNT) aggregation engine.
//
// Each tuple of the relation becomes a job (a hardware thread). A job never waits in
// place: whenever it issues a memory request its small context (key, bucket, CAM slots,
// current node) stays in a register file and the engine's single execution stage moves on
// to another job. Each cycle the stage takes one event, in this order of priority:
//   1. a memory response (bucket-list write, bucket-list read, hash-table channel),
//   2. alternately a recycled job from the ready FIFO or a new tuple (if a job id is free).
// and advances that job by one step of the workflow:
//   Filter CAM: hit -> count += 1, job ends (early termination);
//               miss, full -> job is recycled through the ready FIFO;
//               miss -> insert (key, 1), then in the same cycle
//   Lock CAM:   bucket hit (locked) or CAM full -> job recycled; miss -> lock acquired,
//               read of the bucket head is sent on the hash-table channel.
//   Bucket list: walk the list node by node (word 0 key/count, then word 1 next).
//               Key found -> take and remove the Filter CAM entry, write count+partial.
//               End of list -> take and remove the Filter CAM entry, write a new node
//               (key, partial) from the node pool, then link it to the list tail (or to the
//               bucket head if the bucket was empty).
//   Release:    after the last write is acknowledged the Lock CAM entry is removed.
// A job has at most one memory request outstanding, so request and response buffers of
// NJOBS entries never overflow and responses need no back-pressure.
//
// Interface: start (one cycle) loads cfg (see agg_pkg for the memory layout) and clears
// stats; done rises when the relation has been read and every job has finished, and stays
// high until the next start. Four channels, indexed CH_TUPLE, CH_HT, CH_BLRD, CH_BLWR.
// Response tags carry the job id. Hash table and node pool must be zero at start.
// The job workflow, the two CAMs, the ready-FIFO recycling and the four channels follow
// the source design; the node layout, tail insertion, event priorities, job count and
// CAM sizes are this design's own choices.
module agg_engine
  import agg_pkg::*;
#(
  parameter int unsigned NJOBS          = 128,
  parameter int unsigned FILTER_ENTRIES = 64,
  parameter int unsigned LOCK_ENTRIES   = 64,
  parameter int unsigned BUCKET_W       = 20,
  parameter int unsigned TUPLE_FIFO     = 256
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  engine_cfg_t   cfg,
  output logic          busy,
  output logic          done,
  output engine_stats_t stats,
  // memory channels
  output logic          chan_req_valid [ENG_CHANNELS],
  output mem_req_t      chan_req       [ENG_CHANNELS],
  input  logic          chan_req_ready [ENG_CHANNELS],
  input  logic          chan_rsp_valid [ENG_CHANNELS],
  input  mem_rsp_t      chan_rsp       [ENG_CHANNELS]
);
  localparam int unsigned JW = $clog2(NJOBS);
  localparam int unsigned FW = (FILTER_ENTRIES > 1) ? $clog2(FILTER_ENTRIES) : 1;
  localparam int unsigned LW = (LOCK_ENTRIES > 1) ? $clog2(LOCK_ENTRIES) : 1;
  localparam int unsigned RQW = $bits(mem_req_t);
  localparam int unsigned RSW = $bits(mem_rsp_t);

  // A job id travels in the request tag; the top tag bit belongs to a channel multiplexer.
  if (JW > ENG_TAG_W) begin : g_tag_check
    $error("agg_engine: NJOBS needs more tag bits than ENG_TAG_W");
  end

  typedef enum logic [2:0] {
    J_FILTER,     // waiting for a Filter CAM search / slot
    J_LOCK,       // owns a Filter CAM entry, waiting for its bucket lock
    J_HT_RD,      // bucket-head read outstanding
    J_NODE_KEY,   // node word 0 read outstanding
    J_NODE_NEXT,  // node word 1 read outstanding
    J_WR_UPD,     // count update write outstanding
    J_WR_NODE,    // new-node write outstanding
    J_WR_LINK     // link write (tail next or bucket head) outstanding
  } jstate_e;

  typedef struct packed {
    jstate_e             st;
    logic [KEY_W-1:0]    key;
    logic [BUCKET_W-1:0] bucket;
    logic [FW-1:0]       fidx;
    logic [LW-1:0]       lidx;
    logic [PTR_W-1:0]    ptr;    // node being read, or list tail (0: bucket was empty)
    logic [PTR_W-1:0]    node;   // newly allocated node
  } ctx_t;

  typedef enum logic [2:0] {EV_NONE, EV_BLWR, EV_BLRD, EV_HT, EV_RECYCLE, EV_NEW} ev_e;

  // ------------------------------------------------------------------ configuration
  engine_cfg_t cfg_q;
  logic        running;
  logic [PTR_W-1:0] node_next;

  // ------------------------------------------------------------------ tuple stream
  logic             key_valid, key_ready, all_read;
  logic [KEY_W-1:0] tkey;

  tuple_reader #(.FIFO_DEPTH(TUPLE_FIFO)) u_reader (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .rel_base  (cfg.rel_base),
    .rel_count (cfg.rel_count),
    .req_valid (chan_req_valid[CH_TUPLE]),
    .req       (chan_req[CH_TUPLE]),
    .req_ready (chan_req_ready[CH_TUPLE]),
    .rsp_valid (chan_rsp_valid[CH_TUPLE]),
    .rsp       (chan_rsp[CH_TUPLE]),
    .key_valid (key_valid),
    .key       (tkey),
    .key_ready (key_ready),
    .all_read  (all_read)
  );

  // ------------------------------------------------------------------ channel buffers
  // index 0: CH_HT, 1: CH_BLRD, 2: CH_BLWR
  logic           rq_push  [3];
  mem_req_t       rq_wdata;
  logic [RQW-1:0] rq_rdata [3];
  logic           rq_empty [3];
  logic           rq_full  [3];
  logic           rs_pop   [3];
  logic [RSW-1:0] rs_rdata [3];
  logic           rs_empty [3];
  logic           rs_full  [3];

  for (genvar c = 0; c < 3; c++) begin : g_chan
    localparam int unsigned CH = c + 1;
    logic [JW:0] rq_count, rs_count;

    sync_fifo #(.WIDTH(RQW), .DEPTH(NJOBS)) u_req_q (
      .clk   (clk),
      .rst_n (rst_n),
      .push  (rq_push[c]),
      .wdata (rq_wdata),
      .pop   (chan_req_valid[CH] && chan_req_ready[CH]),
      .rdata (rq_rdata[c]),
      .empty (rq_empty[c]),
      .full  (rq_full[c]),
      .count (rq_count)
    );
    assign chan_req_valid[CH] = !rq_empty[c];
    assign chan_req[CH]       = mem_req_t'(rq_rdata[c]);

    sync_fifo #(.WIDTH(RSW), .DEPTH(NJOBS)) u_rsp_q (
      .clk   (clk),
      .rst_n (rst_n),
      .push  (chan_rsp_valid[CH]),
      .wdata (chan_rsp[CH]),
      .pop   (rs_pop[c]),
      .rdata (rs_rdata[c]),
      .empty (rs_empty[c]),
      .full  (rs_full[c]),
      .count (rs_count)
    );

    assert property (@(posedge clk) disable iff (!rst_n) !(chan_rsp_valid[CH] && rs_full[c]))
      else $error("agg_engine: response buffer overflow");
    assert property (@(posedge clk) disable iff (!rst_n) !(rq_push[c] && rq_full[c]))
      else $error("agg_engine: request buffer overflow");
  end

  // ------------------------------------------------------------------ ready (recycle) FIFO
  logic          rc_push, rc_pop, rc_empty, rc_full;
  logic [JW-1:0] rc_wdata, rc_rdata;
  logic [JW:0]   rc_count;

  sync_fifo #(.WIDTH(JW), .DEPTH(NJOBS)) u_ready_q (
    .clk   (clk),
    .rst_n (rst_n),
    .push  (rc_push),
    .wdata (rc_wdata),
    .pop   (rc_pop),
    .rdata (rc_rdata),
    .empty (rc_empty),
    .full  (rc_full),
    .count (rc_count)
  );

  // ------------------------------------------------------------------ job contexts
  ctx_t            ctx [NJOBS];
  logic [NJOBS-1:0] job_free;
  logic            any_free;
  logic [JW-1:0]   free_id;

  always_comb begin
    any_free = 1'b0;
    free_id  = '0;
    for (int i = NJOBS - 1; i >= 0; i--) begin
      if (job_free[i]) begin
        any_free = 1'b1;
        free_id  = JW'(i);
      end
    end
  end

  // ------------------------------------------------------------------ CAMs and hash
  logic [BUCKET_W-1:0] bucket;
  logic                f_hit, f_full, f_inc, f_ins, f_rm;
  logic [FW-1:0]       f_hit_idx, f_free_idx, f_rd_idx;
  logic [KEY_W-1:0]    f_rd_key;
  logic [CNT_W-1:0]    f_rd_count;
  logic [FW:0]         f_used;
  logic                l_hit, l_full, l_ins, l_rm;
  logic [LW-1:0]       l_free_idx, l_rm_idx;
  logic [LW:0]         l_used;
  ctx_t                cur;

  key_hash #(.KEY_W(KEY_W), .BUCKET_W(BUCKET_W)) u_hash (
    .key    (cur.key),
    .bucket (bucket)
  );

  filter_cam #(.ENTRIES(FILTER_ENTRIES), .KEY_W(KEY_W), .CNT_W(CNT_W)) u_filter (
    .clk        (clk),
    .rst_n      (rst_n),
    .search_key (cur.key),
    .hit        (f_hit),
    .hit_idx    (f_hit_idx),
    .full       (f_full),
    .free_idx   (f_free_idx),
    .inc_en     (f_inc),
    .ins_en     (f_ins),
    .rm_en      (f_rm),
    .rd_idx     (f_rd_idx),
    .rd_key     (f_rd_key),
    .rd_count   (f_rd_count),
    .used       (f_used)
  );

  lock_cam #(.ENTRIES(LOCK_ENTRIES), .BUCKET_W(BUCKET_W)) u_lock (
    .clk           (clk),
    .rst_n         (rst_n),
    .search_bucket (bucket),
    .hit           (l_hit),
    .full          (l_full),
    .free_idx      (l_free_idx),
    .ins_en        (l_ins),
    .rm_en         (l_rm),
    .rm_idx        (l_rm_idx),
    .used          (l_used)
  );

  // ------------------------------------------------------------------ event selection
  ev_e           ev;
  logic          prefer_new;
  logic [JW-1:0] jid;
  mem_rsp_t      ev_rsp;

  always_comb begin
    ev     = EV_NONE;
    jid    = '0;
    ev_rsp = '0;
    if (!rs_empty[2]) begin
      ev = EV_BLWR;  ev_rsp = mem_rsp_t'(rs_rdata[2]);
    end else if (!rs_empty[1]) begin
      ev = EV_BLRD;  ev_rsp = mem_rsp_t'(rs_rdata[1]);
    end else if (!rs_empty[0]) begin
      ev = EV_HT;    ev_rsp = mem_rsp_t'(rs_rdata[0]);
    end else if (!rc_empty && !(prefer_new && running && key_valid && any_free)) begin
      ev = EV_RECYCLE;
    end else if (running && key_valid && any_free) begin
      ev = EV_NEW;
    end
    case (ev)
      EV_BLWR, EV_BLRD, EV_HT: jid = ev_rsp.tag[JW-1:0];
      EV_RECYCLE:              jid = rc_rdata;
      EV_NEW:                  jid = free_id;
      default:                 jid = '0;
    endcase
  end

  always_comb begin
    if (ev == EV_NEW) begin
      cur     = '0;
      cur.st  = J_FILTER;
      cur.key = tkey;
    end else begin
      cur = ctx[jid];
    end
  end

  assign rs_pop[2]  = (ev == EV_BLWR);
  assign rs_pop[1]  = (ev == EV_BLRD);
  assign rs_pop[0]  = (ev == EV_HT);
  assign rc_pop     = (ev == EV_RECYCLE);
  assign key_ready  = (ev == EV_NEW);

  // ------------------------------------------------------------------ job step
  ctx_t          nxt;
  logic          ctx_we;      // write nxt into ctx[jid]
  logic          job_alloc;   // jid becomes busy
  logic          job_done;    // jid becomes free
  logic          node_take;
  logic          s_filter_hit, s_filter_wait, s_lock_wait, s_update, s_insert, s_node, s_ovf;
  logic [PTR_W-1:0] rsp_ptr;

  function automatic logic [ADDR_W-1:0] node_addr(logic [ADDR_W-1:0] base,
                                                   logic [PTR_W-1:0] idx, logic word);
    return base + ADDR_W'({idx, word});
  endfunction

  always_comb begin
    nxt        = cur;
    ctx_we     = 1'b0;
    job_alloc  = 1'b0;
    job_done   = 1'b0;
    node_take  = 1'b0;
    f_inc      = 1'b0;
    f_ins      = 1'b0;
    f_rm       = 1'b0;
    f_rd_idx   = cur.fidx;
    l_ins      = 1'b0;
    l_rm       = 1'b0;
    l_rm_idx   = cur.lidx;
    rc_push    = 1'b0;
    rc_wdata   = jid;
    rq_push[0] = 1'b0;
    rq_push[1] = 1'b0;
    rq_push[2] = 1'b0;
    rq_wdata   = '0;
    rq_wdata.tag = TAG_W'(jid);
    s_filter_hit  = 1'b0;
    s_filter_wait = 1'b0;
    s_lock_wait   = 1'b0;
    s_update      = 1'b0;
    s_insert      = 1'b0;
    s_node        = 1'b0;
    s_ovf         = 1'b0;
    rsp_ptr       = ev_rsp.rdata[PTR_W-1:0];

    unique case (ev)
      EV_NEW, EV_RECYCLE: begin
        if (ev == EV_NEW) job_alloc = 1'b1;
        ctx_we = 1'b1;
        if (cur.st == J_FILTER) begin
          if (f_hit) begin
            // merged into the cached partial aggregate: the job ends here
            f_inc        = 1'b1;
            job_alloc    = 1'b0;
            job_done     = (ev == EV_RECYCLE);
            ctx_we       = 1'b0;
            s_filter_hit = 1'b1;
          end else if (f_full) begin
            rc_push       = 1'b1;
            s_filter_wait = 1'b1;
          end else begin
            f_ins    = 1'b1;
            nxt.fidx = f_free_idx;
            nxt.st   = J_LOCK;
          end
        end
        if (cur.st == J_LOCK || f_ins) begin
          nxt.bucket = bucket;
          if (l_hit || l_full) begin
            rc_push     = 1'b1;
            s_lock_wait = 1'b1;
          end else begin
            l_ins         = 1'b1;
            nxt.lidx      = l_free_idx;
            nxt.st        = J_HT_RD;
            rq_push[0]    = 1'b1;
            rq_wdata.op   = MEM_RD;
            rq_wdata.addr = cfg_q.ht_base + ADDR_W'(bucket);
          end
        end
      end

      EV_HT: begin
        ctx_we = 1'b1;
        if (cur.st == J_HT_RD) begin
          if (rsp_ptr == '0) begin
            nxt.ptr = '0;           // empty bucket: new node becomes the head
            node_take = 1'b1;
          end else begin
            nxt.ptr       = rsp_ptr;
            nxt.st        = J_NODE_KEY;
            rq_push[1]    = 1'b1;
            rq_wdata.op   = MEM_RD;
            rq_wdata.addr = node_addr(cfg_q.node_base, rsp_ptr, 1'b0);
            s_node        = 1'b1;
          end
        end else begin
          // J_WR_LINK: bucket head written, release the lock
          l_rm     = 1'b1;
          job_done = 1'b1;
        end
      end

      EV_BLRD: begin
        ctx_we = 1'b1;
        if (cur.st == J_NODE_KEY) begin
          if (ev_rsp.rdata[DATA_W-1 -: KEY_W] == cur.key) begin
            f_rm          = 1'b1;
            nxt.st        = J_WR_UPD;
            rq_push[2]    = 1'b1;
            rq_wdata.op   = MEM_WR;
            rq_wdata.addr = node_addr(cfg_q.node_base, cur.ptr, 1'b0);
            rq_wdata.wdata = node_word0(cur.key, ev_rsp.rdata[CNT_W-1:0] + f_rd_count);
            s_update      = 1'b1;
          end else begin
            nxt.st        = J_NODE_NEXT;
            rq_push[1]    = 1'b1;
            rq_wdata.op   = MEM_RD;
            rq_wdata.addr = node_addr(cfg_q.node_base, cur.ptr, 1'b1);
          end
        end else begin
          // J_NODE_NEXT
          if (rsp_ptr == '0) begin
            node_take = 1'b1;       // cur.ptr is the list tail
          end else begin
            nxt.ptr       = rsp_ptr;
            nxt.st        = J_NODE_KEY;
            rq_push[1]    = 1'b1;
            rq_wdata.op   = MEM_RD;
            rq_wdata.addr = node_addr(cfg_q.node_base, rsp_ptr, 1'b0);
            s_node        = 1'b1;
          end
        end
      end

      EV_BLWR: begin
        ctx_we = 1'b1;
        if (cur.st == J_WR_NODE) begin
          nxt.st         = J_WR_LINK;
          rq_wdata.op    = MEM_WR;
          rq_wdata.wdata = DATA_W'(cur.node);
          if (cur.ptr == '0) begin
            rq_push[0]    = 1'b1;
            rq_wdata.addr = cfg_q.ht_base + ADDR_W'(cur.bucket);
          end else begin
            rq_push[2]    = 1'b1;
            rq_wdata.addr = node_addr(cfg_q.node_base, cur.ptr, 1'b1);
          end
        end else begin
          // J_WR_UPD or J_WR_LINK on a list tail: done, release the lock
          l_rm     = 1'b1;
          job_done = 1'b1;
        end
      end

      default: ;
    endcase

    // insertion of a new node at the end of the bucket list
    if (node_take) begin
      f_rm = 1'b1;
      if (node_next >= cfg_q.node_cap) begin
        // node pool exhausted: drop this partial count and release everything
        s_ovf    = 1'b1;
        l_rm     = 1'b1;
        job_done = 1'b1;
      end else begin
        nxt.node       = node_next;
        nxt.st         = J_WR_NODE;
        rq_push[2]     = 1'b1;
        rq_wdata.op    = MEM_WR;
        rq_wdata.addr  = node_addr(cfg_q.node_base, node_next, 1'b0);
        rq_wdata.wdata = node_word0(cur.key, f_rd_count);
        s_insert       = 1'b1;
      end
    end
  end

  // ------------------------------------------------------------------ state
  logic jobs_idle;
  assign jobs_idle = &job_free;

  always_ff @(posedge clk) begin
    if (ctx_we) ctx[jid] <= nxt;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      job_free   <= '1;
      prefer_new <= 1'b0;
      running    <= 1'b0;
      done       <= 1'b0;
      cfg_q      <= '0;
      node_next  <= PTR_W'(1);
      stats      <= '0;
    end else begin
      if (job_alloc) job_free[jid] <= 1'b0;
      if (job_done)  job_free[jid] <= 1'b1;
      if (ev == EV_NEW)     prefer_new <= 1'b0;
      if (ev == EV_RECYCLE) prefer_new <= 1'b1;
      if (s_insert) node_next <= node_next + 1'b1;

      if (ev == EV_NEW)  stats.tuples       <= stats.tuples + 1'b1;
      if (s_filter_hit)  stats.filter_hits  <= stats.filter_hits + 1'b1;
      if (s_filter_wait) stats.filter_waits <= stats.filter_waits + 1'b1;
      if (s_lock_wait)   stats.lock_waits   <= stats.lock_waits + 1'b1;
      if (s_update)      stats.ht_updates   <= stats.ht_updates + 1'b1;
      if (s_insert)      stats.ht_inserts   <= stats.ht_inserts + 1'b1;
      if (s_node)        stats.node_reads   <= stats.node_reads + 1'b1;
      if (s_ovf)         stats.overflow     <= 1'b1;

      if (start) begin
        cfg_q     <= cfg;
        running   <= 1'b1;
        done      <= 1'b0;
        node_next <= PTR_W'(1);
        stats     <= '0;
      end else if (running && all_read && !key_valid && jobs_idle) begin
        running <= 1'b0;
        done    <= 1'b1;
      end
    end
  end

  assign busy = running;

  // ------------------------------------------------------------------ checks
  assert property (@(posedge clk) disable iff (!rst_n) !(rc_push && rc_full))
    else $error("agg_engine: ready FIFO overflow");
  assert property (@(posedge clk) disable iff (!rst_n)
                   (ev == EV_BLWR || ev == EV_BLRD || ev == EV_HT) |-> !job_free[jid])
    else $error("agg_engine: response for a job that is not active");
  assert property (@(posedge clk) disable iff (!rst_n) !(start && running))
    else $error("agg_engine: start while running");

endmodule
