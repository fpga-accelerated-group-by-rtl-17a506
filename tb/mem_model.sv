// mem_model: behavioural model of the host memory seen through NPORTS memory channels.
// Not synthesizable; used only by the testbenches in place of the platform's memory
// controllers, crossbar and DRAM.
//
// Storage is a sparse array of 64-bit words addressed by word; words never written read
// as zero. A request is performed when it is accepted (reads sample memory, writes update
// it), and its response (read data, or a write-complete for a write) is returned on the
// same channel LATENCY .. LATENCY+JITTER cycles later, in request order, one per cycle.
// req_ready is dropped at random in STALL_PCT percent of cycles to model back-pressure.
// Testbenches load and inspect memory with write_word/read_word/clear.
module mem_model
  import agg_pkg::*;
#(
  parameter int unsigned NPORTS    = 4,
  parameter int unsigned LATENCY   = 100,
  parameter int unsigned JITTER    = 16,
  parameter int unsigned STALL_PCT = 10
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     req_valid [NPORTS],
  input  mem_req_t req       [NPORTS],
  output logic     req_ready [NPORTS],
  output logic     rsp_valid [NPORTS],
  output mem_rsp_t rsp       [NPORTS]
);
  typedef struct {
    longint   due;
    mem_rsp_t r;
  } pend_t;

  logic [DATA_W-1:0] mem [logic [ADDR_W-1:0]];
  pend_t  pend [NPORTS][$];
  longint cyc;
  longint stalls;      // cycles in which a valid request met req_ready low
  longint requests;    // accepted requests

  function automatic void write_word(logic [ADDR_W-1:0] a, logic [DATA_W-1:0] d);
    mem[a] = d;
  endfunction

  function automatic logic [DATA_W-1:0] read_word(logic [ADDR_W-1:0] a);
    return mem.exists(a) ? mem[a] : '0;
  endfunction

  function automatic void clear();
    mem.delete();
  endfunction

  initial begin
    cyc = 0;
    stalls = 0;
    requests = 0;
    for (int p = 0; p < NPORTS; p++) begin
      req_ready[p] = 1'b0;
      rsp_valid[p] = 1'b0;
      rsp[p]       = '0;
    end
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int p = 0; p < NPORTS; p++) begin
      pend_t    pe;
      mem_rsp_t r;
      rsp_valid[p] <= 1'b0;
      if (!rst_n) begin
        pend[p].delete();
        req_ready[p] <= 1'b0;
      end else begin
        if (pend[p].size() > 0 && pend[p][0].due <= cyc) begin
          pe = pend[p].pop_front();
          rsp_valid[p] <= 1'b1;
          rsp[p]       <= pe.r;
        end
        if (req_valid[p] && !req_ready[p]) stalls <= stalls + 1;
        if (req_valid[p] && req_ready[p]) begin
          requests <= requests + 1;
          r.op  = req[p].op;
          r.tag = req[p].tag;
          if (req[p].op == MEM_WR) begin
            mem[req[p].addr] = req[p].wdata;
            r.rdata = '0;
          end else begin
            r.rdata = read_word(req[p].addr);
          end
          pe.due = cyc + longint'(LATENCY) + longint'($urandom_range(JITTER, 0));
          pe.r   = r;
          pend[p].push_back(pe);
        end
        req_ready[p] <= ($urandom_range(99, 0) >= STALL_PCT);
      end
    end
  end

endmodule
