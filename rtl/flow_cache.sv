// flow_cache: per-flow result cache in front of the deltaFA automaton.
//
// Packets of one flow share their 5-tuple and therefore their classification.
// This block keeps the result of each recently seen flow in a hash table held
// in block RAM: 2**CACHE_AW entries, direct mapped, each holding a valid bit,
// the full 104-bit tuple as key, the match flag and the 52-bit classifier
// output. For each job the table row selected by the hash of the tuple is
// read (one cycle); on a hit the cached result is returned at once, on a miss
// the tuple is handed to the automaton, and its answer is both returned and
// written over that row (the older flow is evicted). Jobs that are not IPv4
// are not classified and are returned as non-matching. Jobs are served one at
// a time, so results leave in job order.
//
// The document asks for a flow cache kept as a hash table in BRAM and gives
// no size, hash function, associativity or replacement rule: the 1024-entry
// direct-mapped table, the XOR-folding hash and replace-on-miss are this
// design's. After reset the table is swept invalid, one row per cycle, before
// the first job is taken (busy during 2**CACHE_AW cycles).
module flow_cache
  import dfa_pkg::*;
#(
  parameter int unsigned CACHE_AW = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  // jobs from the parser
  input  job_t             job,
  input  logic             job_valid,
  output logic             job_ready,
  // misses to the automaton
  output tuple_t           dfa_tuple,
  output logic [LEN_W-1:0] dfa_len,
  output logic             dfa_valid,
  input  logic             dfa_ready,
  input  logic             dfa_res_valid,
  output logic             dfa_res_ready,
  input  logic             dfa_res_accept,
  input  logic [RES_W-1:0] dfa_res_result,
  // results, in job order
  output result_t          res,
  output logic             res_valid,
  input  logic             res_ready,
  // activity, for statistics
  output logic             ev_hit,
  output logic             ev_miss,
  output logic             ev_evict,
  output logic             ev_bypass
);
  typedef struct packed {
    logic               valid;
    tuple_t             key;
    logic               match;
    logic [CLASS_W-1:0] cls;
  } entry_t;

  typedef enum logic [2:0] {S_INIT, S_IDLE, S_LOOK, S_MISS_REQ, S_MISS_WAIT, S_OUT} state_e;

  state_e              st;
  job_t                job_q;
  logic [CACHE_AW-1:0] idx_q;
  entry_t              rd_q;
  result_t             res_q;

  entry_t              mem [2**CACHE_AW];
  logic                mem_we;
  logic [CACHE_AW-1:0] mem_waddr;
  entry_t              mem_wdata;

  // XOR-fold the 104-bit tuple down to CACHE_AW bits.
  function automatic logic [CACHE_AW-1:0] hash(tuple_t t);
    logic [CACHE_AW-1:0] h;
    logic [$bits(tuple_t)-1:0] flat;
    flat = t;
    h = '0;
    for (int i = 0; i < $bits(tuple_t); i++)
      h[i % CACHE_AW] ^= flat[i];
    return h;
  endfunction

  wire [CACHE_AW-1:0] job_idx = hash(job.tuple);
  wire take_job = (st == S_IDLE) && job_valid;

  always_ff @(posedge clk) begin
    if (take_job) rd_q <= mem[job_idx];
    if (mem_we)   mem[mem_waddr] <= mem_wdata;
  end

  wire hit = rd_q.valid && (rd_q.key == job_q.tuple);

  always_comb begin
    mem_we    = 1'b0;
    mem_waddr = idx_q;
    mem_wdata = '0;
    if (st == S_INIT) begin
      mem_we = 1'b1;
    end else if (st == S_MISS_WAIT && dfa_res_valid) begin
      mem_we          = 1'b1;
      mem_wdata.valid = 1'b1;
      mem_wdata.key   = job_q.tuple;
      mem_wdata.match = dfa_res_accept;
      mem_wdata.cls   = dfa_res_result[CLASS_W-1:0];
    end
  end

  assign job_ready     = (st == S_IDLE);
  assign dfa_valid     = (st == S_MISS_REQ);
  assign dfa_tuple     = job_q.tuple;
  assign dfa_len       = job_q.len;
  assign dfa_res_ready = (st == S_MISS_WAIT);
  assign res_valid     = (st == S_OUT);
  assign res           = res_q;

  assign ev_hit    = (st == S_LOOK) && hit;
  assign ev_miss   = (st == S_LOOK) && !hit;
  assign ev_evict  = (st == S_LOOK) && !hit && rd_q.valid;
  assign ev_bypass = take_job && !job.is_ipv4;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= S_INIT;
      job_q <= '0;
      idx_q <= '0;
      res_q <= '0;
    end else begin
      case (st)
        S_INIT: begin
          idx_q <= idx_q + 1'b1;
          if (idx_q == '1) st <= S_IDLE;
        end
        S_IDLE:
          if (job_valid) begin
            job_q <= job;
            idx_q <= job_idx;
            if (job.is_ipv4) st <= S_LOOK;
            else begin
              res_q <= '{match: 1'b0, cls: '0, len: job.len};
              st    <= S_OUT;
            end
          end
        S_LOOK:
          if (hit) begin
            res_q <= '{match: rd_q.match, cls: rd_q.cls, len: job_q.len};
            st    <= S_OUT;
          end else begin
            st <= S_MISS_REQ;
          end
        S_MISS_REQ:
          if (dfa_ready) st <= S_MISS_WAIT;
        S_MISS_WAIT:
          if (dfa_res_valid) begin
            res_q <= '{match: dfa_res_accept, cls: dfa_res_result[CLASS_W-1:0], len: job_q.len};
            st    <= S_OUT;
          end
        S_OUT:
          if (res_ready) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
