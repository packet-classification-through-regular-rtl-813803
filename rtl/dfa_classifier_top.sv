// dfa_classifier_top: packet classifier matching regular expressions over the
// 5-tuple with a deltaFA stored in external SRAM.
//
// Data flow (one 125 MHz clock domain):
//   in_* -> datapath_ctrl --words--> packets FIFO ----------------> output_stage -> out_*
//                         --job----> job queue -> flow_cache -> result queue ->^
//                                                    |  ^ (misses)
//                                                dfa_automaton (+ local_table)
//                                                    |  ^
//                                                 sram_ctrl <-> sram_* (SRAM driver)
// The parser extracts the tuple of each packet while the packet is buffered.
// The flow cache answers known flows at once; new flows are walked through
// the deltaFA, whose states the automaton reads from SRAM through the burst
// controller. The output stage forwards matching packets with their 52-bit
// classifier output and drops the rest. The deltaFA image is loaded through
// the host write port (hw_*), and root_addr gives the row of its root state.
// The SRAM and its driver are outside this block: sram_cmd/sram_we/sram_addr/
// sram_wdata issue one command per cycle and read data returns on
// sram_rdata/sram_rvalid any number of cycles later, in order.
//
// The block structure is the one the document draws (datapath control,
// packets FIFO, deltaFA control automaton, SRAM controller) plus the flow
// cache of its optimized classifier. Queue depths, the cache size and all
// port signalling are this design's choices. The ev_* outputs pulse once per
// event and are meant for statistics counters.
module dfa_classifier_top
  import dfa_pkg::*;
#(
  parameter int unsigned PKT_FIFO_DEPTH = 1024,  // 64-bit words (8 KB)
  parameter int unsigned JOB_Q_DEPTH    = 16,
  parameter int unsigned RES_Q_DEPTH    = 16,
  parameter int unsigned CACHE_AW       = 10,    // 1024 flows
  parameter int unsigned SRAM_AW        = 19     // 512K x 72-bit rows = 4.5 MB
) (
  input  logic               clk,
  input  logic               rst_n,
  input  ptr_t               root_addr,
  // packets in
  input  logic [63:0]        in_data,
  input  logic               in_valid,
  input  logic               in_sop,
  input  logic               in_eop,
  input  logic [2:0]         in_bytes,
  output logic               in_ready,
  // packets out
  output logic [63:0]        out_data,
  output logic               out_valid,
  output logic               out_sop,
  output logic               out_eop,
  output logic [2:0]         out_bytes,
  output logic [CLASS_W-1:0] out_cls,
  output logic [LEN_W-1:0]   out_len,
  input  logic               out_ready,
  // host writes into the state memory
  input  logic               hw_valid,
  output logic               hw_ready,
  input  logic [SRAM_AW-1:0] hw_addr,
  input  row_t               hw_data,
  // SRAM driver
  output logic               sram_cmd,
  output logic               sram_we,
  output logic [SRAM_AW-1:0] sram_addr,
  output row_t               sram_wdata,
  input  row_t               sram_rdata,
  input  logic               sram_rvalid,
  // events
  output logic               ev_hit,
  output logic               ev_miss,
  output logic               ev_evict,
  output logic               ev_bypass,
  output logic               ev_type1,
  output logic               ev_type2,
  output logic               ev_conflict,
  output logic               ev_fwd,
  output logic               ev_drop
);
  // parser -> packets FIFO
  logic [67:0] p_wdata, p_rdata;
  logic        p_wvalid, p_wready, p_rvalid, p_rready;
  // parser -> job queue -> cache
  job_t        j_wdata, j_rdata;
  logic        j_wvalid, j_wready, j_rvalid, j_rready;
  // cache -> result queue -> output stage
  result_t     r_wdata, r_rdata;
  logic        r_wvalid, r_wready, r_rvalid, r_rready;
  // cache <-> automaton
  tuple_t           d_tuple;
  logic [LEN_W-1:0] d_len, d_res_len;
  logic             d_valid, d_ready, d_res_valid, d_res_ready, d_res_accept;
  logic [RES_W-1:0] d_res_result;
  // automaton <-> sram_ctrl
  logic        s_req_valid, s_req_ready, s_rd_valid, s_rd_ready;
  ptr_t        s_req_addr;
  logic [7:0]  s_req_count;
  row_t        s_rd_data;

  datapath_ctrl u_parse (
    .clk, .rst_n,
    .in_data, .in_valid, .in_sop, .in_eop, .in_bytes, .in_ready,
    .pkt_data (p_wdata), .pkt_valid (p_wvalid), .pkt_ready (p_wready),
    .job      (j_wdata), .job_valid (j_wvalid), .job_ready (j_wready)
  );

  sync_fifo #(.WIDTH(68), .DEPTH(PKT_FIFO_DEPTH)) u_pkt_fifo (
    .clk, .rst_n,
    .wr_data (p_wdata), .wr_valid (p_wvalid), .wr_ready (p_wready),
    .rd_data (p_rdata), .rd_valid (p_rvalid), .rd_ready (p_rready),
    .count   ()
  );

  sync_fifo #(.WIDTH($bits(job_t)), .DEPTH(JOB_Q_DEPTH)) u_job_q (
    .clk, .rst_n,
    .wr_data (j_wdata), .wr_valid (j_wvalid), .wr_ready (j_wready),
    .rd_data (j_rdata), .rd_valid (j_rvalid), .rd_ready (j_rready),
    .count   ()
  );

  flow_cache #(.CACHE_AW(CACHE_AW)) u_cache (
    .clk, .rst_n,
    .job (j_rdata), .job_valid (j_rvalid), .job_ready (j_rready),
    .dfa_tuple (d_tuple), .dfa_len (d_len), .dfa_valid (d_valid), .dfa_ready (d_ready),
    .dfa_res_valid (d_res_valid), .dfa_res_ready (d_res_ready),
    .dfa_res_accept (d_res_accept), .dfa_res_result (d_res_result),
    .res (r_wdata), .res_valid (r_wvalid), .res_ready (r_wready),
    .ev_hit, .ev_miss, .ev_evict, .ev_bypass
  );

  dfa_automaton u_dfa (
    .clk, .rst_n, .root_addr,
    .job_valid (d_valid), .job_ready (d_ready), .job_tuple (d_tuple), .job_len (d_len),
    .res_valid (d_res_valid), .res_ready (d_res_ready), .res_accept (d_res_accept),
    .res_result (d_res_result), .res_len (d_res_len),
    .req_valid (s_req_valid), .req_ready (s_req_ready), .req_addr (s_req_addr),
    .req_count (s_req_count),
    .rd_data (s_rd_data), .rd_valid (s_rd_valid), .rd_ready (s_rd_ready),
    .ev_type1, .ev_type2, .ev_conflict
  );

  sram_ctrl #(.SRAM_AW(SRAM_AW)) u_sram_ctrl (
    .clk, .rst_n,
    .req_valid (s_req_valid), .req_ready (s_req_ready), .req_addr (s_req_addr),
    .req_count (s_req_count),
    .rd_data (s_rd_data), .rd_valid (s_rd_valid), .rd_ready (s_rd_ready),
    .hw_valid, .hw_ready, .hw_addr, .hw_data,
    .sram_cmd, .sram_we, .sram_addr, .sram_wdata, .sram_rdata, .sram_rvalid
  );

  sync_fifo #(.WIDTH($bits(result_t)), .DEPTH(RES_Q_DEPTH)) u_res_q (
    .clk, .rst_n,
    .wr_data (r_wdata), .wr_valid (r_wvalid), .wr_ready (r_wready),
    .rd_data (r_rdata), .rd_valid (r_rvalid), .rd_ready (r_rready),
    .count   ()
  );

  output_stage u_out (
    .clk, .rst_n,
    .pkt_data (p_rdata), .pkt_valid (p_rvalid), .pkt_ready (p_rready),
    .res (r_rdata), .res_valid (r_rvalid), .res_ready (r_rready),
    .out_data, .out_valid, .out_sop, .out_eop, .out_bytes, .out_cls, .out_len, .out_ready,
    .ev_fwd, .ev_drop
  );

  // The automaton returns the length of the job it was given.
  assert property (@(posedge clk) disable iff (!rst_n) d_res_valid |-> d_res_len == d_len);

endmodule
