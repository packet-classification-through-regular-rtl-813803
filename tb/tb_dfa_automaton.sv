// tb_dfa_automaton: self-checking test of the deltaFA walker.
//
// A random deltaFA image (dfa_image_pkg) is served by a behavioural model of
// the burst-read stream: each request is answered, D cycles after it is
// accepted, by its rows in order. Random tuples are classified and the
// accept flag, classification result and length are compared with the
// reference DFA run. Phase 1 streams without gaps and checks the exact cycle
// count of every job: per visited state 2D + rows + 3 cycles (D + 3 when the
// state stores nothing), plus one per bank conflict, plus D + 3 for the final
// header and the hand-over cycles. Phase 2 adds random gaps in the stream
// and random result back-pressure and checks the results only.
module tb_dfa_automaton;
  import dfa_pkg::*;
  import dfa_image_pkg::*;

  localparam int unsigned D = 3;
  localparam int unsigned BASE = 100;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             job_valid, job_ready;
  tuple_t           job_tuple;
  logic [LEN_W-1:0] job_len;
  logic             res_valid, res_ready, res_accept;
  logic [RES_W-1:0] res_result;
  logic [LEN_W-1:0] res_len;
  logic             req_valid, req_ready;
  ptr_t             req_addr;
  logic [7:0]       req_count;
  row_t             rd_data;
  logic             rd_valid, rd_ready;
  logic             ev_type1, ev_type2, ev_conflict;

  dfa_automaton dut (
    .clk, .rst_n, .root_addr (24'(BASE)),
    .job_valid, .job_ready, .job_tuple, .job_len,
    .res_valid, .res_ready, .res_accept, .res_result, .res_len,
    .req_valid, .req_ready, .req_addr, .req_count,
    .rd_data, .rd_valid, .rd_ready,
    .ev_type1, .ev_type2, .ev_conflict
  );

  dfa_image img;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) begin cyc <= cyc + 1; end

  // Stream model
  int unsigned q_addr[$];
  longint      ready_at;
  bit          gaps = 0;
  bit          gap_now;
  // The model's outputs change only on the falling edge, so the rising
  // edge always samples settled handshake signals.
  always @(negedge clk) begin
    req_ready <= (q_addr.size() == 0);
    rd_valid  <= (q_addr.size() != 0) && (cyc >= ready_at) && !gap_now;
    rd_data   <= (q_addr.size() != 0) ? img.row_at(q_addr[0]) : '0;
  end

  always @(posedge clk) begin
    gap_now <= gaps && ($urandom_range(3) == 0);
    if (rd_valid && rd_ready) void'(q_addr.pop_front());
    if (req_valid && req_ready) begin
      for (int i = 0; i < req_count; i++) q_addr.push_back(req_addr + i);
      ready_at <= cyc + D;
    end
  end

  int conflicts = 0, n_t1 = 0, n_t2 = 0;
  always @(posedge clk) begin
    if (ev_conflict) conflicts++;
    if (ev_type1) n_t1++;
    if (ev_type2) n_t2++;
  end

  bit rr_random = 0;
  always @(posedge clk) res_ready <= rr_random ? ($urandom_range(2) != 0) : 1'b1;

  function automatic int unsigned expected_cycles(tuple_t t);
    int unsigned s, total, body;
    s = 0; total = 1;
    for (int i = 0; i < TUPLE_LEN; i++) begin
      body = img.type2[s] ? (img.nstored[s] + 1) / 2 : 4 + (img.nstored[s] + 2) / 3;
      total += (body == 0) ? D + 3 : 2 * D + body + 3;
      s = img.trans[s][tuple_char(t, i)];
    end
    return total + D + 1;
  endfunction

  task automatic do_job(tuple_t t, bit check_time);
    longint t0;
    int c0, exp_s;
    logic [LEN_W-1:0] len;
    len = 16'($urandom);
    @(negedge clk);
    job_tuple = t; job_len = len; job_valid = 1;
    while (!job_ready) @(negedge clk);
    t0 = cyc; c0 = conflicts;
    @(negedge clk);
    job_valid = 0;
    while (!(res_valid && res_ready)) @(negedge clk);
    exp_s = img.run(t);
    checks++;
    if (res_accept !== img.accept[exp_s] || res_result !== img.result[exp_s] || res_len !== len) begin
      failures++;
      $display("FAIL tuple %h: got acc=%b res=%h len=%h, want acc=%b res=%h (state %0d)",
               t, res_accept, res_result, res_len, img.accept[exp_s], img.result[exp_s], exp_s);
    end
    if (check_time) begin
      checks++;
      if (cyc - t0 != longint'(expected_cycles(t) + (conflicts - c0))) begin
        failures++;
        $display("FAIL timing: %0d cycles, want %0d (+%0d conflicts)", cyc - t0,
                 expected_cycles(t), conflicts - c0);
      end
    end
  endtask

  initial begin
    job_valid = 0; req_ready = 0; rd_valid = 0; rd_data = '0; job_tuple = '0; job_len = '0; gap_now = 0; ready_at = 0;
    img = new(24, BASE, 10);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 60; i++) do_job(img.random_tuple(), 1);
    gaps = 1; rr_random = 1;
    for (int i = 0; i < 60; i++) do_job(img.random_tuple(), 0);
    // Both state types and at least one bank conflict must have occurred.
    checks += 3;
    if (n_t1 == 0) begin failures++; $display("FAIL no type 1 state visited"); end
    if (n_t2 == 0) begin failures++; $display("FAIL no type 2 state visited"); end
    if (conflicts == 0) begin failures++; $display("FAIL no bank conflict seen"); end
    $display("type1=%0d type2=%0d conflicts=%0d", n_t1, n_t2, conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
