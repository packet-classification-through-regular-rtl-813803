// tb_flow_cache: self-checking test of the flow result cache.
//
// A behavioural automaton answers misses after a random delay with a result
// that is a fixed function of the tuple. Jobs come from a small pool of flows
// (so that flows repeat and collide in a 16-entry table) plus some non-IPv4
// jobs. Checks: every result (match, class, length) equals the function of
// its tuple, in job order; a flow presented twice in a row is answered the
// second time without calling the automaton; non-IPv4 jobs never reach the
// automaton and come back as non-matching; hits, misses and evictions all
// occur; a hit is answered within 4 cycles of the job being taken.
module tb_flow_cache;
  import dfa_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  job_t             job;
  logic             job_valid, job_ready;
  tuple_t           dfa_tuple;
  logic [LEN_W-1:0] dfa_len;
  logic             dfa_valid, dfa_ready, dfa_res_valid, dfa_res_ready, dfa_res_accept;
  logic [RES_W-1:0] dfa_res_result;
  result_t          res;
  logic             res_valid, res_ready;
  logic             ev_hit, ev_miss, ev_evict, ev_bypass;

  flow_cache #(.CACHE_AW(4)) dut (.*);

  function automatic logic [RES_W-1:0] f_res(tuple_t t);
    return {t.src_ip[27:0] ^ t.dst_ip[27:0], t.src_port ^ t.dst_port, 4'(t.proto)};
  endfunction
  function automatic logic f_acc(tuple_t t);
    return ^t;
  endfunction

  // Behavioural automaton: takes a miss, answers after a random delay.
  int dfa_calls = 0;
  tuple_t pend;
  int delay;
  bit busy = 0;
  always @(negedge clk) begin
    dfa_ready <= !busy;
    if (busy && delay > 0) delay--;
    dfa_res_valid  <= busy && delay == 0;
    dfa_res_accept <= f_acc(pend);
    dfa_res_result <= f_res(pend);
  end
  always @(posedge clk) begin
    if (dfa_valid && dfa_ready) begin
      busy = 1; pend = dfa_tuple; delay = $urandom_range(1, 20); dfa_calls++;
    end
    if (dfa_res_valid && dfa_res_ready) busy = 0;
  end

  int checks = 0, failures = 0, hits = 0, misses = 0, evicts = 0, bypass = 0;
  always @(posedge clk) begin
    hits += int'(ev_hit); misses += int'(ev_miss); evicts += int'(ev_evict); bypass += int'(ev_bypass);
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  tuple_t pool [40];

  task automatic one(job_t j, bit expect_hit);
    int calls0, cyc;
    calls0 = dfa_calls;
    @(negedge clk);
    job = j; job_valid = 1;
    while (!job_ready) @(negedge clk);
    @(negedge clk);
    job_valid = 0;
    res_ready = 1;
    cyc = 1;
    while (!res_valid) begin @(negedge clk); cyc++; end
    @(negedge clk);
    res_ready = 0;
    if (j.is_ipv4) begin
      check(res.match == f_acc(j.tuple) && res.cls == f_res(j.tuple)[CLASS_W-1:0] && res.len == j.len,
            $sformatf("wrong result for %h", j.tuple));
    end else begin
      check(!res.match && res.len == j.len, "non-IPv4 job should not match");
      check(dfa_calls == calls0, "non-IPv4 job reached the automaton");
    end
    if (expect_hit) begin
      check(dfa_calls == calls0, "repeated flow was not a hit");
      check(cyc <= 4, $sformatf("hit took %0d cycles", cyc));
    end
  endtask

  initial begin
    job = '0; job_valid = 0; res_ready = 0;
    for (int i = 0; i < 40; i++) pool[i] = {$urandom, $urandom, $urandom, 8'($urandom)};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      job_t j;
      j.tuple = pool[$urandom_range(39)];
      j.len = 16'($urandom_range(64, 1518));
      j.is_ipv4 = ($urandom_range(9) != 0);
      one(j, 0);
      if (j.is_ipv4 && $urandom_range(1)) one(j, 1);
    end
    check(hits > 0 && misses > 0 && evicts > 0 && bypass > 0, "not every cache event occurred");
    $display("hits=%0d misses=%0d evictions=%0d bypass=%0d", hits, misses, evicts, bypass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
