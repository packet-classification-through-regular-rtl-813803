// tb_output_stage: self-checking test of the forward/drop stage.
//
// Packets of random length are offered word by word (with random gaps) and,
// in the same order, one result each (random match flag, class, length),
// while the output port applies random back-pressure. Checks that exactly the
// matching packets come out, word for word, with sop on the first word, eop
// on the last, and class/length of their own result; the others vanish.
module tb_output_stage;
  import dfa_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [67:0]        pkt_data;
  logic               pkt_valid, pkt_ready;
  result_t            res;
  logic               res_valid, res_ready;
  logic [63:0]        out_data;
  logic               out_valid, out_sop, out_eop, out_ready, ev_fwd, ev_drop;
  logic [2:0]         out_bytes;
  logic [CLASS_W-1:0] out_cls;
  logic [LEN_W-1:0]   out_len;

  output_stage dut (.*);

  localparam int NPKT = 200;
  logic [67:0] words[NPKT][$];
  result_t     results[NPKT];
  int checks = 0, failures = 0, nfwd = 0, ndrop = 0;

  // expected output stream
  typedef struct { logic [67:0] w; bit sop; result_t r; } exp_t;
  exp_t expq[$];

  always @(negedge clk) out_ready <= ($urandom_range(3) != 0);
  always @(posedge clk) begin
    nfwd += int'(ev_fwd); ndrop += int'(ev_drop);
    if (out_valid && out_ready) begin
      checks++;
      if (expq.size() == 0 || {out_eop, out_bytes, out_data} !== expq[0].w || out_sop !== expq[0].sop
          || out_cls !== expq[0].r.cls || out_len !== expq[0].r.len) begin
        failures++;
        $display("FAIL output word %h sop=%b", out_data, out_sop);
      end
      if (expq.size()) void'(expq.pop_front());
    end
  end

  // packet words producer
  initial begin
    pkt_valid = 0; pkt_data = '0;
    wait (rst_n);
    for (int p = 0; p < NPKT; p++)
      foreach (words[p][i]) begin
        @(negedge clk);
        while ($urandom_range(4) == 0) @(negedge clk);
        pkt_valid = 1; pkt_data = words[p][i];
        @(posedge clk);
        while (!pkt_ready) @(posedge clk);
        @(negedge clk);
        pkt_valid = 0;
      end
  end

  // results producer
  initial begin
    res_valid = 0; res = '0;
    wait (rst_n);
    for (int p = 0; p < NPKT; p++) begin
      @(negedge clk);
      res_valid = 1; res = results[p];
      @(posedge clk);
      while (!res_ready) @(posedge clk);
      @(negedge clk);
      res_valid = 0;
    end
  end

  initial begin
    for (int p = 0; p < NPKT; p++) begin
      int n;
      n = $urandom_range(1, 12);
      results[p].match = $urandom_range(1);
      results[p].cls   = {$urandom, 20'($urandom)};
      results[p].len   = 16'(8 * n);
      for (int i = 0; i < n; i++) begin
        logic [67:0] w;
        w = {(i == n - 1), 3'd0, $urandom, $urandom};
        words[p].push_back(w);
        if (results[p].match) expq.push_back('{w: w, sop: (i == 0), r: results[p]});
      end
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (20000) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d words never came out", expq.size()); end
    checks++;
    if (nfwd + ndrop != NPKT || nfwd == 0 || ndrop == 0) begin
      failures++; $display("FAIL forwarded %0d dropped %0d", nfwd, ndrop);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
