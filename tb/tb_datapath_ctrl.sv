// tb_datapath_ctrl: self-checking test of the header parser.
//
// Sends IPv4 frames with TCP, UDP and other protocols, IPv4 headers with
// options (IHL 5..8) and non-IPv4 frames, under random back-pressure from
// the packets FIFO and the job queue. Checks that every word reaches the
// packets FIFO unchanged with the right end-of-packet flag and byte count,
// and that exactly one job per packet is produced with the right 5-tuple,
// IPv4 flag and length (IPv4 total length + 14, or the frame length; the
// tuple of a non-IPv4 frame is all zero).
module tb_datapath_ctrl;
  import dfa_pkg::*;
  import pkt_gen_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [63:0] in_data;
  logic        in_valid, in_sop, in_eop, in_ready;
  logic [2:0]  in_bytes;
  logic [67:0] pkt_data;
  logic        pkt_valid, pkt_ready;
  job_t        job;
  logic        job_valid, job_ready;

  datapath_ctrl dut (.*);

  logic [67:0] exp_words[$];
  job_t        exp_jobs[$];
  int checks = 0, failures = 0;

  always @(negedge clk) begin
    pkt_ready <= ($urandom_range(4) != 0);
    job_ready <= ($urandom_range(4) != 0);
  end

  always @(posedge clk) begin
    if (pkt_valid && pkt_ready) begin
      checks++;
      if (exp_words.size() == 0 || pkt_data !== exp_words[0]) begin
        failures++;
        $display("FAIL word %h", pkt_data);
      end
      if (exp_words.size() != 0) void'(exp_words.pop_front());
    end
    if (job_valid && job_ready) begin
      checks++;
      if (exp_jobs.size() == 0 || job !== exp_jobs[0]) begin
        failures++;
        $display("FAIL job %p, want %p", job, exp_jobs.size() ? exp_jobs[0] : '0);
      end
      if (exp_jobs.size() != 0) void'(exp_jobs.pop_front());
    end
  end

  task automatic send(bytes_t b);
    int unsigned n;
    n = nwords(b);
    for (int w = 0; w < n; w++) begin
      in_valid = 1; in_sop = (w == 0); in_eop = (w == n - 1);
      in_data = word(b, w); in_bytes = (w == n - 1) ? last_bytes(b) : 3'd0;
      exp_words.push_back({in_eop, in_bytes, in_data});
      @(negedge clk);
      while (!in_ready) @(negedge clk);
    end
    in_valid = 0;
    if ($urandom_range(1)) @(negedge clk);
  endtask

  initial begin
    in_valid = 0; in_sop = 0; in_eop = 0; in_data = '0; in_bytes = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      tuple_t t;
      bit ipv4;
      int unsigned ihl, pay;
      bytes_t b;
      job_t j;
      t = {$urandom, $urandom, $urandom, 8'($urandom)};
      case ($urandom_range(3))
        0: t.proto = 8'd6;
        1: t.proto = 8'd17;
        2: t.proto = 8'd6;
        default: ;
      endcase
      ipv4 = ($urandom_range(7) != 0);
      ihl  = $urandom_range(5, 8);
      pay  = $urandom_range(0, 100);
      b = build_frame(t, ipv4, ihl, pay);
      j.tuple   = ipv4 ? expected_tuple(t) : '0;
      j.is_ipv4 = ipv4;
      j.len     = ipv4 ? 16'(4 * ihl + 8 + pay + 14) : 16'(b.size());
      exp_jobs.push_back(j);
      send(b);
    end
    repeat (10) @(negedge clk);
    checks++;
    if (exp_words.size() != 0 || exp_jobs.size() != 0) begin
      failures++;
      $display("FAIL %0d words and %0d jobs missing", exp_words.size(), exp_jobs.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
