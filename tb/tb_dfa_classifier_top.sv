// tb_dfa_classifier_top: end-to-end test of the classifier at its default
// size (1024-word packets FIFO, 1024-flow cache, 512K-row state memory).
//
// A random deltaFA image is written into the behavioural SRAM through the
// host write port. Then frames of a pool of flows are sent (IPv4 TCP/UDP/
// other, with and without IP options, plus non-IPv4 frames), in random order
// and with random output back-pressure. Each frame's fate is predicted with
// the reference DFA: frames whose tuple ends in an accepting state must come
// out unchanged, in order, carrying that state's result (low 52 bits) and the
// frame length; all others must be dropped.
//
// Mechanisms that must each happen at least once (a failure is counted for
// any that does not): cache hit, miss, eviction, non-IPv4 bypass, bitmap
// state, list state, local-table bank conflict, forward, drop, input
// back-pressure and output back-pressure.
//
// Rate check: a 1 Gb/s link full of minimum-size frames (64 bytes + 20 bytes
// preamble and gap) delivers one frame per 84 cycles of the 125 MHz clock. A
// burst of back-to-back minimum-size frames of cached flows must be
// forwarded or dropped at one frame per at most 84 cycles.
module tb_dfa_classifier_top;
  import dfa_pkg::*;
  import dfa_image_pkg::*;
  import pkt_gen_pkg::*;

  localparam int unsigned AW   = 19;
  localparam int unsigned BASE = 4096;

  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;   // 125 MHz

  logic [63:0]        in_data, out_data;
  logic               in_valid, in_sop, in_eop, in_ready;
  logic [2:0]         in_bytes, out_bytes;
  logic               out_valid, out_sop, out_eop, out_ready;
  logic [CLASS_W-1:0] out_cls;
  logic [LEN_W-1:0]   out_len;
  logic               hw_valid, hw_ready;
  logic [AW-1:0]      hw_addr;
  row_t               hw_data;
  logic               sram_cmd, sram_we, sram_rvalid;
  logic [AW-1:0]      sram_addr;
  row_t               sram_wdata, sram_rdata;
  logic ev_hit, ev_miss, ev_evict, ev_bypass, ev_type1, ev_type2, ev_conflict, ev_fwd, ev_drop;

  dfa_classifier_top dut (
    .clk, .rst_n, .root_addr (24'(BASE)),
    .in_data, .in_valid, .in_sop, .in_eop, .in_bytes, .in_ready,
    .out_data, .out_valid, .out_sop, .out_eop, .out_bytes, .out_cls, .out_len, .out_ready,
    .hw_valid, .hw_ready, .hw_addr, .hw_data,
    .sram_cmd, .sram_we, .sram_addr, .sram_wdata, .sram_rdata, .sram_rvalid,
    .ev_hit, .ev_miss, .ev_evict, .ev_bypass, .ev_type1, .ev_type2, .ev_conflict,
    .ev_fwd, .ev_drop
  );

  sram_model #(.AW(AW), .LAT(3)) u_sram (
    .clk, .cmd (sram_cmd), .we (sram_we), .addr (sram_addr), .wdata (sram_wdata),
    .rdata (sram_rdata), .rvalid (sram_rvalid)
  );

  dfa_image img;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // event counters
  int n_hit, n_miss, n_evict, n_bypass, n_t1, n_t2, n_conf, n_fwd, n_drop, n_inbp, n_outbp;
  always @(posedge clk) if (rst_n) begin
    n_hit += int'(ev_hit);   n_miss += int'(ev_miss);   n_evict += int'(ev_evict);
    n_bypass += int'(ev_bypass); n_t1 += int'(ev_type1); n_t2 += int'(ev_type2);
    n_conf += int'(ev_conflict); n_fwd += int'(ev_fwd); n_drop += int'(ev_drop);
    n_inbp += int'(in_valid && !in_ready);
    n_outbp += int'(out_valid && !out_ready);
  end

  // expected output
  typedef struct { logic [67:0] w; bit sop; logic [CLASS_W-1:0] cls; logic [LEN_W-1:0] len; } exp_t;
  exp_t expq[$];
  int words_out = 0;
  longint last_fwd_cyc = 0, max_gap = 0;
  bit measure = 0;

  bit outbp_on = 1;
  always @(negedge clk) out_ready <= outbp_on ? ($urandom_range(5) != 0) : 1'b1;

  always @(posedge clk) begin
    if (out_valid && out_ready) begin
      checks++;
      words_out++;
      if (expq.size() == 0 || {out_eop, out_bytes, out_data} !== expq[0].w || out_sop !== expq[0].sop
          || out_cls !== expq[0].cls || out_len !== expq[0].len) begin
        failures++;
        if (failures < 10)
          $display("FAIL out word %h sop=%b cls=%h len=%0d; want %h sop=%b cls=%h len=%0d", out_data,
                   out_sop, out_cls, out_len, expq.size() ? expq[0].w : '0,
                   expq.size() ? expq[0].sop : 0, expq.size() ? expq[0].cls : '0,
                   expq.size() ? expq[0].len : '0);
      end
      if (expq.size()) void'(expq.pop_front());
    end
    if ((ev_fwd || ev_drop) && measure) begin
      if (last_fwd_cyc != 0 && cyc - last_fwd_cyc > max_gap) max_gap = cyc - last_fwd_cyc;
      last_fwd_cyc = cyc;
    end
  end

  task automatic send_frame(tuple_t t, bit ipv4, int unsigned ihl, int unsigned pay);
    bytes_t b;
    int unsigned n, s;
    tuple_t e;
    b = build_frame(t, ipv4, ihl, pay);
    n = nwords(b);
    if (ipv4) begin
      e = expected_tuple(t);
      s = img.run(e);
      if (img.accept[s])
        for (int w = 0; w < n; w++)
          expq.push_back('{w: {(w == n - 1), (w == n - 1) ? last_bytes(b) : 3'd0, word(b, w)},
                           sop: (w == 0), cls: img.result[s][CLASS_W-1:0],
                           len: 16'(4 * ihl + 8 + pay + 14)});
    end
    for (int w = 0; w < n; w++) begin
      in_valid = 1; in_sop = (w == 0); in_eop = (w == n - 1);
      in_data = word(b, w); in_bytes = (w == n - 1) ? last_bytes(b) : 3'd0;
      @(negedge clk);
      while (!in_ready) @(negedge clk);
    end
    in_valid = 0;
  endtask

  task automatic drain(int unsigned max_cycles);
    int unsigned c;
    c = 0;
    while (expq.size() != 0 && c < max_cycles) begin @(negedge clk); c++; end
    repeat (200) @(negedge clk);
  endtask

  tuple_t pool [300];

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    in_valid = 0; in_sop = 0; in_eop = 0; in_data = '0; in_bytes = '0;
    hw_valid = 0; hw_addr = '0; hw_data = '0;
    n_hit = 0; n_miss = 0; n_evict = 0; n_bypass = 0; n_t1 = 0; n_t2 = 0; n_conf = 0;
    n_fwd = 0; n_drop = 0; n_inbp = 0; n_outbp = 0;
    img = new(24, BASE, 10);
    for (int i = 0; i < 300; i++) begin
      pool[i] = img.random_tuple();
      case ($urandom_range(3))
        0: pool[i].proto = 8'd6;
        1: pool[i].proto = 8'd17;
        default: ;
      endcase
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Load the state memory through the host port.
    foreach (img.rows[i]) begin
      hw_valid = 1; hw_addr = AW'(BASE + i); hw_data = img.rows[i];
      @(negedge clk);
      while (!hw_ready) @(negedge clk);
    end
    hw_valid = 0;
    repeat (1100) @(negedge clk);   // cache sweep after reset

    // Phase 1: random mixed traffic.
    for (int n = 0; n < 700; n++) begin
      int k;
      bit ipv4;
      k = $urandom_range(299);
      ipv4 = ($urandom_range(15) != 0);
      send_frame(pool[k], ipv4, ($urandom_range(4) == 0) ? $urandom_range(6, 8) : 5,
                 $urandom_range(0, 120));
      if ($urandom_range(3) == 0) repeat ($urandom_range(1, 40)) @(negedge clk);
    end
    drain(2000000);
    check(expq.size() == 0, $sformatf("%0d expected words never came out", expq.size()));

    // Phase 2: line-rate burst of minimum-size frames of cached flows.
    outbp_on = 0;
    for (int k = 0; k < 8; k++) send_frame(pool[k], 1, 5, 10);   // make sure they are cached
    drain(200000);
    measure = 1; last_fwd_cyc = 0; max_gap = 0;
    for (int n = 0; n < 200; n++) begin
      send_frame(pool[n % 8], 1, 5, 10);    // 60-byte frames, 8 words
      repeat (84 - 8) @(negedge clk);       // next frame one 1 GbE frame time later
    end
    drain(200000);
    measure = 0;
    check(expq.size() == 0, "burst frames missing");
    check(max_gap <= 84, $sformatf("cached flows handled only every %0d cycles", max_gap));

    check(n_hit > 0,    "no cache hit");
    check(n_miss > 0,   "no cache miss");
    check(n_evict > 0,  "no cache eviction");
    check(n_bypass > 0, "no non-IPv4 bypass");
    check(n_t1 > 0,     "no bitmap state");
    check(n_t2 > 0,     "no list state");
    check(n_conf > 0,   "no bank conflict");
    check(n_fwd > 0,    "nothing forwarded");
    check(n_drop > 0,   "nothing dropped");
    check(n_inbp > 0,   "no input back-pressure");
    check(n_outbp > 0,  "no output back-pressure");
    $display("hit=%0d miss=%0d evict=%0d bypass=%0d type1=%0d type2=%0d conflict=%0d fwd=%0d drop=%0d inbp=%0d outbp=%0d maxgap=%0d",
             n_hit, n_miss, n_evict, n_bypass, n_t1, n_t2, n_conf, n_fwd, n_drop, n_inbp, n_outbp, max_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
