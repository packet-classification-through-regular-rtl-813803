// tb_workload_rates: the two throughput experiments of the reported prototype,
// replayed on the classifier at a reduced number of flows and duration.
//
// The link is modelled as a gigabit port without buffering: minimum-size
// frames (60 bytes + FCS, 84 byte times with preamble and gap = 84 cycles at
// 125 MHz) arrive on a fixed schedule; a frame whose arrival finds the input
// still busy with an earlier frame, or not ready, is lost at the port.
//
// Experiment A (rate sweep, all traffic matching): 64 matching flows, which
// mostly stay in the flow cache, offered at 0.3, 0.6, 0.9, 1.0 and 1.22 Mpps.
// At most 1% of the frames may be lost at the port ("negligible losses";
// flows that collide in the direct-mapped cache keep missing), and every
// accepted frame must come out with the class of its flow.
//
// Experiment B (constant traffic of interest, growing background): interest
// traffic at about 61,000 frames/s from 4096 matching flows (the original
// used 65536), plus non-matching background frames from random flows so that
// the link load is 0.25, 0.5, 0.75 and 1. Every forwarded frame must be an
// interest frame with the right class; background frames must never come out.
// The interest throughput per load is printed, not checked: with a
// 1024-entry cache and a walk of several hundred cycles per new flow, this
// configuration loses interest frames once the background saturates the
// automaton.
module tb_workload_rates;
  import dfa_pkg::*;
  import dfa_image_pkg::*;
  import pkt_gen_pkg::*;

  localparam int unsigned AW   = 19;
  localparam int unsigned BASE = 0;

  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

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
  assign out_ready = 1'b1;

  // Each frame carries its flow's class; the output check looks the class
  // up by the frame's source address and ports (unique per flow here).
  logic [CLASS_W-1:0] cls_of [tuple_t];
  bit                 interest [tuple_t];
  int n_out_interest = 0, n_out_bad = 0;
  logic [63:0] w2, w3, w4;   // words 2..4 of the frame being output
  int wi = 0;

  always @(posedge clk) begin
    if (out_valid && out_ready) begin
      int k;
      k = out_sop ? 0 : wi;
      if (k == 2) w2 = out_data;
      if (k == 3) w3 = out_data;
      if (k == 4) w4 = out_data;
      if (out_eop) begin
        tuple_t t;
        t.proto    = w2[7:0];
        t.src_ip   = w3[47:16];
        t.dst_ip   = {w3[15:0], w4[63:48]};
        t.src_port = w4[47:32];
        t.dst_port = w4[31:16];
        t = expected_tuple(t);
        checks++;
        if (!cls_of.exists(t) || !interest[t] || cls_of[t] != out_cls) begin
          failures++;
          n_out_bad++;
          if (n_out_bad < 5) $display("FAIL unexpected frame out, tuple %h", t);
        end else n_out_interest++;
      end
      wi = k + 1;
    end
  end

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---- link model ----
  tuple_t     pending_t [$];
  int         lost = 0;
  bit         sending = 0;

  task automatic send_now(tuple_t t);
    bytes_t b;
    int unsigned n;
    b = build_frame(t, 1, 5, 10);
    n = nwords(b);
    sending = 1;
    for (int w = 0; w < n; w++) begin
      in_valid = 1; in_sop = (w == 0); in_eop = (w == n - 1);
      in_data = word(b, w); in_bytes = (w == n - 1) ? last_bytes(b) : 3'd0;
      @(negedge clk);
      while (!in_ready) @(negedge clk);
    end
    in_valid = 0;
    sending = 0;
  endtask

  // Offer frames of the given flows for `cycles` cycles, one per `gap`
  // cycles; flows are chosen by `pick`. Returns frames offered / lost.
  tuple_t flows_a [64];
  tuple_t flows_i [4096];

  function automatic tuple_t matching_tuple(bit want);
    tuple_t t;
    int s;
    do begin
      t = expected_tuple(img.random_tuple());
      s = img.run(t);
    end while (img.accept[s] != want || cls_of.exists(t));
    return t;
  endfunction

  // Offer nframes frames, one every `gap` cycles on an absolute schedule.
  // A frame whose slot comes while the previous one is still being accepted,
  // or while in_ready is low, is lost at the port.
  task automatic run_point(int unsigned gap, int unsigned nframes, int unsigned interest_every,
                           output int offered, output int offered_int, output int lost_n,
                           output int lost_int, input bit exp_a);
    longint t0;
    offered = 0; offered_int = 0; lost_n = 0; lost_int = 0;
    t0 = cyc;
    for (int f = 0; f < nframes; f++) begin
      tuple_t t;
      bit is_int;
      is_int = exp_a || (f % interest_every == 0);
      if (exp_a)       t = flows_a[$urandom_range(63)];
      else if (is_int) t = flows_i[$urandom_range(4095)];
      else begin
        do t = expected_tuple({$urandom, $urandom, $urandom, 8'($urandom)});
        while (img.accept[img.run(t)]);
      end
      offered++;
      if (is_int) offered_int++;
      if (cyc > t0 + longint'(f) * gap || !in_ready) begin
        lost_n++;
        if (is_int) lost_int++;
      end else begin
        while (cyc < t0 + longint'(f) * gap) @(negedge clk);
        send_now(t);
      end
    end
    repeat (20000) @(negedge clk);
  endtask

  initial begin
    int off, off_i, ls, ls_i, out0;
    int unsigned gaps_a [5] = '{417, 208, 139, 125, 102};
    real rho [4] = '{0.25, 0.5, 0.75, 1.0};
    in_valid = 0; in_sop = 0; in_eop = 0; in_data = '0; in_bytes = '0;
    hw_valid = 0; hw_addr = '0; hw_data = '0;
    img = new(24, BASE, 10);
    for (int i = 0; i < 64; i++) begin
      flows_a[i] = matching_tuple(1);
      cls_of[flows_a[i]] = img.result[img.run(flows_a[i])][CLASS_W-1:0];
      interest[flows_a[i]] = 1;
    end
    for (int i = 0; i < 4096; i++) begin
      flows_i[i] = matching_tuple(1);
      cls_of[flows_i[i]] = img.result[img.run(flows_i[i])][CLASS_W-1:0];
      interest[flows_i[i]] = 1;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (img.rows[i]) begin
      hw_valid = 1; hw_addr = AW'(BASE + i); hw_data = img.rows[i];
      @(negedge clk);
      while (!hw_ready) @(negedge clk);
    end
    hw_valid = 0;
    repeat (1100) @(negedge clk);

    // Experiment A. Warm the cache first.
    foreach (flows_a[i]) begin send_now(flows_a[i]); repeat (3000) @(negedge clk); end
    repeat (20000) @(negedge clk);
    foreach (gaps_a[k]) begin
      out0 = n_out_interest;
      run_point(gaps_a[k], 600, 1, off, off_i, ls, ls_i, 1);
      $display("A: offered %0.2f Mpps: %0d frames, lost %0d, forwarded %0d", 125.0 / gaps_a[k],
               off, ls, n_out_interest - out0);
      checks++;
      if (ls * 100 > off || n_out_interest - out0 != off - ls) begin
        failures++;
        $display("FAIL rate point %0d cycles/frame lost frames", gaps_a[k]);
      end
    end

    // Experiment B. Interest every 2049 cycles; background fills the link to rho.
    foreach (rho[k]) begin
      int unsigned gap, every;
      gap   = int'(84.0 / rho[k]);
      every = 2049 / gap;
      out0 = n_out_interest;
      run_point(gap, 40 * every, every, off, off_i, ls, ls_i, 0);
      $display("B: rho %0.2f: offered %0d frames (%0d of interest), lost at the port %0d (%0d of interest), interest forwarded %0d",
               rho[k], off, off_i, ls, ls_i, n_out_interest - out0);
      checks++;
      if (n_out_interest - out0 != off_i - ls_i) begin
        failures++;
        $display("FAIL interest frames accepted at the port but not forwarded");
      end
    end
    checks++;
    if (n_out_bad != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
