// tb_sram_ctrl: self-checking test of the burst SRAM controller.
//
// Loads random rows through the host write port into the behavioural SRAM,
// then issues bursts of random start and length and checks every returned
// row against the written data, in order. With the consumer always ready a
// burst must stream one row per cycle once its first row arrived; with a
// randomly stalling consumer no row may be lost.
module tb_sram_ctrl;
  import dfa_pkg::*;

  localparam int unsigned AW = 10;
  localparam int unsigned LAT = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          req_valid, req_ready, rd_valid, rd_ready;
  ptr_t          req_addr;
  logic [7:0]    req_count;
  row_t          rd_data;
  logic          hw_valid, hw_ready;
  logic [AW-1:0] hw_addr;
  row_t          hw_data;
  logic          sram_cmd, sram_we, sram_rvalid;
  logic [AW-1:0] sram_addr;
  row_t          sram_wdata, sram_rdata;

  sram_ctrl #(.SRAM_AW(AW)) dut (.*);
  sram_model #(.AW(AW), .LAT(LAT)) u_mem (
    .clk, .cmd (sram_cmd), .we (sram_we), .addr (sram_addr), .wdata (sram_wdata),
    .rdata (sram_rdata), .rvalid (sram_rvalid)
  );

  row_t ref_m [2**AW];
  int checks = 0, failures = 0;
  bit stall;

  always @(negedge clk) rd_ready <= stall ? ($urandom_range(2) == 0) : 1'b1;

  task automatic burst(int unsigned a, int unsigned n);
    int got, first_cyc, last_cyc, cyc;
    @(negedge clk);
    req_valid = 1; req_addr = 24'(a); req_count = 8'(n);
    while (!req_ready) @(negedge clk);
    @(negedge clk);
    req_valid = 0;
    got = 0; cyc = 0; first_cyc = -1; last_cyc = 0;
    while (got < n && cyc < 5000) begin
      @(posedge clk);
      if (rd_valid && rd_ready) begin
        checks++;
        if (rd_data !== ref_m[(a + got) % (2**AW)]) begin
          failures++;
          $display("FAIL burst %0d+%0d row %0d: %h want %h", a, n, got, rd_data, ref_m[(a+got) % (2**AW)]);
        end
        if (first_cyc < 0) first_cyc = cyc;
        last_cyc = cyc;
        got++;
      end
      cyc++;
    end
    checks++;
    if (got != n) begin failures++; $display("FAIL burst lost rows: %0d of %0d", got, n); end
    if (!stall) begin
      checks++;
      if (last_cyc - first_cyc != n - 1) begin
        failures++;
        $display("FAIL burst of %0d took %0d cycles after the first row", n, last_cyc - first_cyc);
      end
    end
    @(negedge clk);
  endtask

  initial begin
    req_valid = 0; req_addr = '0; req_count = '0; hw_valid = 0; hw_addr = '0; hw_data = '0;
    stall = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2**AW; i++) begin
      hw_valid = 1; hw_addr = AW'(i); hw_data = {8'($urandom), $urandom, $urandom};
      ref_m[i] = hw_data;
      @(negedge clk);
      while (!hw_ready) @(negedge clk);
    end
    hw_valid = 0;
    for (int i = 0; i < 40; i++) burst($urandom_range(2**AW - 256), $urandom_range(1, 95));
    stall = 1;
    for (int i = 0; i < 40; i++) burst($urandom_range(2**AW - 256), $urandom_range(1, 95));
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
