// tb_sync_fifo: self-checking test of the FIFO used as packets FIFO.
//
// Random writes and reads against a reference queue, with phases that fill
// the FIFO to the top and drain it empty. Checks data order, the count
// output, that a full FIFO refuses writes and an empty one offers nothing.
module tb_sync_fifo;
  localparam int unsigned W = 68, N = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [W-1:0] wr_data, rd_data;
  logic         wr_valid, wr_ready, rd_valid, rd_ready;
  logic [$clog2(N+1)-1:0] count;

  sync_fifo #(.WIDTH(W), .DEPTH(N)) dut (.*);

  logic [W-1:0] model[$];
  int checks = 0, failures = 0, fulls = 0;
  int wr_pct = 50, rd_pct = 50;

  always @(negedge clk) begin
    wr_valid <= ($urandom_range(99) < wr_pct);
    wr_data  <= {4'($urandom), $urandom, $urandom};
    rd_ready <= ($urandom_range(99) < rd_pct);
  end

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (count != model.size() || wr_ready != (model.size() < N) || rd_valid != (model.size() > 0)) begin
      failures++;
      $display("FAIL status: count=%0d model=%0d", count, model.size());
    end
    if (!wr_ready) fulls++;
    if (rd_valid && rd_ready) begin
      checks++;
      if (rd_data !== model[0]) begin failures++; $display("FAIL data %h want %h", rd_data, model[0]); end
      void'(model.pop_front());
    end
    if (wr_valid && wr_ready) model.push_back(wr_data);
  end

  initial begin
    wr_valid = 0; rd_ready = 0; wr_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (2000) @(negedge clk);
    wr_pct = 90; rd_pct = 20;
    repeat (1000) @(negedge clk);
    wr_pct = 10; rd_pct = 90;
    repeat (1000) @(negedge clk);
    checks++;
    if (fulls == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
