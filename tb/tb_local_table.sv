// tb_local_table: self-checking test of the two-bank local transition table.
//
// Writes groups of up to three distinct characters (random banks, and groups
// forced into one bank to provoke the one-cycle hold), keeps a reference copy
// of all 256 entries, and reads entries back between groups. Checks the read
// data, that a hold happens exactly when three writes target one bank, and
// that wr_ready drops for exactly one cycle after a hold.
module tb_local_table;
  import dfa_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [2:0] wr_valid;
  char_t      wr_char [3];
  ptr_t       wr_ptr  [3];
  logic       wr_ready, rd_en, conflict;
  char_t      rd_char;
  ptr_t       rd_ptr;

  local_table dut (.*);

  ptr_t ref_t [256];
  int checks = 0, failures = 0, holds = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic write_group(int nv, bit same_bank);
    char_t c [3];
    int b;
    bit exp_hold;
    b = $urandom_range(1);
    for (int i = 0; i < 3; i++) begin
      bit dup;
      do begin
        c[i] = 8'($urandom);
        if (same_bank) c[i][0] = b[0];
        dup = 0;
        for (int j = 0; j < i; j++) if (c[j] == c[i]) dup = 1;
      end while (dup);
    end
    wr_valid = '0;
    for (int i = 0; i < 3; i++) begin
      wr_char[i] = c[i];
      wr_ptr[i]  = 24'($urandom);
      if (i < nv) begin
        wr_valid[i] = 1'b1;
        ref_t[c[i]] = wr_ptr[i];
      end
    end
    exp_hold = (nv == 3) && (c[0][0] == c[1][0]) && (c[1][0] == c[2][0]);
    check(wr_ready, "wr_ready low before a group");
    #1;
    check(conflict == exp_hold, $sformatf("conflict=%b, expected %b", conflict, exp_hold));
    if (conflict) holds++;
    @(negedge clk);
    wr_valid = '0;
    if (exp_hold) begin
      check(!wr_ready, "wr_ready should be low during the held write");
      @(negedge clk);
    end
    check(wr_ready, "wr_ready should be high again");
  endtask

  task automatic read_check(char_t c);
    rd_en = 1; rd_char = c;
    @(negedge clk);
    rd_en = 0;
    check(rd_ptr == ref_t[c], $sformatf("char %0d: read %h want %h", c, rd_ptr, ref_t[c]));
  endtask

  initial begin
    wr_valid = '0; rd_en = 0; rd_char = '0;
    for (int i = 0; i < 3; i++) begin wr_char[i] = '0; wr_ptr[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // Fill the whole table, three characters per cycle as from a full state.
    for (int c = 0; c < 256; c += 3) begin
      wr_valid = '0;
      for (int i = 0; i < 3; i++) if (c + i < 256) begin
        wr_valid[i] = 1'b1; wr_char[i] = 8'(c + i); wr_ptr[i] = 24'($urandom);
        ref_t[c + i] = wr_ptr[i];
      end
      @(negedge clk);
      wr_valid = '0;
      while (!wr_ready) @(negedge clk);
    end
    for (int c = 0; c < 256; c++) read_check(8'(c));
    for (int n = 0; n < 300; n++) begin
      write_group($urandom_range(1, 3), $urandom_range(2) == 0);
      read_check(8'($urandom));
    end
    for (int c = 0; c < 256; c++) read_check(8'(c));
    check(holds > 0, "no bank conflict was exercised");
    $display("holds=%0d", holds);
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
