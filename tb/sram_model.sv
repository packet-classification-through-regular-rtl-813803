// sram_model: behavioural model of the board SRAM together with its driver.
// Not synthesizable design logic: a test-side stand-in for the external
// memory. One command per cycle: a write (cmd && we) stores wdata at addr; a
// read (cmd && !we) returns the row on rdata with rvalid LAT cycles later.
// Reads return data in order.
module sram_model
  import dfa_pkg::*;
#(
  parameter int unsigned AW  = 19,
  parameter int unsigned LAT = 3
) (
  input  logic          clk,
  input  logic          cmd,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  row_t          wdata,
  output row_t          rdata,
  output logic          rvalid
);
  row_t mem [2**AW];
  row_t pipe_d [LAT];
  logic pipe_v [LAT];

  initial begin
    for (int i = 0; i < LAT; i++) begin
      pipe_v[i] = 1'b0;
      pipe_d[i] = '0;
    end
  end

  always_ff @(posedge clk) begin
    if (cmd && we) mem[addr] <= wdata;
    pipe_v[0] <= cmd && !we;
    pipe_d[0] <= mem[addr];
    for (int i = 1; i < LAT; i++) begin
      pipe_v[i] <= pipe_v[i-1];
      pipe_d[i] <= pipe_d[i-1];
    end
  end

  assign rdata  = pipe_d[LAT-1];
  assign rvalid = pipe_v[LAT-1];

endmodule
