// local_bram: one bank of the local transition table, a true dual-port
// block RAM in read-first mode.
//
// Each port has an enable, a write enable, an address and write data; a port
// that is enabled returns on dout, one cycle later, the word stored at its
// address before any write of that same cycle (read-first). Both ports may
// write in the same cycle, to different addresses. The document specifies two
// dual-port read-first 128 x 24 BRAMs; the size is its number, the port names
// are this design's.
module local_bram #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned WIDTH = 24
) (
  input  logic                     clk,
  input  logic                     en_a,
  input  logic                     we_a,
  input  logic [$clog2(DEPTH)-1:0] addr_a,
  input  logic [WIDTH-1:0]         din_a,
  output logic [WIDTH-1:0]         dout_a,
  input  logic                     en_b,
  input  logic                     we_b,
  input  logic [$clog2(DEPTH)-1:0] addr_b,
  input  logic [WIDTH-1:0]         din_b,
  output logic [WIDTH-1:0]         dout_b
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en_a) begin
      dout_a <= mem[addr_a];
      if (we_a) mem[addr_a] <= din_a;
    end
    if (en_b) begin
      dout_b <= mem[addr_b];
      if (we_b) mem[addr_b] <= din_b;
    end
  end

  // Two writes to one address in one cycle have no defined winner.
  assert property (@(posedge clk) !(en_a && we_a && en_b && we_b && addr_a == addr_b));

endmodule
