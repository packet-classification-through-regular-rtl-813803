// sync_fifo: single-clock first-word-fall-through FIFO with valid/ready ports.
//
// Used as the packets FIFO that holds packet words while their 5-tuple is
// classified, and as the small job and result queues between the classifier
// stages. Storage is a plain array (one write port, one read port); the head
// word is visible on rd_data whenever rd_valid is high and leaves on a cycle
// with rd_valid && rd_ready. wr_ready is low only when the FIFO is full. A
// word written into an empty FIFO can be read on the next cycle. The document
// names the packets FIFO but gives no depth or width; both are parameters.
module sync_fifo #(
  parameter int unsigned WIDTH = 68,
  parameter int unsigned DEPTH = 1024
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             wr_valid,
  output logic             wr_ready,
  output logic [WIDTH-1:0] rd_data,
  output logic             rd_valid,
  input  logic             rd_ready,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;

  wire do_wr = wr_valid && wr_ready;
  wire do_rd = rd_valid && rd_ready;

  assign wr_ready = (count != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign rd_valid = (count != '0);
  assign rd_data  = mem[rd_ptr];

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= inc(wr_ptr);
      if (do_rd) rd_ptr <= inc(rd_ptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  // A full FIFO never accepts and an empty one never delivers.
  assert property (@(posedge clk) disable iff (!rst_n) 32'(count) <= DEPTH);

endmodule
