// sram_ctrl: burst front end of the external state memory.
//
// The deltaFA walker asks for "N consecutive 72-bit rows starting at address
// A" (req_*); this block turns such a request into N single-row read commands
// to the SRAM driver, one per cycle, and returns the rows in order on a
// valid/ready stream (rd_*). The driver answers each read with sram_rvalid a
// fixed or variable number of cycles later. Read data is collected in a small
// return buffer; a read is only issued when the buffer has room for it and
// for all reads still in flight, so the consumer may stall the stream at any
// time without losing rows. Host writes (hw_*), which load the deltaFA image,
// are issued one per cycle when no burst is running.
//
// The document gives the function (start address and entry count in, the
// appropriate number of read/write requests to the SRAM driver out). The
// command/response signalling towards the driver, the return buffer and its
// depth are this design's. SRAM_AW = 19 addresses the 512K rows of 72 bits
// that make up the board's 4.5 MB of SRAM.
module sram_ctrl
  import dfa_pkg::*;
#(
  parameter int unsigned SRAM_AW = 19,
  parameter int unsigned RBUF    = 8     // return buffer depth
) (
  input  logic               clk,
  input  logic               rst_n,
  // burst read requests
  input  logic               req_valid,
  output logic               req_ready,
  input  ptr_t               req_addr,
  input  logic [7:0]         req_count,   // 1..255 rows
  // read data stream
  output row_t               rd_data,
  output logic               rd_valid,
  input  logic               rd_ready,
  // host writes
  input  logic               hw_valid,
  output logic               hw_ready,
  input  logic [SRAM_AW-1:0] hw_addr,
  input  row_t               hw_data,
  // SRAM driver side
  output logic               sram_cmd,    // a command this cycle
  output logic               sram_we,     // 1 = write, 0 = read
  output logic [SRAM_AW-1:0] sram_addr,
  output row_t               sram_wdata,
  input  row_t               sram_rdata,
  input  logic               sram_rvalid
);
  localparam int unsigned CW = $clog2(RBUF+1);

  logic               busy;
  logic [SRAM_AW-1:0] addr_q;
  logic [7:0]         left_q;
  logic [CW-1:0]      inflight;
  logic [CW-1:0]      buf_count;
  logic               buf_wr_ready;

  wire room   = (32'(inflight) + 32'(buf_count)) < RBUF;
  wire issue  = busy && room;

  assign req_ready = !busy;
  assign hw_ready  = !busy && !req_valid;

  always_comb begin
    sram_cmd   = 1'b0;
    sram_we    = 1'b0;
    sram_addr  = addr_q;
    sram_wdata = hw_data;
    if (issue) begin
      sram_cmd = 1'b1;
    end else if (hw_valid && hw_ready) begin
      sram_cmd  = 1'b1;
      sram_we   = 1'b1;
      sram_addr = hw_addr;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      addr_q   <= '0;
      left_q   <= '0;
      inflight <= '0;
    end else begin
      if (!busy) begin
        if (req_valid && req_count != 8'd0) begin
          busy   <= 1'b1;
          addr_q <= req_addr[SRAM_AW-1:0];
          left_q <= req_count;
        end
      end else if (issue) begin
        addr_q <= addr_q + 1'b1;
        left_q <= left_q - 8'd1;
        if (left_q == 8'd1) busy <= 1'b0;
      end
      inflight <= inflight + CW'(issue) - CW'(sram_rvalid);
    end
  end

  sync_fifo #(.WIDTH(ROW_W), .DEPTH(RBUF)) u_rbuf (
    .clk      (clk),
    .rst_n    (rst_n),
    .wr_data  (sram_rdata),
    .wr_valid (sram_rvalid),
    .wr_ready (buf_wr_ready),
    .rd_data  (rd_data),
    .rd_valid (rd_valid),
    .rd_ready (rd_ready),
    .count    (buf_count)
  );

  // Credit rule: returned data always finds room.
  assert property (@(posedge clk) disable iff (!rst_n) sram_rvalid |-> buf_wr_ready);

endmodule
