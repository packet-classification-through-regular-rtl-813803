// local_table: the local transition set of the deltaFA walker.
//
// Holds the 24-bit next-state pointer of each of the 256 input characters for
// the state currently being visited. As the document describes, the table is
// split over two dual-port read-first 128 x 24 BRAMs, bank 0 holding the even
// characters and bank 1 the odd ones, so that up to four pointers can be
// written per cycle.
//
// Writes: up to three transitions (character, pointer) per cycle are offered
// on wr_valid/wr_char/wr_ptr while wr_ready is high - three is what one row
// of a type 1 state carries. Each transition goes to the next free port of its
// bank. When all three fall in one bank, two are written at once and the third
// is held in a one-entry buffer and written on the following cycle, during
// which wr_ready is low. Characters offered in one group must be distinct.
//
// Reads: rd_en with rd_char reads the pointer of that character through port A
// of its bank; rd_ptr is valid on the next cycle. A read must not coincide with
// a write (the walker reads only once the state's updates are done), which
// the assertion below checks.
module local_table
  import dfa_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [2:0]  wr_valid,
  input  char_t       wr_char [3],
  input  ptr_t        wr_ptr  [3],
  output logic        wr_ready,
  input  logic        rd_en,
  input  char_t       rd_char,
  output ptr_t        rd_ptr,
  output logic        conflict   // a write had to be held for one cycle
);
  // Held transition (bank conflict).
  logic  held_v;
  char_t held_char;
  ptr_t  held_ptr;

  // Port signals: index [bank][port].
  logic       en   [2][2];
  logic       we   [2][2];
  logic [6:0] addr [2][2];
  ptr_t       din  [2][2];
  ptr_t       dout [2][2];

  logic  hold_n;
  char_t hold_char_n;
  ptr_t  hold_ptr_n;

  assign wr_ready = !held_v;

  always_comb begin
    logic [1:0] used [2];
    logic       bk;
    bk = 1'b0;
    used[0] = '0;
    used[1] = '0;
    hold_n      = 1'b0;
    hold_char_n = '0;
    hold_ptr_n  = '0;
    for (int k = 0; k < 2; k++)
      for (int p = 0; p < 2; p++) begin
        en[k][p]   = 1'b0;
        we[k][p]   = 1'b0;
        addr[k][p] = '0;
        din[k][p]  = '0;
      end
    if (held_v) begin
      bk = held_char[0];
      en[bk][0]   = 1'b1;
      we[bk][0]   = 1'b1;
      addr[bk][0] = held_char[7:1];
      din[bk][0]  = held_ptr;
    end else begin
      for (int i = 0; i < 3; i++) begin
        if (wr_valid[i]) begin
          bk = wr_char[i][0];
          if (used[bk] == 2'd2) begin
            hold_n      = 1'b1;
            hold_char_n = wr_char[i];
            hold_ptr_n  = wr_ptr[i];
          end else begin
            en[bk][used[bk][0]]   = 1'b1;
            we[bk][used[bk][0]]   = 1'b1;
            addr[bk][used[bk][0]] = wr_char[i][7:1];
            din[bk][used[bk][0]]  = wr_ptr[i];
            used[bk] = used[bk] + 2'd1;
          end
        end
      end
      if (rd_en) begin
        en[rd_char[0]][0]   = 1'b1;
        addr[rd_char[0]][0] = rd_char[7:1];
      end
    end
  end

  assign conflict = hold_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held_v    <= 1'b0;
      held_char <= '0;
      held_ptr  <= '0;
    end else begin
      held_v    <= hold_n;
      held_char <= hold_char_n;
      held_ptr  <= hold_ptr_n;
    end
  end

  for (genvar k = 0; k < 2; k++) begin : g_bank
    local_bram #(.DEPTH(128), .WIDTH(PTR_W)) u_bram (
      .clk   (clk),
      .en_a  (en[k][0]),  .we_a (we[k][0]),  .addr_a (addr[k][0]), .din_a (din[k][0]), .dout_a (dout[k][0]),
      .en_b  (en[k][1]),  .we_b (we[k][1]),  .addr_b (addr[k][1]), .din_b (din[k][1]), .dout_b (dout[k][1])
    );
  end

  logic rd_bank_q;
  always_ff @(posedge clk) if (rd_en) rd_bank_q <= rd_char[0];
  assign rd_ptr = dout[rd_bank_q][0];

  assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> (wr_valid == 3'b000 && !held_v));

endmodule
