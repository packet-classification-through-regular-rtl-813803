// dfa_automaton: the deltaFA control automaton.
//
// For each job it walks the deltaFA over the 13 characters of the 5-tuple
// (source IP, destination IP, source port, destination port, protocol, most
// significant byte first), starting from the root state at root_addr. For
// every character it:
//   1. reads the state's header row (one single-row SRAM access), which tells
//      the state type, whether it accepts, its classification result and the
//      number n of transitions it stores;
//   2. reads the rest of the state in one burst - type 1: four bitmap rows
//      then ceil(n/3) rows of three pointers; type 2: ceil(n/2) rows of two
//      (character, pointer) pairs - and writes every stored transition into
//      the local transition table (for type 1 the characters are the set bits
//      of the bitmap, taken in increasing order);
//   3. reads the local table entry of the input character, which is the
//      pointer (SRAM row address) of the next state.
// After the last character only the header of the state reached is read: the
// job matches when that state accepts, and its classification result is
// returned. The root state stores all 256 transitions, so visiting it first
// reloads the whole local table for each packet.
//
// The state formats, the header-first access, the local table and its
// update/lookup order follow the document. Taking the verdict from the state
// reached after the last character, the meaning of a type 1 count of 0 (256)
// and the handshakes are this design's choices.
//
// Timing: one job at a time; with an SRAM read latency of L cycles a
// character costs about 2L + rows + 8 cycles (see the testbench for the exact
// count), plus one cycle for every row whose three pointers hit one bank.
module dfa_automaton
  import dfa_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  ptr_t             root_addr,
  // job in
  input  logic             job_valid,
  output logic             job_ready,
  input  tuple_t           job_tuple,
  input  logic [LEN_W-1:0] job_len,
  // result out
  output logic             res_valid,
  input  logic             res_ready,
  output logic             res_accept,
  output logic [RES_W-1:0] res_result,
  output logic [LEN_W-1:0] res_len,
  // burst reads through sram_ctrl
  output logic             req_valid,
  input  logic             req_ready,
  output ptr_t             req_addr,
  output logic [7:0]       req_count,
  input  row_t             rd_data,
  input  logic             rd_valid,
  output logic             rd_ready,
  // activity, for statistics
  output logic             ev_type1,     // a type 1 state was loaded
  output logic             ev_type2,     // a type 2 state was loaded
  output logic             ev_conflict   // a bank conflict delayed a write
);
  typedef enum logic [2:0] {
    S_IDLE, S_HDR_REQ, S_HDR, S_BODY_REQ, S_BODY, S_LOOKUP, S_LOOKUP_WAIT, S_DONE
  } state_e;

  state_e           st;
  tuple_t           tuple_q;
  logic [LEN_W-1:0] len_q;
  ptr_t             cur_q;
  logic [3:0]       idx_q;
  logic             type2_q;
  logic [8:0]       left_q;      // transitions still to be written
  logic [7:0]       rows_q;      // rows still to be received
  logic [2:0]       bmrow_q;     // bitmap rows received (type 1)
  logic [255:0]     bm_q;        // bitmap bits not yet consumed
  logic             acc_q;
  logic [RES_W-1:0] result_q;

  // local table
  logic [2:0]  lt_wr_valid;
  char_t       lt_wr_char [3];
  ptr_t        lt_wr_ptr  [3];
  logic        lt_wr_ready;
  logic        lt_rd_en;
  ptr_t        lt_rd_ptr;

  local_table u_lt (
    .clk      (clk),
    .rst_n    (rst_n),
    .wr_valid (lt_wr_valid),
    .wr_char  (lt_wr_char),
    .wr_ptr   (lt_wr_ptr),
    .wr_ready (lt_wr_ready),
    .rd_en    (lt_rd_en),
    .rd_char  (tuple_char(tuple_q, 32'(idx_q))),
    .rd_ptr   (lt_rd_ptr),
    .conflict (ev_conflict)
  );

  // Header decode
  logic       h_type2;
  logic [8:0] h_n;
  logic [7:0] h_rows;
  always_comb begin
    h_type2 = hdr_is_type2(rd_data);
    h_n     = hdr_count(rd_data);
    if (h_type2) h_rows = 8'((h_n + 9'd1) >> 1);
    else         h_rows = 8'd4 + 8'((h_n + 9'd2) / 9'd3);
  end

  // Lowest set bit of a 256-bit vector.
  function automatic logic [7:0] first_set(logic [255:0] v);
    logic [7:0] r;
    r = '0;
    for (int i = 255; i >= 0; i--)
      if (v[i]) r = 8'(i);
    return r;
  endfunction

  // Body row decode: transitions carried by the current row.
  wire        body_row  = (st == S_BODY) && rd_valid && lt_wr_ready;
  wire        is_bmrow  = !type2_q && (bmrow_q != 3'd4);
  logic [255:0] bm_n;
  logic [8:0]   take;    // transitions written from this row

  always_comb begin
    logic [255:0] v;
    logic [7:0]   f;
    v = bm_q;
    f = '0;
    lt_wr_valid = '0;
    for (int k = 0; k < 3; k++) begin
      lt_wr_char[k] = '0;
      lt_wr_ptr[k]  = '0;
    end
    bm_n = bm_q;
    take = '0;
    if (body_row && !is_bmrow) begin
      if (type2_q) begin
        take = (left_q >= 9'd2) ? 9'd2 : left_q;
        lt_wr_char[0] = rd_data[63:56];
        lt_wr_ptr[0]  = rd_data[55:32];
        lt_wr_char[1] = rd_data[31:24];
        lt_wr_ptr[1]  = rd_data[23:0];
      end else begin
        take = (left_q >= 9'd3) ? 9'd3 : left_q;
        for (int k = 0; k < 3; k++) begin
          f = first_set(v);
          lt_wr_char[k] = f;
          if (9'(k) < take) v[f] = 1'b0;
        end
        bm_n = v;
        lt_wr_ptr[0] = rd_data[71:48];
        lt_wr_ptr[1] = rd_data[47:24];
        lt_wr_ptr[2] = rd_data[23:0];
      end
      for (int k = 0; k < 3; k++)
        lt_wr_valid[k] = 9'(k) < take;
    end
  end

  assign job_ready  = (st == S_IDLE);
  assign req_valid  = (st == S_HDR_REQ) || (st == S_BODY_REQ);
  assign req_addr   = (st == S_HDR_REQ) ? cur_q : cur_q + 1'b1;
  assign req_count  = (st == S_HDR_REQ) ? 8'd1 : rows_q;
  assign rd_ready   = (st == S_HDR) || ((st == S_BODY) && lt_wr_ready);
  assign lt_rd_en   = (st == S_LOOKUP) && lt_wr_ready;
  assign res_valid  = (st == S_DONE);
  assign res_accept = acc_q;
  assign res_result = result_q;
  assign res_len    = len_q;

  wire hdr_in   = (st == S_HDR) && rd_valid;
  wire last_hdr = (idx_q == 4'(TUPLE_LEN));
  assign ev_type1 = hdr_in && !last_hdr && !h_type2;
  assign ev_type2 = hdr_in && !last_hdr &&  h_type2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= S_IDLE;
      tuple_q  <= '0;
      len_q    <= '0;
      cur_q    <= '0;
      idx_q    <= '0;
      type2_q  <= 1'b0;
      left_q   <= '0;
      rows_q   <= '0;
      bmrow_q  <= '0;
      bm_q     <= '0;
      acc_q    <= 1'b0;
      result_q <= '0;
    end else begin
      case (st)
        S_IDLE:
          if (job_valid) begin
            tuple_q <= job_tuple;
            len_q   <= job_len;
            cur_q   <= root_addr;
            idx_q   <= '0;
            st      <= S_HDR_REQ;
          end
        S_HDR_REQ:
          if (req_ready) st <= S_HDR;
        S_HDR:
          if (rd_valid) begin
            acc_q    <= hdr_accept(rd_data);
            result_q <= hdr_result(rd_data);
            type2_q  <= h_type2;
            left_q   <= h_n;
            rows_q   <= h_rows;
            bmrow_q  <= '0;
            if (last_hdr)            st <= S_DONE;
            else if (h_rows == 8'd0) st <= S_LOOKUP;
            else                     st <= S_BODY_REQ;
          end
        S_BODY_REQ:
          if (req_ready) st <= S_BODY;
        S_BODY:
          if (body_row) begin
            if (is_bmrow) begin
              bm_q[64*bmrow_q[1:0] +: 64] <= rd_data[63:0];
              bmrow_q <= bmrow_q + 3'd1;
            end else begin
              bm_q   <= bm_n;
              left_q <= left_q - take;
            end
            rows_q <= rows_q - 8'd1;
            if (rows_q == 8'd1) st <= S_LOOKUP;
          end
        S_LOOKUP:
          if (lt_wr_ready) st <= S_LOOKUP_WAIT;
        S_LOOKUP_WAIT: begin
          cur_q <= lt_rd_ptr;
          idx_q <= idx_q + 4'd1;
          st    <= S_HDR_REQ;
        end
        S_DONE:
          if (res_ready) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
