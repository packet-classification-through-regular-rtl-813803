// output_stage: forwards or drops each buffered packet by its classification.
//
// Packets wait in the packets FIFO (words of {eop, valid bytes, data}) while
// their results arrive, in packet order, on the result queue. For the packet
// at the head of the FIFO this block takes the next result: if the tuple
// matched a rule the packet's words are sent out on out_*, with the 52-bit
// classifier output and the packet length held on out_cls/out_len for the
// whole packet; otherwise the words are drained from the FIFO and discarded.
// out_sop marks the first word. Forwarding follows out_ready; dropping runs at
// one word per cycle.
//
// The document shows the packets FIFO feeding the output port next to a 52-bit
// classifier output, and says that traffic not matching the rules is dropped;
// the pairing of results with packets and the port signalling are this
// design's.
module output_stage
  import dfa_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // packets FIFO head
  input  logic [67:0]        pkt_data,
  input  logic               pkt_valid,
  output logic               pkt_ready,
  // result queue head
  input  result_t            res,
  input  logic               res_valid,
  output logic               res_ready,
  // packet output
  output logic [63:0]        out_data,
  output logic               out_valid,
  output logic               out_sop,
  output logic               out_eop,
  output logic [2:0]         out_bytes,
  output logic [CLASS_W-1:0] out_cls,
  output logic [LEN_W-1:0]   out_len,
  input  logic               out_ready,
  // activity, for statistics
  output logic               ev_fwd,     // a packet was forwarded (at its last word)
  output logic               ev_drop     // a packet was dropped (at its last word)
);
  logic    active;   // a result is bound to the head packet
  logic    first;
  result_t cur;

  wire pkt_eop = pkt_data[67];

  assign res_ready = !active;
  assign out_data  = pkt_data[63:0];
  assign out_bytes = pkt_data[66:64];
  assign out_eop   = pkt_eop;
  assign out_sop   = first;
  assign out_cls   = cur.cls;
  assign out_len   = cur.len;
  assign out_valid = active && cur.match && pkt_valid;
  assign pkt_ready = active && (cur.match ? out_ready : 1'b1);

  wire word_done = pkt_valid && pkt_ready;
  assign ev_fwd  = word_done && pkt_eop &&  cur.match;
  assign ev_drop = word_done && pkt_eop && !cur.match;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      first  <= 1'b0;
      cur    <= '0;
    end else begin
      if (!active && res_valid) begin
        active <= 1'b1;
        first  <= 1'b1;
        cur    <= res;
      end else if (word_done) begin
        first <= 1'b0;
        if (pkt_eop) active <= 1'b0;
      end
    end
  end

endmodule
