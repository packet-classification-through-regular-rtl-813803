// datapath_ctrl: packet parser in front of the deltaFA classifier.
//
// Packets arrive as 64-bit words, most significant byte first (byte 8k of the
// frame is in_data[63:56] of word k), with start/end-of-packet flags and the
// number of valid bytes in the last word (0 meaning all 8). Every word is
// passed on unchanged to the packets FIFO. On the way the parser picks the
// 5-tuple out of the Ethernet/IPv4 headers by byte position: protocol
// (byte 23), source and destination address (26..33) and, after an IPv4
// header of IHL 32-bit words, the TCP/UDP source and destination ports. The
// layer 4 ports are only kept for TCP (6) and UDP (17); otherwise they are 0.
// As soon as the last tuple byte has passed, or at the end of a shorter packet,
// one job (tuple, packet length, IPv4 flag) is pushed to the classifier.
// Frames that are not IPv4 get their job, with an all-zero tuple, at their
// last word.
// The packet length is the IPv4 total length plus the 14-byte Ethernet header,
// or the counted frame length for packets that are not IPv4.
//
// The document says only that this block extracts the 5-tuple and feeds it to
// the automaton one character at a time, and that it gives the automaton the
// packet length; the word format, byte offsets, tuple order within a character
// stream (src IP, dst IP, src port, dst port, protocol, as listed in the
// document) and the backpressure scheme are this design's. Input backpressure:
// in_ready is low while either the packets FIFO or the job queue cannot accept.
module datapath_ctrl
  import dfa_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // packet input
  input  logic [63:0] in_data,
  input  logic        in_valid,
  input  logic        in_sop,
  input  logic        in_eop,
  input  logic [2:0]  in_bytes,
  output logic        in_ready,
  // to packets FIFO: {eop, bytes, data}
  output logic [67:0] pkt_data,
  output logic        pkt_valid,
  input  logic        pkt_ready,
  // to classifier
  output job_t        job,
  output logic        job_valid,
  input  logic        job_ready
);
  logic [12:0]      wcnt;       // word index within the packet
  logic             job_sent;   // job of this packet already pushed
  logic [3:0]       ihl_q;
  logic [15:0]      etype_q;
  logic [15:0]      totlen_q;
  tuple_t           tup_q;
  logic [3:0]       ver_q;

  // Per-word extraction, using the fields already captured for the
  // packet (IHL comes in word 1, before any port byte).
  tuple_t      tup_n;
  logic [3:0]  ihl_n, ver_n;
  logic [15:0] etype_n, totlen_n;
  logic        last_tuple_byte;
  logic [15:0] l4off, b;
  logic [7:0]  byte_v;

  always_comb begin
    tup_n    = in_sop ? '0 : tup_q;
    ihl_n    = in_sop ? '0 : ihl_q;
    ver_n    = in_sop ? '0 : ver_q;
    etype_n  = in_sop ? '0 : etype_q;
    totlen_n = in_sop ? '0 : totlen_q;
    last_tuple_byte = 1'b0;
    l4off = 16'd14 + {10'd0, ihl_q, 2'b00};
    for (int j = 0; j < 8; j++) begin
      b      = {wcnt, 3'b000} + 16'(j);
      byte_v = in_data[63-8*j -: 8];
      if (in_sop) b = 16'(j);
      case (b)
        16'd12: etype_n[15:8] = byte_v;
        16'd13: etype_n[7:0]  = byte_v;
        16'd14: begin ver_n = byte_v[7:4]; ihl_n = byte_v[3:0]; end
        16'd16: totlen_n[15:8] = byte_v;
        16'd17: totlen_n[7:0]  = byte_v;
        16'd23: tup_n.proto    = byte_v;
        16'd26: tup_n.src_ip[31:24] = byte_v;
        16'd27: tup_n.src_ip[23:16] = byte_v;
        16'd28: tup_n.src_ip[15:8]  = byte_v;
        16'd29: tup_n.src_ip[7:0]   = byte_v;
        16'd30: tup_n.dst_ip[31:24] = byte_v;
        16'd31: tup_n.dst_ip[23:16] = byte_v;
        16'd32: tup_n.dst_ip[15:8]  = byte_v;
        16'd33: tup_n.dst_ip[7:0]   = byte_v;
        default: ;
      endcase
      // Port bytes: only from word 2 on, when IHL is known.
      if (!in_sop && wcnt >= 13'd2 && ihl_q >= 4'd5) begin
        if (b == l4off)         tup_n.src_port[15:8] = byte_v;
        if (b == l4off + 16'd1) tup_n.src_port[7:0]  = byte_v;
        if (b == l4off + 16'd2) tup_n.dst_port[15:8] = byte_v;
        if (b == l4off + 16'd3) begin
          tup_n.dst_port[7:0] = byte_v;
          last_tuple_byte = 1'b1;
        end
      end
    end
  end

  logic        is_ipv4_n;
  logic [15:0] counted_len;
  logic        emit;
  assign emit = in_valid && in_ready && !(job_sent && !in_sop) && ((last_tuple_byte && is_ipv4_n) || in_eop);

  assign in_ready  = pkt_ready && job_ready;
  assign pkt_valid = in_valid && in_ready;
  assign pkt_data  = {in_eop, in_bytes, in_data};

  assign is_ipv4_n   = (etype_n == 16'h0800) && (ver_n == 4'd4) && (ihl_n >= 4'd5);
  assign counted_len = {wcnt, 3'b000} + ((in_bytes == 3'd0) ? 16'd8 : {13'd0, in_bytes});

  always_comb begin
    job_valid = emit;
    job.tuple = tup_n;
    if (!(tup_n.proto == 8'd6 || tup_n.proto == 8'd17) || !last_tuple_byte) begin
      job.tuple.src_port = '0;
      job.tuple.dst_port = '0;
    end
    if (!is_ipv4_n) job.tuple = '0;
    job.is_ipv4 = is_ipv4_n;
    job.len     = is_ipv4_n ? totlen_n + 16'd14 : counted_len;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcnt     <= '0;
      job_sent <= 1'b0;
      ihl_q    <= '0;
      ver_q    <= '0;
      etype_q  <= '0;
      totlen_q <= '0;
      tup_q    <= '0;
    end else if (in_valid && in_ready) begin
      tup_q    <= tup_n;
      ihl_q    <= ihl_n;
      ver_q    <= ver_n;
      etype_q  <= etype_n;
      totlen_q <= totlen_n;
      if (in_eop) begin
        wcnt     <= '0;
        job_sent <= 1'b0;
      end else begin
        wcnt     <= (in_sop ? 13'd0 : wcnt) + 13'd1;
        job_sent <= (in_sop ? 1'b0 : job_sent) | emit;
      end
    end
  end

endmodule
