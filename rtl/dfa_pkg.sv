// dfa_pkg: types and constants shared by the deltaFA packet classifier.
//
// The deltaFA image lives in an external SRAM organised as 72-bit rows. A
// state starts with a header row:
//   [71]    state type: 0 = bitmap state (type 1), 1 = char/pointer list (type 2)
//   [70]    accepting state
//   [69:64] type 2: number of stored transitions (0..30); type 1: zero
//   [63:56] type 1: number of stored transitions; type 2: zero
//   [55:0]  classification result
// A type 1 state continues with four bitmap rows (bits [63:0] of each, 64
// characters per row) and then rows of three 24-bit pointers
// ([71:48], [47:24], [23:0]) in increasing character order. A type 2 state
// continues with rows holding two (character, pointer) pairs:
// char at [63:56] / pointer at [55:32], char at [31:24] / pointer at [23:0].
// These layouts follow the document. The bitmap bit order inside a row, the
// pointer order inside a row and the meaning of a type 1 count of 0 (= 256,
// the fully specified root) are this design's choices.
package dfa_pkg;

  localparam int unsigned ROW_W    = 72;   // SRAM entry width
  localparam int unsigned PTR_W    = 24;   // next-state pointer width
  localparam int unsigned CHAR_W   = 8;
  localparam int unsigned RES_W    = 56;   // classification result field in a header
  localparam int unsigned CLASS_W  = 52;   // classifier output width
  localparam int unsigned TUPLE_LEN = 13;  // src IP, dst IP, src port, dst port, proto
  localparam int unsigned LEN_W    = 16;   // packet length in bytes

  typedef logic [ROW_W-1:0]  row_t;
  typedef logic [PTR_W-1:0]  ptr_t;
  typedef logic [CHAR_W-1:0] char_t;

  // The 5-tuple, in the order the automaton reads it.
  typedef struct packed {
    logic [31:0] src_ip;
    logic [31:0] dst_ip;
    logic [15:0] src_port;
    logic [15:0] dst_port;
    logic [7:0]  proto;
  } tuple_t;

  // One packet's classification job.
  typedef struct packed {
    tuple_t           tuple;
    logic [LEN_W-1:0] len;      // packet length in bytes
    logic             is_ipv4;  // only IPv4 packets are classified
  } job_t;

  // One packet's classification outcome.
  typedef struct packed {
    logic               match;  // final state was accepting
    logic [CLASS_W-1:0] cls;    // classifier output
    logic [LEN_W-1:0]   len;
  } result_t;

  // Character i of the tuple string (i = 0 is the first byte of src_ip).
  function automatic char_t tuple_char(tuple_t t, int unsigned i);
    logic [8*TUPLE_LEN-1:0] flat;
    flat = t;
    return flat[8*(TUPLE_LEN-1-i) +: 8];
  endfunction

  // Header field access.
  function automatic logic hdr_is_type2(row_t r);  return r[71]; endfunction
  function automatic logic hdr_accept(row_t r);    return r[70]; endfunction
  function automatic logic [8:0] hdr_count(row_t r);
    if (r[71])               return {3'b000, r[69:64]};
    else if (r[63:56] == 8'd0) return 9'd256;
    else                     return {1'b0, r[63:56]};
  endfunction
  function automatic logic [RES_W-1:0] hdr_result(row_t r); return r[55:0]; endfunction

endpackage
