// dfa_image_pkg: test-side generator of deltaFA state-memory images.
//
// A dfa_image object builds a random DFA over the 256-character alphabet with
// the locality real rule sets show: every state takes the same next state as
// a shared "default" row for most characters and differs on a few. The
// default row leads only to four "hub" states, so hubs have many predecessors
// (and become bitmap states) while the others have few (list states). It then
// turns the DFA into a deltaFA the way the classifier expects it:
//   - the root state (state 0) stores all 256 transitions;
//   - any other state s stores every character c for which some predecessor
//     p of s (a state with an edge into s) has T[p][c] != T[s][c], so that
//     after s's stored transitions are applied to p's full row, the local
//     table equals s's full row;
//   - a state with n stored transitions becomes a bitmap state (type 1) when
//     n > 30, a char/pointer list (type 2) when n <= 24, and either type,
//     picked at random, in between.
// States are laid out one after the other from row `base`; a pointer is the
// row address of the target state's header. `run` is the reference model: it
// steps the full DFA over a tuple string.
package dfa_image_pkg;
  import dfa_pkg::*;

  class dfa_image;
    int unsigned ns;
    int unsigned base;
    int unsigned trans [][256];
    bit          accept[];
    logic [55:0] result[];
    bit          stored[][256];
    int unsigned nstored[];
    bit          type2[];
    int unsigned addr[];
    row_t        rows[$];     // image, row i at address base + i

    function new(int unsigned n_states, int unsigned base_addr, int unsigned max_diff);
      int unsigned dflt[256];
      ns   = n_states;
      base = base_addr;
      trans   = new[ns];
      accept  = new[ns];
      result  = new[ns];
      stored  = new[ns];
      nstored = new[ns];
      type2   = new[ns];
      addr    = new[ns];
      for (int c = 0; c < 256; c++) dflt[c] = $urandom_range((ns > 4) ? 3 : ns - 1);
      for (int s = 0; s < ns; s++) begin
        int unsigned k;
        for (int c = 0; c < 256; c++) trans[s][c] = dflt[c];
        k = $urandom_range(max_diff);
        for (int i = 0; i < k; i++) trans[s][$urandom_range(255)] = $urandom_range(ns - 1);
        accept[s] = ($urandom_range(99) < 40);
        result[s] = {$urandom, $urandom};
        result[s][55:52] = 4'h0;
      end
      build();
    endfunction

    function void build();
      int unsigned a;
      for (int s = 0; s < ns; s++) begin
        for (int c = 0; c < 256; c++) stored[s][c] = (s == 0);
      end
      for (int p = 0; p < ns; p++)
        for (int c = 0; c < 256; c++) begin
          int unsigned s;
          s = trans[p][c];
          if (s != 0)
            for (int d = 0; d < 256; d++)
              if (trans[p][d] != trans[s][d]) stored[s][d] = 1'b1;
        end
      a = base;
      for (int s = 0; s < ns; s++) begin
        nstored[s] = 0;
        for (int c = 0; c < 256; c++) nstored[s] += stored[s][c];
        if (nstored[s] > 30)      type2[s] = 1'b0;
        else if (nstored[s] <= 24) type2[s] = 1'b1;
        else                      type2[s] = $urandom_range(1);
        addr[s] = a;
        a += type2[s] ? 1 + (nstored[s] + 1) / 2 : 5 + (nstored[s] + 2) / 3;
      end
      rows.delete();
      for (int s = 0; s < ns; s++) encode(s);
    endfunction

    function void encode(int unsigned s);
      row_t r;
      int unsigned list_c[$];
      for (int c = 0; c < 256; c++) if (stored[s][c]) list_c.push_back(c);
      r = '0;
      r[71] = type2[s];
      r[70] = accept[s];
      if (type2[s]) r[69:64] = 6'(nstored[s]);
      else          r[63:56] = 8'(nstored[s]);   // 256 wraps to 0
      r[55:0] = result[s];
      rows.push_back(r);
      if (type2[s]) begin
        for (int i = 0; i < list_c.size(); i += 2) begin
          r = '0;
          r[63:56] = 8'(list_c[i]);
          r[55:32] = 24'(addr[trans[s][list_c[i]]]);
          if (i + 1 < list_c.size()) begin
            r[31:24] = 8'(list_c[i+1]);
            r[23:0]  = 24'(addr[trans[s][list_c[i+1]]]);
          end
          rows.push_back(r);
        end
      end else begin
        for (int q = 0; q < 4; q++) begin
          r = '0;
          for (int j = 0; j < 64; j++) r[j] = stored[s][64*q + j];
          rows.push_back(r);
        end
        for (int i = 0; i < list_c.size(); i += 3) begin
          r = '0;
          r[71:48] = 24'(addr[trans[s][list_c[i]]]);
          if (i + 1 < list_c.size()) r[47:24] = 24'(addr[trans[s][list_c[i+1]]]);
          if (i + 2 < list_c.size()) r[23:0]  = 24'(addr[trans[s][list_c[i+2]]]);
          rows.push_back(r);
        end
      end
    endfunction

    // Row at absolute address a (zero outside the image).
    function row_t row_at(int unsigned a);
      if (a < base || a >= base + rows.size()) return '0;
      return rows[a - base];
    endfunction

    // Reference: final state after the 13 tuple characters.
    function int unsigned run(tuple_t t);
      int unsigned s;
      s = 0;
      for (int i = 0; i < TUPLE_LEN; i++) s = trans[s][tuple_char(t, i)];
      return s;
    endfunction

    // Number of SRAM rows the walker reads for tuple t, and the states of each type.
    function void walk_stats(tuple_t t, output int unsigned nrows,
                             output int unsigned n1, output int unsigned n2);
      int unsigned s;
      s = 0; nrows = 0; n1 = 0; n2 = 0;
      for (int i = 0; i < TUPLE_LEN; i++) begin
        nrows += 1 + (type2[s] ? (nstored[s] + 1) / 2 : 4 + (nstored[s] + 2) / 3);
        if (type2[s]) n2++; else n1++;
        s = trans[s][tuple_char(t, i)];
      end
      nrows += 1;
    endfunction

    // A random tuple string; at each step it prefers, half of the time, a
    // character that leaves the hub states, so that all states get visited.
    function tuple_t random_tuple();
      logic [8*TUPLE_LEN-1:0] flat;
      int unsigned s, c, tries;
      s = 0;
      for (int i = 0; i < TUPLE_LEN; i++) begin
        c = $urandom_range(255);
        if ($urandom_range(1) == 1) begin
          tries = 0;
          while (trans[s][c] < 4 && tries < 64) begin
            c = $urandom_range(255);
            tries++;
          end
        end
        flat[8*(TUPLE_LEN-1-i) +: 8] = 8'(c);
        s = trans[s][c];
      end
      return tuple_t'(flat);
    endfunction
  endclass

endpackage
