// rns_pkg: shared types for the {2P+1, 2P, 2P-1} residue-to-binary converter.
//
// corr_sel_e encodes the five corrections that adder C can add to the doubled
// provisional sum T = x1 + x3 - 2*x2: -m3, 0, m3, 2m3 and 3m3. These five
// constants are the inputs of the correction multiplexer of the converter.
// The helper functions give the bit widths that all blocks derive from the
// modulus parameter P, so that every module agrees on them.
package rns_pkg;

  typedef enum logic [2:0] {
    CORR_ZERO  = 3'd0,  // add 0
    CORR_P_M3  = 3'd1,  // add m3
    CORR_P_2M3 = 3'd2,  // add 2*m3
    CORR_P_3M3 = 3'd3,  // add 3*m3
    CORR_N_M3  = 3'd4   // add -m3
  } corr_sel_e;

  // Bits of an unsigned value that can be as large as v.
  function automatic int unsigned bits_for(longint unsigned v);
    int unsigned n = 1;
    while ((longint'(1) << n) <= v) n++;
    return n;
  endfunction

  // Width of every residue channel: the largest residue is 2P (mod 2P+1).
  function automatic int unsigned res_width(int unsigned p);
    return bits_for(2 * p);
  endfunction

  // Width of the binary result: the largest value is M-1.
  function automatic int unsigned out_width(int unsigned p);
    longint unsigned m = longint'(2 * p + 1) * longint'(2 * p) * longint'(2 * p - 1);
    return bits_for(m - 1);
  endfunction

endpackage
