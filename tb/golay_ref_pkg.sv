// golay_ref_pkg - testbench reference model of the extended Golay (24,12,8) code.
//
// Written independently of the RTL matrix constant: the check equations are
// spelled out term by term as XORs of message bits, the matrix columns are
// derived from them by encoding unit vectors, and B*v is formed as a sum of
// columns rather than row parities. Also draws random error patterns.
package golay_ref_pkg;

  // Check bits c[r] (codeword bit 12+r) of message m.
  function automatic logic [11:0] ref_check(input logic [11:0] m);
    logic [11:0] c;
    c[11] = m[11] ^ m[10] ^ m[8] ^ m[7] ^ m[6] ^ m[2] ^ m[0];
    c[10] = m[11] ^ m[9]  ^ m[8] ^ m[7] ^ m[3] ^ m[1] ^ m[0];
    c[9]  = m[10] ^ m[9]  ^ m[8] ^ m[4] ^ m[2] ^ m[1] ^ m[0];
    c[8]  = m[11] ^ m[10] ^ m[9] ^ m[5] ^ m[3] ^ m[2] ^ m[0];
    c[7]  = m[11] ^ m[10] ^ m[6] ^ m[4] ^ m[3] ^ m[1] ^ m[0];
    c[6]  = m[11] ^ m[7]  ^ m[5] ^ m[4] ^ m[2] ^ m[1] ^ m[0];
    c[5]  = m[8]  ^ m[6]  ^ m[5] ^ m[3] ^ m[2] ^ m[1] ^ m[0];
    c[4]  = m[9]  ^ m[7]  ^ m[6] ^ m[4] ^ m[3] ^ m[2] ^ m[0];
    c[3]  = m[10] ^ m[8]  ^ m[7] ^ m[5] ^ m[4] ^ m[3] ^ m[0];
    c[2]  = m[11] ^ m[9]  ^ m[8] ^ m[6] ^ m[5] ^ m[4] ^ m[0];
    c[1]  = m[10] ^ m[9]  ^ m[7] ^ m[6] ^ m[5] ^ m[1] ^ m[0];
    c[0]  = m[11] ^ m[10] ^ m[9] ^ m[8] ^ m[7] ^ m[6] ^ m[5] ^ m[4] ^ m[3] ^ m[2] ^ m[1];
    return c;
  endfunction

  function automatic logic [23:0] ref_encode(input logic [11:0] m);
    return {ref_check(m), m};
  endfunction

  // Column k of B = check bits of the unit message with only bit k set.
  function automatic logic [11:0] ref_col(input int k);
    return ref_check(12'(1) << k);
  endfunction

  function automatic logic [11:0] ref_syndrome(input logic [23:0] w);
    return w[23:12] ^ ref_check(w[11:0]);
  endfunction

  // B * v as the XOR of the columns selected by v.
  function automatic logic [11:0] ref_bmult(input logic [11:0] v);
    logic [11:0] p = '0;
    for (int k = 0; k < 12; k++) if (v[k]) p ^= ref_col(k);
    return p;
  endfunction

  // Random 24-bit pattern with exactly n ones.
  function automatic logic [23:0] rand_pattern(input int n);
    logic [23:0] e = '0;
    while ($countones(e) < n) e[$urandom_range(23, 0)] = 1'b1;
    return e;
  endfunction

endpackage
