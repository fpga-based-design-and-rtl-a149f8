// golay_pkg - shared types and constants of the extended Golay (24,12,8) codec.
//
// The code is systematic. A 24-bit word w is split into a check half w[23:12]
// and a message half w[11:0]. The 12x12 binary matrix B defines both the
// encoder and the syndrome: a word is a codeword exactly when
//     w[23:12] = B * w[11:0]   (arithmetic over GF(2)).
// Row r of B (B_ROW[r]) lists the message bits that enter check bit r; the
// rows below are read off the published syndrome equations, bit k of a row
// standing for w[k]. B is symmetric and B*B = I, so the same rows also serve
// as the columns b_k used by the decoder and as the second-syndrome matrix.
package golay_pkg;

  localparam int unsigned N = 24;  // codeword length
  localparam int unsigned K = 12;  // message length

  typedef logic [N-1:0] codeword_t;
  typedef logic [K-1:0] half_t;     // a 12-bit half word, syndrome or matrix row
  typedef logic [3:0]   weight_t;   // Hamming weight of a half word, 0..12
  typedef logic [3:0]   index_t;    // bit position within a half word, 0..11

  // B_ROW[r]: message bits (w[11:0]) that are XORed into check bit r / S[r].
  localparam half_t B_ROW [K] = '{
    12'b111111111110,  // row 0  : S[0]  = w[12] ^ w[11..1]
    12'b011011100011,  // row 1  : S[1]  = w[13] ^ w[10,9,7,6,5,1,0]
    12'b101101110001,  // row 2  : S[2]  = w[14] ^ w[11,9,8,6,5,4,0]
    12'b010110111001,  // row 3  : S[3]  = w[15] ^ w[10,8,7,5,4,3,0]
    12'b001011011101,  // row 4  : S[4]  = w[16] ^ w[9,7,6,4,3,2,0]
    12'b000101101111,  // row 5  : S[5]  = w[17] ^ w[8,6,5,3,2,1,0]
    12'b100010110111,  // row 6  : S[6]  = w[18] ^ w[11,7,5,4,2,1,0]
    12'b110001011011,  // row 7  : S[7]  = w[19] ^ w[11,10,6,4,3,1,0]
    12'b111000101101,  // row 8  : S[8]  = w[20] ^ w[11,10,9,5,3,2,0]
    12'b011100010111,  // row 9  : S[9]  = w[21] ^ w[10,9,8,4,2,1,0]
    12'b101110001011,  // row 10 : S[10] = w[22] ^ w[11,9,8,7,3,1,0]
    12'b110111000101   // row 11 : S[11] = w[23] ^ w[11,10,8,7,6,2,0]
  };

  // Column k of B: bit r is B_ROW[r][k]. Equal to B_ROW[k] because B is
  // symmetric; written out so that the code does not depend on that fact.
  function automatic half_t b_col(input index_t k);
    half_t c;
    for (int unsigned r = 0; r < K; r++) c[r] = B_ROW[r][k];
    return c;
  endfunction

  // B * v over GF(2): bit r is the parity of (row r AND v).
  function automatic half_t b_mult(input half_t v);
    half_t p;
    for (int unsigned r = 0; r < K; r++) p[r] = ^(B_ROW[r] & v);
    return p;
  endfunction

endpackage
