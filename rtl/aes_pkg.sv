// aes_pkg: types and GF(2^8) arithmetic shared by the AES blocks.
//
// State layout. The 128-bit state is a 4x4 matrix of bytes held row by
// row: byte (r,c) sits at bits [127-8*(4r+c) -: 8], so bits 127:96 are
// row 0 and the most significant byte of each row is column 0. This is the
// layout the original design's example waveforms use (row 1 of
// ffeeddcc_bbaa9988_77665544_33221100 is bbaa9988 and becomes aa9988bb
// after Shift row). It is the transpose of the byte order of FIPS-197,
// where consecutive input bytes fill a column.
//
// The S-box and its inverse are computed here from their definition
// (multiplicative inverse in GF(2^8) modulo x^8+x^4+x^3+x+1, then the
// affine transform with constant 63h) and are evaluated only at
// elaboration, to fill constant lookup tables; no table is typed in.
package aes_pkg;

  typedef logic [127:0] state_t;
  typedef logic [31:0]  word_t;
  typedef logic [7:0]   byte_t;

  localparam int unsigned NB = 4;   // columns of the state

  // byte (r,c) of a row-major state
  function automatic byte_t get_b(state_t s, int unsigned r, int unsigned c);
    return s[127 - 8*(4*r + c) -: 8];
  endfunction

  // multiply by x (02h) modulo the AES polynomial
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // general multiply in GF(2^8)
  function automatic byte_t gf_mul(byte_t a, byte_t b);
    byte_t p = '0;
    byte_t t = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= t;
      t = xtime(t);
    end
    return p;
  endfunction

  // multiplicative inverse as a^254 (0 maps to 0)
  function automatic byte_t gf_inv(byte_t a);
    byte_t r = 8'h01;
    byte_t sq = a;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gf_mul(r, sq);   // 254 = 11111110b
      sq = gf_mul(sq, sq);
    end
    return r;
  endfunction

  function automatic byte_t affine(byte_t b);
    byte_t y;
    for (int i = 0; i < 8; i++)
      y[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return y ^ 8'h63;
  endfunction

  function automatic byte_t inv_affine(byte_t b);
    byte_t y;
    for (int i = 0; i < 8; i++)
      y[i] = b[(i+2)%8] ^ b[(i+5)%8] ^ b[(i+7)%8];
    return y ^ 8'h05;
  endfunction

  function automatic byte_t sbox_calc(byte_t a);
    return affine(gf_inv(a));
  endfunction

  function automatic byte_t inv_sbox_calc(byte_t a);
    return gf_inv(inv_affine(a));
  endfunction

endpackage
