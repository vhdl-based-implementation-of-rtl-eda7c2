// aes_ref_pkg: reference model for the AES testbenches, written apart
// from the design's own arithmetic.
//
// GF(2^8) products are formed by carry-less multiplication and explicit
// reduction by 11bh, inverses by exhaustive search, and the affine map by
// byte rotations. The full cipher works in the FIPS-197 byte order
// (byte i of a block is state row i%4, column i/4); transpose() converts
// between that order and the design's row-major order, byte (r,c) at
// position 4r+c.
package aes_ref_pkg;

  typedef logic [127:0] blk_t;

  function automatic logic [7:0] ref_mul(logic [7:0] a, logic [7:0] b);
    logic [14:0] p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 15'(a) << i;
    for (int i = 14; i >= 8; i--) if (p[i]) p ^= 15'h11b << (i - 8);
    return p[7:0];
  endfunction

  function automatic logic [7:0] ref_inv(logic [7:0] a);
    if (a == 0) return 8'h00;
    for (int x = 1; x < 256; x++) if (ref_mul(a, 8'(x)) == 8'h01) return 8'(x);
    return 8'h00;
  endfunction

  function automatic logic [7:0] rotl8(logic [7:0] b, int n);
    return (b << n) | (b >> (8 - n));
  endfunction

  function automatic logic [7:0] ref_sbox(logic [7:0] a);
    logic [7:0] b = ref_inv(a);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  // byte n (0 = most significant) of a block
  function automatic logic [7:0] byte_at(blk_t x, int n);
    return x[127 - 8*n -: 8];
  endfunction

  function automatic blk_t transpose(blk_t x);
    blk_t y;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) y[127 - 8*(4*r + c) -: 8] = byte_at(x, r + 4*c);
    return y;
  endfunction

  // ---- single transformations, design (row-major) layout ----
  function automatic blk_t ref_sub_bytes(blk_t x);
    blk_t y;
    for (int n = 0; n < 16; n++) y[127 - 8*n -: 8] = ref_sbox(byte_at(x, n));
    return y;
  endfunction

  function automatic blk_t ref_shift_rows(blk_t x);
    logic [31:0] row;
    blk_t y;
    for (int r = 0; r < 4; r++) begin
      row = x[127 - 32*r -: 32];
      y[127 - 32*r -: 32] = (row << (8*r)) | (row >> (32 - 8*r));
    end
    return y;
  endfunction

  function automatic blk_t ref_mix_columns(blk_t x);
    logic [7:0] m [4][4] = '{'{2,3,1,1}, '{1,2,3,1}, '{1,1,2,3}, '{3,1,1,2}};
    blk_t y;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        logic [7:0] acc = '0;
        for (int k = 0; k < 4; k++) acc ^= ref_mul(m[r][k], byte_at(x, 4*k + c));
        y[127 - 8*(4*r + c) -: 8] = acc;
      end
    return y;
  endfunction

  // ---- full cipher, FIPS-197 byte order ----
  // round keys: rk[i] is a block in FIPS order
  function automatic void ref_expand(blk_t key, int nr, ref blk_t rk [15]);
    logic [31:0] w [60];
    logic [7:0]  rcon = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 4*(nr + 1); i++) begin
      logic [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {ref_sbox(t[31:24]), ref_sbox(t[23:16]), ref_sbox(t[15:8]), ref_sbox(t[7:0])};
        t ^= {rcon, 24'h0};
        rcon = ref_mul(rcon, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int k = 0; k <= nr; k++) rk[k] = {w[4*k], w[4*k+1], w[4*k+2], w[4*k+3]};
  endfunction

  function automatic blk_t ref_encrypt_fips(blk_t pt, blk_t key, int nr);
    blk_t rk [15];
    blk_t s;
    ref_expand(key, nr, rk);
    // work in the design layout for the round functions above
    s = transpose(pt ^ rk[0]);
    for (int k = 1; k <= nr; k++) begin
      s = ref_shift_rows(ref_sub_bytes(s));
      if (k != nr) s = ref_mix_columns(s);
      s ^= transpose(rk[k]);
    end
    return transpose(s);
  endfunction

  // design-layout wrapper: the design treats its 128-bit words row-major
  function automatic blk_t ref_encrypt(blk_t pt, blk_t key, int nr);
    return transpose(ref_encrypt_fips(transpose(pt), transpose(key), nr));
  endfunction

  // round key k of a design-layout key, in design layout
  function automatic blk_t ref_round_key(blk_t key, int nr, int k);
    blk_t rk [15];
    ref_expand(transpose(key), nr, rk);
    return transpose(rk[k]);
  endfunction

endpackage
