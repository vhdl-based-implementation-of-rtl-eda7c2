// aes_inv_mix_columns: inverse Mix columns, used by the decipher.
//
// Each column is multiplied over GF(2^8) by the circulant matrix with
// first row 0e 0b 0d 09, the inverse of the Mix columns matrix. The
// constant multiplications are built from xtime chains in aes_pkg.
// Combinational; undoes aes_mix_columns.
module aes_inv_mix_columns
  import aes_pkg::*;
(
  input  state_t state_i,
  output state_t state_o
);

  always_comb begin
    for (int c = 0; c < NB; c++) begin
      byte_t s [4];
      for (int r = 0; r < 4; r++) s[r] = get_b(state_i, r, c);
      for (int r = 0; r < 4; r++)
        state_o[127 - 8*(4*r + c) -: 8] = gf_mul(s[r], 8'h0e) ^ gf_mul(s[(r+1)%4], 8'h0b)
                                          ^ gf_mul(s[(r+2)%4], 8'h0d) ^ gf_mul(s[(r+3)%4], 8'h09);
    end
  end

endmodule
