// aes_mix_columns: Mix columns transformation.
//
// Each column (S0,c .. S3,c) is multiplied over GF(2^8) by the circulant
// matrix with first row 02 03 01 01, i.e. by a(x) = 03x^3+01x^2+01x+02
// modulo x^4+1. Multiplication by 02 is a shift with a conditional XOR of
// 1bh (xtime); by 03 it is xtime(a)^a. Combinational. With the row-major
// layout, ffeeddcc_bbaa9988_77665544_33221100 becomes
// 77665544_38291a0b_ffeeddcc_b0a19283.
module aes_mix_columns
  import aes_pkg::*;
(
  input  state_t state_i,
  output state_t state_o
);

  always_comb begin
    for (int c = 0; c < NB; c++) begin
      byte_t s0, s1, s2, s3;
      s0 = get_b(state_i, 0, c);
      s1 = get_b(state_i, 1, c);
      s2 = get_b(state_i, 2, c);
      s3 = get_b(state_i, 3, c);
      state_o[127 - 8*(0 + c) -: 8] = xtime(s0) ^ (xtime(s1) ^ s1) ^ s2 ^ s3;
      state_o[127 - 8*(4 + c) -: 8] = s0 ^ xtime(s1) ^ (xtime(s2) ^ s2) ^ s3;
      state_o[127 - 8*(8 + c) -: 8] = s0 ^ s1 ^ xtime(s2) ^ (xtime(s3) ^ s3);
      state_o[127 - 8*(12 + c) -: 8] = (xtime(s0) ^ s0) ^ s1 ^ s2 ^ xtime(s3);
    end
  end

endmodule
