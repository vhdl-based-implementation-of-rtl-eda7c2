// aes_sub_bytes: Sub bytes over the whole state, 16 S-boxes side by side.
//
// Every byte of the 128-bit state is replaced by its S-box entry
// independently of the others, so the byte layout does not matter here.
// Combinational. Example: ffeeddcc_bbaa9988_77665544_33221100 becomes
// 1628c14b_eaaceec4_f533fc1b_c3938263.
module aes_sub_bytes
  import aes_pkg::*;
(
  input  state_t state_i,
  output state_t state_o
);

  for (genvar i = 0; i < 16; i++) begin : g_byte
    aes_sbox u_sbox (.a(state_i[8*i +: 8]), .y(state_o[8*i +: 8]));
  end

endmodule
