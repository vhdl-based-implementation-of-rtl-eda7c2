// aes_inv_sub_bytes: inverse Sub bytes over the whole state, 16 inverse
// S-boxes side by side. Combinational; undoes aes_sub_bytes.
module aes_inv_sub_bytes
  import aes_pkg::*;
(
  input  state_t state_i,
  output state_t state_o
);

  for (genvar i = 0; i < 16; i++) begin : g_byte
    aes_inv_sbox u_isbox (.a(state_i[8*i +: 8]), .y(state_o[8*i +: 8]));
  end

endmodule
