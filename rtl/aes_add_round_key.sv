// aes_add_round_key: Add round key, a bitwise XOR of the state with the
// 128-bit round key w of the same layout. Combinational. Example:
// ffeeddcc_bbaa9988_77665544_33221100 XOR 55ee76cc_bbaa9988_33665544_33221100
// gives aa00ab00_00000000_44000000_00000000.
module aes_add_round_key
  import aes_pkg::*;
(
  input  state_t state_i,
  input  state_t w,
  output state_t state_o
);

  assign state_o = state_i ^ w;

endmodule
