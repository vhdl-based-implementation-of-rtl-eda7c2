// aes_decipher_datapath: data path of the inverse cipher, the 128-bit state
// register and one inverse round.
//
// On load the register takes data_in XOR rk (rk being round key NR). On
// round_en it takes
//   InvMixColumns(AddRoundKey(InvSubBytes(InvShiftRows(state)), rk))
// or, when last is high, the same without InvMixColumns, which is the
// encryption rounds run backwards. data_out is the state register. reset
// (synchronous, active high) clears it.
//
// The design only names the inverse transformations; this round order is
// the standard inverse cipher.
module aes_decipher_datapath
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   reset,
  input  logic   load,
  input  logic   round_en,
  input  logic   last,
  input  state_t data_in,
  input  state_t rk,
  output state_t data_out
);

  state_t st, isr, isb, ark, imc, init_val, round_val;

  aes_add_round_key   u_init (.state_i(data_in), .w(rk), .state_o(init_val));
  aes_inv_shift_rows  u_isr  (.state_i(st), .state_o(isr));
  aes_inv_sub_bytes   u_isb  (.state_i(isr), .state_o(isb));
  aes_add_round_key   u_ark  (.state_i(isb), .w(rk), .state_o(ark));
  aes_inv_mix_columns u_imc  (.state_i(ark), .state_o(imc));
  assign round_val = last ? ark : imc;

  always_ff @(posedge clk) begin
    if (reset)         st <= '0;
    else if (load)     st <= init_val;
    else if (round_en) st <= round_val;
  end

  assign data_out = st;

endmodule
