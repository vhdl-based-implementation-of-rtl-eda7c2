// aes_cipher_datapath: data path of the cipher, the 128-bit state register
// and one round of combinational logic.
//
// On load the register takes data_in XOR rk (the initial round, rk being
// round key 0). On round_en it takes
//   AddRoundKey(MixColumns(SubBytes(ShiftRows(state))), rk)
// or, when last is high, the same without MixColumns. Shift row is placed
// ahead of Sub bytes; the two commute, since Sub bytes works byte by byte.
// data_out is the state register itself. reset (synchronous, active high)
// clears it.
//
// The round content and the Shift-row-first order follow the design; the
// single-register, one-round-per-clock structure is this implementation's.
module aes_cipher_datapath
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

  state_t st, sr, sb, mc, pre_key, init_val, round_val;

  aes_add_round_key   u_init (.state_i(data_in), .w(rk), .state_o(init_val));
  aes_shift_rows      u_sr   (.state_i(st), .state_o(sr));
  aes_sub_bytes       u_sb   (.state_i(sr), .state_o(sb));
  aes_mix_columns     u_mc   (.state_i(sb), .state_o(mc));
  assign pre_key = last ? sb : mc;
  aes_add_round_key   u_ark  (.state_i(pre_key), .w(rk), .state_o(round_val));

  always_ff @(posedge clk) begin
    if (reset)         st <= '0;
    else if (load)     st <= init_val;
    else if (round_en) st <= round_val;
  end

  assign data_out = st;

endmodule
