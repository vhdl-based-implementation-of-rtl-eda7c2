// aes_decipher: the AES decryption unit, control unit and data path joined
// structurally.
//
// It takes round keys, last one first, from an external key schedule
// through rk_idx / rk.
// Pulse start with data_in valid and key_ready high; NR+1 clocks later
// done pulses and data_out holds the plain text until the next start.
// busy is high while rounds are running and start is then ignored.
module aes_decipher
  import aes_pkg::*;
#(
  parameter int unsigned NR = 10,
  localparam int unsigned IW = $clog2(NR + 1)
)(
  input  logic          clk,
  input  logic          reset,
  input  logic          start,
  input  logic          key_ready,
  input  state_t        data_in,
  output logic [IW-1:0] rk_idx,
  input  state_t        rk,
  output state_t        data_out,
  output logic          busy,
  output logic          done
);

  logic load, round_en, last;

  aes_decipher_control #(.NR(NR)) u_ctrl (
    .clk, .reset, .start, .key_ready,
    .load, .round_en, .last, .rk_idx, .busy, .done
  );

  aes_decipher_datapath u_dp (
    .clk, .reset, .load, .round_en, .last, .data_in, .rk, .data_out
  );

endmodule
