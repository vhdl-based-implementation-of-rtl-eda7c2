// aes_top: the AES system, one shared key schedule feeding an encryption
// unit and a decryption unit.
//
// Operation. Load a 128-bit key with a one-cycle key_load pulse; key_ready
// rises NR+1 clocks later, once all round keys are stored. Then pulse start
// with data_in valid and decrypt selecting the direction (0: plain text to
// cipher text, 1: back). done pulses NR+1 clocks after start, and data_out
// then holds the result until the next accepted start. One operation runs
// at a time: start and key_load are ignored while busy is high (a key load
// would change round keys under a running operation), and start is also
// ignored while key_ready is low. Keys stay valid for any number of blocks.
//
// Data and key use the row-major byte layout described in aes_pkg, the
// transpose of FIPS-197's byte order: a FIPS-197 vector is applied by
// transposing the 4x4 byte matrices of plain text, key and cipher text.
// reset is synchronous and active high.
//
// The split into a cipher and a decipher, each a control unit plus a
// data path, follows the design. The shared key schedule, the handshake
// and the lock-out rules for start and key_load are this implementation's.
module aes_top
  import aes_pkg::*;
#(
  parameter int unsigned NR = 10
)(
  input  logic   clk,
  input  logic   reset,
  input  logic   key_load,
  input  state_t key,
  output logic   key_ready,
  input  logic   start,
  input  logic   decrypt,
  input  state_t data_in,
  output state_t data_out,
  output logic   busy,
  output logic   done
);

  localparam int unsigned IW = $clog2(NR + 1);

  logic          enc_busy, dec_busy, enc_done, dec_done;
  logic          key_load_ok, enc_start, dec_start, sel_dec;
  logic [IW-1:0] enc_idx, dec_idx;
  state_t        enc_rk, dec_rk, enc_out, dec_out;

  assign busy        = enc_busy | dec_busy;
  assign key_load_ok = key_load & ~busy;
  assign enc_start   = start & ~decrypt & ~busy & ~key_load;
  assign dec_start   = start &  decrypt & ~busy & ~key_load;

  aes_key_expansion #(.NR(NR)) u_keys (
    .clk, .reset, .load(key_load_ok), .key, .ready(key_ready),
    .idx_a(enc_idx), .rk_a(enc_rk), .idx_b(dec_idx), .rk_b(dec_rk)
  );

  aes_cipher #(.NR(NR)) u_enc (
    .clk, .reset, .start(enc_start), .key_ready, .data_in,
    .rk_idx(enc_idx), .rk(enc_rk), .data_out(enc_out), .busy(enc_busy), .done(enc_done)
  );

  aes_decipher #(.NR(NR)) u_dec (
    .clk, .reset, .start(dec_start), .key_ready, .data_in,
    .rk_idx(dec_idx), .rk(dec_rk), .data_out(dec_out), .busy(dec_busy), .done(dec_done)
  );

  // remember which unit the result comes from
  always_ff @(posedge clk) begin
    if (reset)                        sel_dec <= 1'b0;
    else if (enc_start && key_ready)  sel_dec <= 1'b0;
    else if (dec_start && key_ready)  sel_dec <= 1'b1;
  end

  assign data_out = sel_dec ? dec_out : enc_out;
  assign done     = enc_done | dec_done;

  a_one_unit: assert property (@(posedge clk) disable iff (reset) !(enc_busy && dec_busy));

endmodule
