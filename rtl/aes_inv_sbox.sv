// aes_inv_sbox: inverse AES byte substitution, used by the decipher.
//
// A constant 256 x 8 table filled at elaboration from the inverse affine
// transform followed by the GF(2^8) inverse (aes_pkg). It undoes aes_sbox:
// inv_sbox(sbox(x)) = x. Purely combinational.
// The design only names the inverse S-box; its table is the standard one.
module aes_inv_sbox
  import aes_pkg::*;
(
  input  byte_t a,
  output byte_t y
);

  byte_t rom [256];

  for (genvar i = 0; i < 256; i++) begin : g_rom
    localparam byte_t V = inv_sbox_calc(byte_t'(i));
    assign rom[i] = V;
  end

  assign y = rom[a];

endmodule
