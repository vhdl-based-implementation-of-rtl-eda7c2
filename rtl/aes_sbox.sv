// aes_sbox: the AES byte substitution table (S-box), one byte in, one out.
//
// The 256-entry lookup table of the design is filled at elaboration from
// the S-box definition in aes_pkg (inverse in GF(2^8), then the affine
// transform), so it reproduces the standard table rather than a typed
// copy of it; synthesis sees a constant 256 x 8 ROM indexed by the input.
// Purely combinational: y follows a in the same cycle.
// The design specifies the substitution by its lookup table; generating
// that table from the definition is this implementation's choice.
module aes_sbox
  import aes_pkg::*;
(
  input  byte_t a,
  output byte_t y
);

  byte_t rom [256];

  for (genvar i = 0; i < 256; i++) begin : g_rom
    localparam byte_t V = sbox_calc(byte_t'(i));
    assign rom[i] = V;
  end

  assign y = rom[a];

endmodule
