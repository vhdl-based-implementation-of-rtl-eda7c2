// aes_inv_shift_rows: inverse Shift row, pure wiring.
//
// Row r is rotated cyclically by r bytes away from column 0:
// S'(r,c) = S(r,(c-r) mod 4). Undoes aes_shift_rows. Combinational.
module aes_inv_shift_rows
  import aes_pkg::*;
(
  input  state_t state_i,
  output state_t state_o
);

  always_comb begin
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < NB; c++)
        state_o[127 - 8*(4*r + c) -: 8] = get_b(state_i, r, (c + 4 - r) % 4);
  end

endmodule
