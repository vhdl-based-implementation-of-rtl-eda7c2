// aes_shift_rows: Shift row transformation, pure wiring.
//
// Row r of the state is rotated cyclically by r bytes towards column 0:
// S'(r,c) = S(r,(c+r) mod 4). Row 0 stays, and with the row-major layout
// of aes_pkg ffeeddcc_bbaa9988_77665544_33221100 becomes
// ffeeddcc_aa9988bb_55447766_00332211. Combinational.
// The transformation is a fixed byte permutation, so the module is pure
// wiring and synthesizes to no cells.
module aes_shift_rows
  import aes_pkg::*;
(
  input  state_t state_i,
  output state_t state_o
);

  always_comb begin
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < NB; c++)
        state_o[127 - 8*(4*r + c) -: 8] = get_b(state_i, r, (c + r) % 4);
  end

endmodule
