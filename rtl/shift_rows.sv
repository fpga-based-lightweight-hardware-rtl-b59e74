// shift_rows: the ShiftRows step of a PHOTON round.
//
// Row i is rotated left by i cells: out[i][j] = in[i][(i+j) mod 5]. Row 0
// is unchanged. Pure wiring, no logic; combinational.
module shift_rows
  import photon_pkg::*;
(
  input  state_t state_i,
  output state_t state_o
);

  always_comb begin
    for (int i = 0; i < D; i++)
      for (int j = 0; j < D; j++)
        state_o[i][j] = state_i[i][(i + j) % D];
  end

endmodule
