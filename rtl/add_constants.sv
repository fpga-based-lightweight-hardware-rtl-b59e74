// add_constants: the AddConstants step of a PHOTON round.
//
// Each cell of column 0 is XORed with the 4-bit constant of its row; the
// other four columns pass unchanged. The row constants arrive already
// combined (round constant XOR internal constant IC_5(i)), which is how the
// round-constant register of this core stores them, so this block is one
// column of 4-bit XORs. Purely combinational: out follows in within the
// same cycle.
module add_constants
  import photon_pkg::*;
(
  input  state_t    state_i,   // state before the step
  input  rowconst_t rowc_i,    // rowc_i[i] = RC(round) ^ IC(i)
  output state_t    state_o    // state after the step
);

  always_comb begin
    state_o = state_i;
    for (int i = 0; i < D; i++)
      state_o[i][0] = state_i[i][0] ^ rowc_i[i];
  end

endmodule
