// photon_round: one complete round of the PHOTON-80 permutation.
//
// AddConstants, SubCells, ShiftRows and MixColumns are chained
// combinationally, so the core can apply one round per clock cycle and a
// whole 12-round permutation in 12 cycles. The row constants of the
// current round come from the round-constant register.
module photon_round
  import photon_pkg::*;
(
  input  state_t    state_i,
  input  rowconst_t rowc_i,   // RC(round) ^ IC(i) for each row i
  output state_t    state_o
);

  state_t ac, sc, sr;

  add_constants u_ac (.state_i(state_i), .rowc_i(rowc_i), .state_o(ac));
  sub_cells     u_sc (.state_i(ac), .state_o(sc));
  shift_rows    u_sr (.state_i(sc), .state_o(sr));
  mix_columns   u_mc (.state_i(sr), .state_o(state_o));

endmodule
