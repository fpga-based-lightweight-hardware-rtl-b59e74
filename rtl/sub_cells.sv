// sub_cells: the SubCells step of a PHOTON round for 4-bit cells.
//
// Every one of the 25 cells is replaced through the PRESENT S-box, a
// 16-entry look-up table (photon_pkg::SBOX). The 8-bit AES S-box of the
// largest PHOTON variant is not needed by the 4-bit variant built here.
// Purely combinational.
module sub_cells
  import photon_pkg::*;
(
  input  state_t state_i,
  output state_t state_o
);

  always_comb begin
    for (int i = 0; i < D; i++)
      for (int j = 0; j < D; j++)
        state_o[i][j] = SBOX[state_i[i][j]];
  end

endmodule
