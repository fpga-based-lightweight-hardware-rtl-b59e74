// mix_columns: the MixColumns step of a PHOTON round, all five columns at
// once.
//
// Each column is multiplied by the 5 x 5 MDS matrix A^5 over GF(2^4)
// (modulus x^4 + x + 1). Instead of GF multipliers, every product
// A5[i][k] * cell is read from a 16-entry look-up table for that
// coefficient, and the five products of a row are XORed. The tables are
// filled at elaboration time from gf16_mul, so they hold
// MUL_LUT[c][x] = c * x in GF(2^4); synthesis maps each one to plain LUT
// logic. Purely combinational.
module mix_columns
  import photon_pkg::*;
(
  input  state_t state_i,
  output state_t state_o
);

  typedef cell_t [15:0]  lut_row_t;   // products c * x for x = 0..15
  typedef lut_row_t [15:0] lut_t;      // one table per coefficient c

  function automatic lut_t build_luts();
    lut_t l;
    for (int c = 0; c < 16; c++)
      for (int x = 0; x < 16; x++)
        l[c][x] = gf16_mul(cell_t'(c), cell_t'(x));
    return l;
  endfunction

  localparam lut_t MUL_LUT = build_luts();

  always_comb begin
    for (int j = 0; j < D; j++)
      for (int i = 0; i < D; i++) begin
        state_o[i][j] = '0;
        for (int k = 0; k < D; k++)
          state_o[i][j] ^= MUL_LUT[A5[i][k]][state_i[k][j]];
      end
  end

endmodule
