// photon_pkg: constants, types and small helper functions shared by the
// PHOTON-80/20/16 hash core.
//
// PHOTON-80/20/16 keeps a 100-bit sponge state, seen as a 5 x 5 matrix of
// 4-bit cells. A 20-bit message block is XORed into the rate part, the state
// is permuted by 12 AES-like rounds, and the 80-bit digest is squeezed out
// 16 bits at a time. All sizes below are those of that variant.
//
// Cell order: cell (i, j) of the matrix is bits t[4*(5*i+j) +: 4] of the
// state string t, with t written most significant bit first. In a packed
// state_t, cell (0,0) is therefore the four most significant bits and cell
// (4,4) the four least significant ones. The rate (the first 20 bits of the
// string) is row 0, and the IV's trailing 24 bits land in the last cells.
// The packed ranges of the cell and row dimensions are ascending on
// purpose, so that index [i][j] is cell (i, j) in that string order; lint
// tools remark on ascending ranges, which is expected here.
//
// The sizes, the S-box, the internal constants and the matrix A^5 are those
// of the published variant; the bit order, the byte layout of the IV and the
// idle value of the round counter are this design's reading of it.
package photon_pkg;

  // Variant sizes (PHOTON-80/20/16).
  localparam int unsigned D      = 5;    // matrix dimension (cells per row/column)
  localparam int unsigned S      = 4;    // bits per cell
  localparam int unsigned T      = S*D*D; // state size: 100 bits
  localparam int unsigned RATE   = 20;   // input bitrate r
  localparam int unsigned RATE_O = 16;   // output bitrate r'
  localparam int unsigned HASH_N = 80;   // digest size n
  localparam int unsigned NR     = 12;   // rounds per permutation
  localparam int unsigned NPERM  = HASH_N / RATE_O; // permutations per hash: 5

  typedef logic [S-1:0]          cell_t;
  typedef cell_t [0:D-1]         row_t;    // row_t[0] is the leftmost cell
  typedef row_t  [0:D-1]         state_t;  // state_t[0] is the top row
  typedef cell_t [0:D-1]         rowconst_t; // one 4-bit constant per row

  // IV = 0^(t-24) || n/4 || r || r' with each of the last three fields
  // written as one byte: 0x14, 0x14, 0x10.
  localparam logic [T-1:0] IV = {{(T-24){1'b0}}, 8'(HASH_N/4), 8'(RATE), 8'(RATE_O)};

  // PRESENT S-box, indexed by the input cell.
  localparam cell_t SBOX [16] = '{4'hC, 4'h5, 4'h6, 4'hB, 4'h9, 4'h0, 4'hA, 4'hD,
                                   4'h3, 4'hE, 4'hF, 4'h8, 4'h4, 4'h7, 4'h1, 4'h2};

  // Internal constants IC_5 of the five rows.
  localparam cell_t IC [D] = '{4'h0, 4'h1, 4'h3, 4'h6, 4'h4};

  // A^5 for d = 5: the matrix the round-based MixColumns applies to every
  // column in one step (it equals the serial matrix with last row
  // (1,2,9,9,2) raised to the fifth power).
  localparam cell_t A5 [D][D] = '{
    '{4'h1, 4'h2, 4'h9, 4'h9, 4'h2},
    '{4'h2, 4'h5, 4'h3, 4'h8, 4'hD},
    '{4'hD, 4'hB, 4'hA, 4'hC, 4'h1},
    '{4'h1, 4'hF, 4'h2, 4'h3, 4'hE},
    '{4'hE, 4'hE, 4'h8, 4'h5, 4'hC}};

  // Round constant of the last (12th) round.
  localparam cell_t RC_LAST  = 4'hA;
  // Value of the row-0 constant while the core is idle.
  localparam cell_t RC_IDLE  = 4'h0;

  // One step of the 4-bit round-constant LFSR: shift left, new bit is
  // XNOR of the two top bits. From 0 it runs 1,3,7,E,D,B,6,C,9,2,5,A.
  function automatic cell_t lfsr_step(cell_t x);
    return {x[2:0], ~(x[3] ^ x[2])};
  endfunction

  // Multiplication in GF(2^4) modulo x^4 + x + 1 (shift and add). Used only
  // at elaboration time, to fill the constant-multiplier look-up tables.
  function automatic cell_t gf16_mul(cell_t a, cell_t b);
    cell_t p = '0;
    cell_t x = a;
    for (int k = 0; k < S; k++) begin
      if (b[k]) p ^= x;
      x = {x[2:0], 1'b0} ^ (x[3] ? 4'h3 : 4'h0);
    end
    return p;
  endfunction

endpackage
