// photon_ref_pkg: bit-level reference model of PHOTON-80/20/16 for the
// testbenches.
//
// It works on plain 100-bit vectors with its own copies of the constants
// and computes MixColumns the serial way, applying the companion matrix
// with last row (1,2,9,9,2) five times and multiplying in GF(2^4) with a
// shift-and-reduce loop, so it shares no table or arithmetic with the RTL,
// which uses the precomputed matrix A^5 and look-up tables. Cell (i,j) is
// the nibble at bits [99-4*(5i+j) -: 4], the order of the hashed string.
package photon_ref_pkg;

  typedef logic [99:0] st_t;

  localparam logic [3:0] R_SBOX [16] = '{12, 5, 6, 11, 9, 0, 10, 13, 3, 14, 15, 8, 4, 7, 1, 2};
  localparam logic [3:0] R_RC   [12] = '{1, 3, 7, 14, 13, 11, 6, 12, 9, 2, 5, 10};
  localparam logic [3:0] R_IC   [5]  = '{0, 1, 3, 6, 4};
  localparam logic [3:0] R_ALAST[5]  = '{1, 2, 9, 9, 2};
  localparam st_t        R_IV        = 100'h14_14_10;

  function automatic logic [3:0] get(st_t x, int i, int j);
    return x[99 - 4*(5*i + j) -: 4];
  endfunction

  function automatic st_t put(st_t x, int i, int j, logic [3:0] v);
    st_t y = x;
    y[99 - 4*(5*i + j) -: 4] = v;
    return y;
  endfunction

  // a * b mod x^4 + x + 1
  function automatic logic [3:0] gmul(logic [3:0] a, logic [3:0] b);
    logic [7:0] p = '0;
    for (int k = 0; k < 4; k++) if (b[k]) p ^= (8'(a) << k);
    for (int k = 7; k >= 4; k--) if (p[k]) p ^= (8'h13 << (k - 4));
    return p[3:0];
  endfunction

  function automatic st_t ref_ac(st_t x, int round);  // round = 0..11
    st_t y = x;
    for (int i = 0; i < 5; i++) y = put(y, i, 0, get(x, i, 0) ^ R_RC[round] ^ R_IC[i]);
    return y;
  endfunction

  function automatic st_t ref_ac_rowc(st_t x, logic [19:0] rowc);  // rowc: row 0 in the top nibble
    st_t y = x;
    for (int i = 0; i < 5; i++) y = put(y, i, 0, get(x, i, 0) ^ rowc[19 - 4*i -: 4]);
    return y;
  endfunction

  function automatic st_t ref_sc(st_t x);
    st_t y;
    for (int n = 0; n < 25; n++) y[4*n +: 4] = R_SBOX[x[4*n +: 4]];
    return y;
  endfunction

  function automatic st_t ref_sr(st_t x);
    st_t y;
    for (int i = 0; i < 5; i++)
      for (int j = 0; j < 5; j++) y = put(y, i, j, get(x, i, (i + j) % 5));
    return y;
  endfunction

  function automatic st_t ref_mc(st_t x);
    st_t y;
    logic [3:0] c [5];
    logic [3:0] n;
    for (int j = 0; j < 5; j++) begin
      for (int i = 0; i < 5; i++) c[i] = get(x, i, j);
      repeat (5) begin
        n = '0;
        for (int k = 0; k < 5; k++) n ^= gmul(R_ALAST[k], c[k]);
        for (int k = 0; k < 4; k++) c[k] = c[k+1];
        c[4] = n;
      end
      for (int i = 0; i < 5; i++) y = put(y, i, j, c[i]);
    end
    return y;
  endfunction

  function automatic st_t ref_round(st_t x, int round);
    return ref_mc(ref_sr(ref_sc(ref_ac(x, round))));
  endfunction

  function automatic st_t ref_perm(st_t x);
    st_t y = x;
    for (int r = 0; r < 12; r++) y = ref_round(y, r);
    return y;
  endfunction

  // Digest with the first squeezed 16-bit segment in bits [15:0].
  function automatic logic [79:0] ref_hash(logic [19:0] m);
    st_t s = ref_perm(R_IV ^ {m, 80'b0});
    logic [79:0] z;
    for (int k = 0; k < 5; k++) begin
      z[16*k +: 16] = s[99:84];
      if (k < 4) s = ref_perm(s);
    end
    return z;
  endfunction

  function automatic st_t rand_state();
    return {4'($urandom), $urandom, $urandom, $urandom};
  endfunction

endpackage
