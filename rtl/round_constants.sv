// round_constants: the 20-bit round-constant register of the PHOTON-80 core,
// which doubles as its round counter and controller.
//
// The register holds one 4-bit constant per row, already combined with the
// row's internal constant: row i holds RC(v) ^ IC(i), exactly what
// AddConstants XORs into column 0 in round v. Row 0 (IC(0) = 0) holds the
// bare round constant and is used as the round counter:
//   0      idle, the core waits for a message;
//   1..A   rounds 1..12 of a permutation, in the order 1,3,7,E,D,B,6,C,9,2,5,A;
//   A      also flags the last round of a permutation (last_o).
// Each step advances every row through the 4-bit LFSR
// x -> {x[2:0], x[3] XNOR x[2]} applied to RC, i.e.
// row_i <= lfsr_step(row_i ^ IC(i)) ^ IC(i); since IC is constant this is
// wiring and inverters only. After the last round the register either goes
// back to idle (row 0 = 0) or, when another permutation follows at once
// (more_i), directly to the constants of round 1, so that consecutive
// permutations of the squeezing phase need no idle cycle in between.
//
// Timing: rowc_o, idle_o and last_o come straight from the register.
// step_i advances it at the next rising clock edge. rst_n is an active-low
// synchronous reset to idle.
module round_constants
  import photon_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      step_i,   // advance to the next round
  input  logic      more_i,   // sampled in the last round: go on with round 1
  output rowconst_t rowc_o,   // RC ^ IC(i) of the current round, per row
  output logic      idle_o,   // row 0 == 0
  output logic      last_o    // row 0 == A: twelfth round
);

  rowconst_t rows_q, rows_step;

  function automatic rowconst_t idle_value();
    rowconst_t v;
    for (int i = 0; i < D; i++) v[i] = IC[i] ^ RC_IDLE;
    return v;
  endfunction

  function automatic rowconst_t advance(rowconst_t r);
    rowconst_t v;
    for (int i = 0; i < D; i++) v[i] = lfsr_step(r[i] ^ IC[i]) ^ IC[i];
    return v;
  endfunction

  localparam rowconst_t ROWS_IDLE  = idle_value();
  localparam rowconst_t ROWS_FIRST = advance(ROWS_IDLE);

  always_comb rows_step = advance(rows_q);

  always_ff @(posedge clk) begin
    if (!rst_n)
      rows_q <= ROWS_IDLE;
    else if (step_i) begin
      if (rows_q[0] == RC_LAST)
        rows_q <= more_i ? ROWS_FIRST : ROWS_IDLE;
      else
        rows_q <= rows_step;
    end
  end

  assign rowc_o = rows_q;
  assign idle_o = (rows_q[0] == RC_IDLE);
  assign last_o = (rows_q[0] == RC_LAST);

  // Every row must stay the row-0 constant offset by its own IC.
  for (genvar i = 1; i < D; i++) begin : g_chk
    a_rows_consistent: assert property (@(posedge clk) disable iff (!rst_n)
      (rows_q[i] ^ IC[i]) == rows_q[0]);
  end

endmodule
