// photon80: round-based PHOTON-80/20/16 hash core.
//
// The core hashes one 20-bit message block to an 80-bit digest using the
// PHOTON sponge: the block is XORed into the leftmost 20 bits of the IV,
// the 100-bit state is permuted (absorbing), and then four more times
// (squeezing); after each of the five permutations the leftmost 16 bits of
// the state are one digest segment. A full permutation round (photon_round)
// is applied every clock cycle, so one permutation takes 12 cycles and a
// hash 60 round cycles.
//
// Registers: STR, the 100-bit state; the 20-bit round-constant register
// (round_constants), whose row 0 is also the round counter and decides
// when STR is loaded from the IV and when a digest segment is taken; the
// 80-bit digest register; a 3-bit count of permutations; and the done flag.
// No message padding is applied: msg_i is taken as the single, already
// padded rate block.
//
// Interface and timing:
//   - ready_o is high while idle. A cycle with ready_o and start_i loads
//     STR <= IV ^ {msg_i, 80'b0} (the load cycle). start_i is ignored while
//     busy.
//   - The next 60 cycles are rounds 1..12 of permutations 1..5. At the
//     twelfth round of each permutation the leftmost 16 bits of the new
//     state are shifted into the digest register from the top, so that the
//     first segment ends in hash_o[15:0] and the fifth in hash_o[79:64].
//   - done_o pulses for one cycle, 60 clock edges after the edge that
//     accepted start_i (one round per edge after the load), together
//     with ready_o; hash_o then holds the digest until the first segment
//     of the next hash is shifted in, 12 cycles after that hash's load.
//     A new start_i is accepted in the done cycle itself.
//   - rst_n is an active-low synchronous reset; it aborts a hash in progress.
module photon80
  import photon_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start_i,
  input  logic [RATE-1:0]   msg_i,
  output logic              ready_o,
  output logic              done_o,
  output logic [HASH_N-1:0] hash_o
);

  localparam int unsigned PCW = $clog2(NPERM);

  state_t            str_q, round_out;
  rowconst_t         rowc;
  logic              idle, last_round, step, more;
  logic [PCW-1:0]    perm_q;
  logic [HASH_N-1:0] z_q;
  logic              done_q;

  assign step = idle ? start_i : 1'b1;
  assign more = (perm_q != PCW'(NPERM - 1));

  round_constants u_rc (
    .clk    (clk),
    .rst_n  (rst_n),
    .step_i (step),
    .more_i (more),
    .rowc_o (rowc),
    .idle_o (idle),
    .last_o (last_round)
  );

  photon_round u_round (
    .state_i (str_q),
    .rowc_i  (rowc),
    .state_o (round_out)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      str_q  <= '0;
      z_q    <= '0;
      perm_q <= '0;
      done_q <= 1'b0;
    end else begin
      done_q <= 1'b0;
      if (idle) begin
        if (start_i) begin
          str_q  <= state_t'(IV ^ {msg_i, {(T-RATE){1'b0}}});
          perm_q <= '0;
        end
      end else begin
        str_q <= round_out;
        if (last_round) begin
          z_q <= {round_out[0][0:RATE_O/S-1], z_q[HASH_N-1:RATE_O]};
          if (more)
            perm_q <= perm_q + 1'b1;
          else
            done_q <= 1'b1;
        end
      end
    end
  end

  assign ready_o = idle;
  assign done_o  = done_q;
  assign hash_o  = z_q;

  // The digest is complete only when the controller is back to idle.
  a_done_idle: assert property (@(posedge clk) disable iff (!rst_n) done_q |-> idle);

endmodule
