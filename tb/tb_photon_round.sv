// tb_photon_round: self-checking test of photon_round.
// Random states through each of the twelve rounds are compared with the
// reference round; one fixed vector (first round applied to the IV with
// message 593EF absorbed) is checked against a literal expected value.
module tb_photon_round;
  import photon_pkg::*;
  import photon_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  state_t    din, dout;
  rowconst_t rowc;
  photon_round dut (.state_i(din), .rowc_i(rowc), .state_o(dout));

  function automatic logic [19:0] rowc_of(int r);
    logic [19:0] rc;
    for (int i = 0; i < 5; i++) rc[19 - 4*i -: 4] = R_RC[r] ^ R_IC[i];
    return rc;
  endfunction

  task automatic check(st_t x, int r);
    din  = state_t'(x);
    rowc = rowconst_t'(rowc_of(r));
    #1;
    checks++;
    if (st_t'(dout) !== ref_round(x, r)) begin
      failures++;
      $display("FAIL round %0d in=%025h out=%025h exp=%025h", r, x, st_t'(dout), ref_round(x, r));
    end
  endtask

  initial begin
    din  = state_t'(R_IV ^ {20'h593EF, 80'b0});
    rowc = rowconst_t'(rowc_of(0));
    #1;
    checks++;
    if (st_t'(dout) !== 100'h923e36354c0acff91f55fe301) begin
      failures++;
      $display("FAIL fixed vector out=%025h", st_t'(dout));
    end
    for (int n = 0; n < 100; n++)
      for (int r = 0; r < 12; r++) check(rand_state(), r);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
