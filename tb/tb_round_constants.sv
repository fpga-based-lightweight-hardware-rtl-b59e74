// tb_round_constants: self-checking test of round_constants.
// The per-row constants of rounds 1..12 are compared with the round
// constant table of PHOTON-80 (row i = RC ^ IC(i)), kept here as literals.
// Also checked: the idle value after reset, holding while step_i is low,
// the last-round flag, the wrap to round 1 when another permutation
// follows, the return to idle otherwise, and a reset in mid-permutation.
module tb_round_constants;
  import photon_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic      rst_n, step, more;
  rowconst_t rowc;
  logic      idle, last;

  round_constants dut (.clk(clk), .rst_n(rst_n), .step_i(step), .more_i(more),
                       .rowc_o(rowc), .idle_o(idle), .last_o(last));

  // One line per state row, rounds 1..12 from left to right.
  localparam logic [47:0] TABLE3 [5] = '{48'h137EDB6C925A, 48'h026FCA7D834B,
                                          48'h204DE85FA169, 48'h7518BD0AF43C,
                                          48'h573A9F28D61E};

  function automatic logic [19:0] expected(int r);  // r = 1..12
    logic [19:0] v;
    for (int i = 0; i < 5; i++) v[19 - 4*i -: 4] = TABLE3[i][47 - 4*(r-1) -: 4];
    return v;
  endfunction

  task automatic expect_state(string what, logic [19:0] v, logic e_idle, logic e_last);
    checks++;
    if (20'(rowc) !== v || idle !== e_idle || last !== e_last) begin
      failures++;
      $display("FAIL %s: rowc=%05h idle=%b last=%b, expected %05h %b %b",
               what, 20'(rowc), idle, last, v, e_idle, e_last);
    end
  endtask

  task automatic run_perm(logic more_at_end);
    for (int r = 1; r <= 12; r++) begin
      expect_state($sformatf("round %0d", r), expected(r), 1'b0, r == 12);
      step = 1'b1;
      more = more_at_end;
      @(posedge clk); #1;
    end
  endtask

  initial begin
    rst_n = 0; step = 0; more = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    expect_state("after reset", 20'h01364, 1'b1, 1'b0);
    repeat (3) @(posedge clk);
    #1 expect_state("hold while idle", 20'h01364, 1'b1, 1'b0);
    // load step: idle -> round 1
    step = 1; @(posedge clk); #1;
    run_perm(1'b1);          // ends by wrapping to round 1
    run_perm(1'b0);          // ends back at idle
    step = 0;
    expect_state("idle after last", 20'h01364, 1'b1, 1'b0);
    // stepping with gaps: constants must hold while step_i is low
    step = 1; @(posedge clk); #1;
    for (int r = 1; r <= 12; r++) begin
      int gap = $urandom_range(0, 3);
      step = 0;
      repeat (gap) begin
        @(posedge clk); #1;
        expect_state($sformatf("hold in round %0d", r), expected(r), 1'b0, r == 12);
      end
      step = 1; more = 0;
      @(posedge clk); #1;
    end
    expect_state("idle after gapped run", 20'h01364, 1'b1, 1'b0);
    // reset in the middle of a permutation
    repeat (6) @(posedge clk);
    #1 rst_n = 0;
    @(posedge clk); #1 rst_n = 1; step = 0;
    expect_state("reset mid-run", 20'h01364, 1'b1, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
