// tb_shift_rows: self-checking test of shift_rows.
// A state whose cells all differ within each row, and random states, are
// compared with the reference rotation out[i][j] = in[i][(i+j) mod 5].
module tb_shift_rows;
  import photon_pkg::*;
  import photon_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  state_t din, dout;
  shift_rows dut (.state_i(din), .state_o(dout));

  task automatic check(st_t x);
    din = state_t'(x);
    #1;
    checks++;
    if (st_t'(dout) !== ref_sr(x)) begin
      failures++;
      $display("FAIL in=%025h out=%025h exp=%025h", x, st_t'(dout), ref_sr(x));
    end
  endtask

  initial begin
    check(100'h01234_56789_abcde_f0123_45678);
    // row 0 unchanged, row 1 rotated by one cell: explicit expected value
    din = state_t'(100'h01234_56789_abcde_f0123_45678);
    #1;
    checks++;
    if (st_t'(dout) !== 100'h01234_67895_cdeab_23f01_84567) begin
      failures++;
      $display("FAIL fixed vector out=%025h", st_t'(dout));
    end
    repeat (500) check(rand_state());
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
