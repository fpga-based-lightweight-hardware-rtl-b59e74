// tb_sub_cells: self-checking test of sub_cells.
// Every S-box entry is checked in every cell position (all 25 cells set to
// the same value), then random states are compared with the reference
// model. The expected S-box is the PRESENT table, kept in photon_ref_pkg.
module tb_sub_cells;
  import photon_pkg::*;
  import photon_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  state_t din, dout;
  sub_cells dut (.state_i(din), .state_o(dout));

  task automatic check(st_t x);
    din = state_t'(x);
    #1;
    checks++;
    if (st_t'(dout) !== ref_sc(x)) begin
      failures++;
      $display("FAIL in=%025h out=%025h exp=%025h", x, st_t'(dout), ref_sc(x));
    end
  endtask

  initial begin
    st_t x;
    for (int v = 0; v < 16; v++) begin
      for (int n = 0; n < 25; n++) x[4*n +: 4] = 4'(v);
      check(x);
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
