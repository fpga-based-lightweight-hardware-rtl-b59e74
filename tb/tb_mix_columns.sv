// tb_mix_columns: self-checking test of mix_columns.
// A column holding a single 1 in row k must come out as column k of the
// printed matrix A^5 (kept here as literal values); random states are
// compared with the serial reference (companion matrix applied five times).
module tb_mix_columns;
  import photon_pkg::*;
  import photon_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  state_t din, dout;
  mix_columns dut (.state_i(din), .state_o(dout));

  // Rows of A^5 for d = 5.
  localparam logic [19:0] A5_ROWS [5] = '{20'h12992, 20'h2538D, 20'hDBAC1, 20'h1F23E, 20'hEE85C};

  task automatic check(st_t x);
    din = state_t'(x);
    #1;
    checks++;
    if (st_t'(dout) !== ref_mc(x)) begin
      failures++;
      $display("FAIL in=%025h out=%025h exp=%025h", x, st_t'(dout), ref_mc(x));
    end
  endtask

  initial begin
    st_t x;
    // unit vector in row k of every column
    for (int k = 0; k < 5; k++) begin
      x = '0;
      for (int j = 0; j < 5; j++) x = put(x, k, j, 4'h1);
      din = state_t'(x);
      #1;
      for (int i = 0; i < 5; i++)
        for (int j = 0; j < 5; j++) begin
          checks++;
          if (get(st_t'(dout), i, j) !== A5_ROWS[i][19 - 4*k -: 4]) begin
            failures++;
            $display("FAIL unit k=%0d cell(%0d,%0d)=%h exp %h", k, i, j,
                     get(st_t'(dout), i, j), A5_ROWS[i][19 - 4*k -: 4]);
          end
        end
      check(x);
    end
    repeat (1000) check(rand_state());
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
