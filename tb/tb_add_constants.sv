// tb_add_constants: self-checking test of add_constants.
// Random states and random row constants: column 0 must be XORed with the
// row constants and columns 1..4 left alone. The twelve real round
// constant sets are applied too.
module tb_add_constants;
  import photon_pkg::*;
  import photon_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  state_t    din, dout;
  rowconst_t rowc;
  add_constants dut (.state_i(din), .rowc_i(rowc), .state_o(dout));

  task automatic check(st_t x, logic [19:0] rc);
    din  = state_t'(x);
    rowc = rowconst_t'(rc);
    #1;
    checks++;
    if (st_t'(dout) !== ref_ac_rowc(x, rc)) begin
      failures++;
      $display("FAIL in=%025h rc=%05h out=%025h exp=%025h", x, rc, st_t'(dout), ref_ac_rowc(x, rc));
    end
  endtask

  initial begin
    st_t x;
    logic [19:0] rc;
    for (int r = 0; r < 12; r++) begin
      x = rand_state();
      for (int i = 0; i < 5; i++) rc[19 - 4*i -: 4] = R_RC[r] ^ R_IC[i];
      din  = state_t'(x);
      rowc = rowconst_t'(rc);
      #1;
      checks++;
      if (st_t'(dout) !== ref_ac(x, r)) begin
        failures++;
        $display("FAIL round %0d", r);
      end
    end
    repeat (500) check(rand_state(), 20'($urandom));
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
