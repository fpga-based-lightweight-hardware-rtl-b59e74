// tb_photon80: end-to-end, self-checking test of the PHOTON-80/20/16 core
// at its only (full) size.
//
// Hashes the message 593EF, whose digest is also checked against a literal
// value, and a series of random messages, comparing every digest with the
// bit-level reference model. It checks that done_o comes exactly 60 clock
// edges after the edge that accepts start_i (12 rounds for absorbing plus
// 4 x 12 for squeezing), and that ready_o is low in between. It makes each
// control mechanism of the core happen and counts it: the IV/message load,
// the wrap from round 12 straight into round 1 of the next permutation,
// the capture of a 16-bit digest segment, the return to idle, a start_i
// ignored while busy, a new hash started in the cycle done_o is high, and
// a reset that aborts a hash. A mechanism that never happened is a failure.
module tb_photon80;
  import photon_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n, start;
  logic [19:0] msg;
  logic        ready, done;
  logic [79:0] hash;

  photon80 dut (.clk(clk), .rst_n(rst_n), .start_i(start), .msg_i(msg),
                .ready_o(ready), .done_o(done), .hash_o(hash));

  // mechanism counters
  int n_load = 0, n_wrap = 0, n_segment = 0, n_idle = 0;
  int n_ignored = 0, n_back_to_back = 0, n_abort = 0;

  always @(posedge clk) if (rst_n) begin
    if (ready && start) n_load++;
    if (!ready && dut.last_round && dut.more) n_wrap++;
    if (!ready && dut.last_round) n_segment++;
    if (!ready && dut.last_round && !dut.more) n_idle++;
    if (!ready && start) n_ignored++;
    if (done && start) n_back_to_back++;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Starts a hash of m (start_i high for one cycle, or longer when
  // hold_start is set) and waits for done_o. Checks latency and digest.
  task automatic hash_one(logic [19:0] m, bit hold_start);
    int cyc = 0;
    logic [79:0] exp_h = ref_hash(m);
    check("ready before start", ready === 1'b1);
    start = 1; msg = m;
    @(posedge clk); #1;
    if (!hold_start) begin
      start = 0;
      msg = 20'($urandom);   // the message must only be sampled at the load edge
    end
    while (!done && cyc < 200) begin
      check("ready low while busy", ready === 1'b0);
      @(posedge clk); #1;
      cyc++;
    end
    start = 0;
    check($sformatf("latency %0d, expected 60", cyc), cyc == 60);
    check($sformatf("digest of %05h: %020h, expected %020h", m, hash, exp_h), hash === exp_h);
    check("ready with done", ready === 1'b1);
  endtask

  initial begin
    rst_n = 0; start = 0; msg = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;

    // The message of the worked example.
    hash_one(20'h593EF, 1'b0);
    check("digest of 593EF literal", hash === 80'he750b145fdbcf96f27e9);
    // digest held while idle
    repeat (5) @(posedge clk);
    #1 check("digest held while idle", hash === 80'he750b145fdbcf96f27e9);

    // start_i kept high through the whole hash: ignored while busy, and a
    // second hash starts in the done cycle.
    hash_one(20'h00000, 1'b1);
    start = 1; msg = 20'hFFFFF;  // still high in the done cycle
    @(posedge clk); #1 start = 0;
    begin
      int cyc = 0;
      while (!done && cyc < 200) begin @(posedge clk); #1 cyc++; end
      check($sformatf("back-to-back latency %0d", cyc), cyc == 60);
      check("back-to-back digest", hash === ref_hash(20'hFFFFF));
    end

    // Random messages with random idle gaps.
    repeat (20) begin
      repeat ($urandom_range(0, 3)) @(posedge clk);
      #1 hash_one(20'($urandom), 1'b0);
    end

    // Reset in the middle of a hash, then a clean hash.
    start = 1; msg = 20'h12345;
    @(posedge clk); #1 start = 0;
    repeat (30) @(posedge clk);
    #1 rst_n = 0; n_abort++;
    @(posedge clk); #1 rst_n = 1;
    check("idle after reset", ready === 1'b1 && done === 1'b0);
    hash_one(20'hABCDE, 1'b0);

    $display("mechanisms: load=%0d wrap=%0d segment=%0d idle=%0d ignored_start=%0d back_to_back=%0d abort=%0d",
             n_load, n_wrap, n_segment, n_idle, n_ignored, n_back_to_back, n_abort);
    check("load happened", n_load > 0);
    check("wrap to round 1 happened", n_wrap > 0);
    check("segment capture happened", n_segment > 0);
    check("return to idle happened", n_idle > 0);
    check("start ignored while busy happened", n_ignored > 0);
    check("back-to-back start happened", n_back_to_back > 0);
    check("abort by reset happened", n_abort > 0);
    check("four wraps per completed hash", n_wrap == 4 * n_idle + 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
