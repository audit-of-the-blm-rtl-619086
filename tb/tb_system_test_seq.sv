// tb_system_test_seq: the sequence BPTC -> HVLF with models of both tests. The
// BPTC model answers a fixed time after its start pulse, the HVLF model
// reports one evaluation every 200 clocks while the modulation is on. Checks
// the order, that the first evaluated period is skipped, the pass/fail
// combinations (BPTC fail, too few HVLF channels, both good) and the single
// done pulse.
module tb_system_test_seq;
  localparam int NCH = 16;
  logic clk = 0, rst_n = 0;
  logic start = 0, bdone = 0, bpass = 0, hdone = 0;
  logic [4:0] npass = 0, expected = 5'd4;
  logic bstart, mod, busy, done, pass, bok, hok;
  int checks = 0, failures = 0;
  int n_bstart = 0, n_done = 0, evals = 0;
  logic bptc_result = 1;
  int npass_seq [2];

  always #12.5 clk = ~clk;

  system_test_seq #(.NCH(NCH)) dut (.clk, .rst_n, .start, .bptc_done(bdone), .bptc_pass(bpass),
    .hvlf_done(hdone), .hvlf_npass(npass), .hvlf_expected(expected), .bptc_start(bstart),
    .modulation(mod), .busy, .done, .pass, .bptc_ok(bok), .hvlf_ok(hok));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // BPTC model: done 300 clocks after its start pulse
  always @(posedge clk) if (bstart) begin
    n_bstart++;
    check(!mod, "no modulation during BPTC");
    fork begin
      repeat (300) @(negedge clk);
      bpass = bptc_result; bdone = 1; @(negedge clk); bdone = 0;
    end join_none
  end

  // HVLF model: one evaluation every 200 clocks of modulation
  initial forever begin
    @(negedge clk);
    if (mod) begin
      repeat (200) @(negedge clk);
      if (mod) begin
        npass = 5'(npass_seq[evals % 2]); evals++;
        hdone = 1; @(negedge clk); hdone = 0;
      end
    end
  end

  always @(posedge clk) if (done) n_done++;

  task automatic run(input bit bres, input int first, input int second,
                     input bit exp_pass, input string what);
    bptc_result = bres; npass_seq[0] = first; npass_seq[1] = second;
    evals = 0; n_done = 0; n_bstart = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    check(busy, {what, ": busy"});
    wait (done);
    @(negedge clk); @(negedge clk);
    check(n_bstart == 1 && n_done == 1, {what, ": one BPTC, one result"});
    check(evals == 2, $sformatf("%s: settling period skipped (%0d evaluations)", what, evals));
    check(pass == exp_pass && bok == bres, {what, ": result"});
    check(!busy && !mod, {what, ": back to idle"});
    repeat (400) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!busy && !mod && !done, "idle after reset");
    run(1, 0, 4, 1, "all good (settling period had no channel)");
    run(0, 4, 4, 0, "BPTC failed");
    run(1, 4, 3, 0, "a chamber missing");
    check(!hok, "HVLF flag low");
    run(1, 9, 5, 1, "more than expected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
