// tb_energy_composer: random inputs; the expected 16-bit word is assembled in
// the testbench from the bit map ([15:11] level = energy/2048, [10] error,
// [9] soft reset, [8] under test, [7] U info, [6] M info, [5] U test,
// [4] M test, [3:0] card), with substitution only in test mode and the
// broken-link word when both links are broken and the toggle timed out.
module tb_energy_composer;
  import blecs_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] energy, subst;
  logic err, both, tmode, sen, sr, ut, ui, mi, utst, mtst;
  logic [3:0] card;
  composite_t word;
  int checks = 0, failures = 0;

  always #12.5 clk = ~clk;

  energy_composer dut (.clk, .rst_n, .energy, .err, .both_broken(both), .test_mode(tmode),
    .subst_en(sen), .subst_energy(subst), .soft_reset(sr), .under_test(ut), .u_info(ui),
    .m_info(mi), .u_test(utst), .m_test(mtst), .card, .word);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 400; k++) begin
      logic [15:0] exp, e;
      @(negedge clk);
      energy = 16'($urandom); subst = 16'($urandom);
      {err, both, tmode, sen, sr, ut, ui, mi, utst, mtst} = 10'($urandom);
      if (k < 200) both = 0;
      card = 4'($urandom);
      e = (tmode && sen) ? subst : energy;
      exp = {5'(e / 2048), err, sr, ut, ui, mi, utst, mtst, card};
      if (err && both) exp = 16'b11111_1_0_0_1_1_0_0_0000;
      @(negedge clk);
      check(16'(word) == exp, $sformatf("word %h expected %h", 16'(word), exp));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
