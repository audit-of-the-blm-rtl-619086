// tb_bptc_sequencer: a model of the crate answers each activation: the
// addressed card drops its line and, some clocks later, the last crate pulls
// OD3 low until the activation ends. Card 5 on the M line is made deaf. The
// testbench checks the order of activations (card numbers, U then M), the
// under-test flag and the result vector (all set except M of card 5).
module tb_bptc_sequencer;
  localparam int NC = 16, TO = 200;
  logic clk = 0, rst_n = 0, start = 0, od3_low = 0;
  logic under_test, ut, mt, done, pass;
  logic [3:0] card;
  logic [2*NC-1:0] result;
  int checks = 0, failures = 0;
  int seen = 0;
  bit order_ok = 1;

  always #12.5 clk = ~clk;

  bptc_sequencer #(.NCARDS(NC), .WAIT_TIMEOUT(TO)) dut (.clk, .rst_n, .start, .od3_low,
    .under_test, .u_test(ut), .m_test(mt), .card, .done, .pass, .result);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // crate model: dump travels to the last crate in 20 clocks, line recovers in 10
  initial forever begin
    @(negedge clk);
    if (ut || mt) begin
      int exp_card; bit exp_m;
      exp_card = seen % NC; exp_m = (seen >= NC);
      if (int'(card) != exp_card || mt != exp_m || (ut && mt)) order_ok = 0;
      seen++;
      if (!(mt && card == 4'd5)) begin
        repeat (20) @(negedge clk);
        od3_low = 1;
      end
      while (ut || mt) @(negedge clk);
      repeat (10) @(negedge clk);
      od3_low = 0;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    check(under_test, "under test while running");
    wait (done);
    @(negedge clk);
    check(seen == 2 * NC, $sformatf("%0d activations", seen));
    check(order_ok, "cards 0..15 on U, then on M");
    check(result == ~(32'(1) << (NC + 5)), $sformatf("result %h", result));
    check(!pass, "overall fail with one deaf card");
    check(!under_test, "under test released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
