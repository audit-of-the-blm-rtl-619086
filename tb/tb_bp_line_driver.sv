// tb_bp_line_driver: checks that each enabled line carries a 2 MHz clock
// (20 clocks period at 40 MHz, counted from rising edges) and a disabled line
// stays low.
module tb_bp_line_driver;
  logic clk = 0, rst_n = 0;
  logic [3:0] permit = 0, trig;
  int checks = 0, failures = 0;
  int rises [4];
  logic [3:0] prev;

  always #12.5 clk = ~clk;

  bp_line_driver #(.HALF_PERIOD(10)) dut (.clk, .rst_n, .permit, .trig_clk(trig));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    for (int i = 0; i < 4; i++) if (trig[i] && !prev[i]) rises[i]++;
    prev <= trig;
  end

  initial begin
    prev = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 6; k++) begin
      logic [3:0] p;
      p = (k == 0) ? 4'b1111 : (k == 1) ? 4'b0000 : 4'($urandom);
      permit = p;
      repeat (40) @(posedge clk);
      for (int i = 0; i < 4; i++) rises[i] = 0;
      repeat (2000) @(posedge clk);          // 100 periods of 2 MHz
      for (int i = 0; i < 4; i++)
        if (p[i]) check(rises[i] inside {[99:101]}, $sformatf("line %0d: %0d rises in 50 us", i, rises[i]));
        else      check(rises[i] == 0 && trig[i] == 0, $sformatf("line %0d stays low", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
