// tb_lv_monitor: each supply dips below threshold a known number of times for
// a known time (the ripple of a rectified supply); events and time below (in
// microseconds) are checked, then ADC samples with a ripple on two supplies
// check delta = max - min and the ripple flag against the threshold.
module tb_lv_monitor;
  localparam int WIN = 16, CPU = 40;
  logic clk = 0, rst_n = 0;
  logic [7:0] under = 0, ripple;
  logic clear = 0, av = 0;
  logic [2:0] ach;
  logic signed [15:0] ad;
  logic [16:0] thr = 17'd200;
  logic [7:0][31:0] ev, tb_;
  logic [7:0][16:0] delta;
  int checks = 0, failures = 0;

  always #12.5 clk = ~clk;

  lv_monitor #(.NCH(8), .WINDOW(WIN), .CLKS_PER_US(CPU)) dut (.clk, .rst_n, .under, .clear,
    .adc_valid(av), .adc_ch(ach), .adc_data(ad), .thr, .events(ev), .time_below(tb_),
    .delta, .ripple);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int nd [8];
    int us [8];
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    for (int c = 0; c < 8; c++) begin
      nd[c] = $urandom_range(0, 4);
      us[c] = $urandom_range(5, 20);
    end
    for (int c = 0; c < 8; c++)
      for (int k = 0; k < nd[c]; k++) begin
        @(negedge clk); under[c] = 1;
        repeat (us[c] * CPU) @(negedge clk);
        under[c] = 0;
        repeat (100) @(negedge clk);
      end
    repeat (5) @(negedge clk);
    for (int c = 0; c < 8; c++) begin
      check(int'(ev[c]) == nd[c], $sformatf("supply %0d events %0d expected %0d", c, ev[c], nd[c]));
      check(int'(tb_[c]) inside {[nd[c] * us[c] - nd[c] : nd[c] * us[c] + nd[c]]},
            $sformatf("supply %0d time below %0d us expected %0d", c, tb_[c], nd[c] * us[c]));
    end
    // ADC: supplies 2 and 5 ripple (amplitude 300), the others are flat within 40
    begin
      int mx [8], mn [8];
      for (int c = 0; c < 8; c++) begin mx[c] = -100000; mn[c] = 100000; end
      for (int n = 0; n < WIN; n++)
        for (int c = 0; c < 8; c++) begin
          int v;
          v = 10000 + c * 1000 + $urandom_range(0, 40);
          if (c == 2 || c == 5) v += int'(300.0 * $sin(n * 1.3));
          if (v > mx[c]) mx[c] = v;
          if (v < mn[c]) mn[c] = v;
          @(negedge clk); av = 1; ach = 3'(c); ad = 16'(v);
          @(negedge clk); av = 0;
        end
      @(negedge clk);
      for (int c = 0; c < 8; c++) begin
        check(int'(delta[c]) == mx[c] - mn[c], $sformatf("supply %0d delta %0d expected %0d", c, delta[c], mx[c] - mn[c]));
        check(ripple[c] == (mx[c] - mn[c] > 200), $sformatf("supply %0d ripple flag", c));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
