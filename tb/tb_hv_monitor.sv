// tb_hv_monitor: comparator pulses (counted and sticky) and ADC samples of the
// four monitor channels with a known sine plus offset; the peak-to-peak value
// over each window is computed in the testbench from the samples it sent.
module tb_hv_monitor;
  localparam int WIN = 32;
  logic clk = 0, rst_n = 0;
  logic [7:0] cmp = 0, now, sticky;
  logic clear = 0, av = 0;
  logic [1:0] ach;
  logic signed [23:0] ad;
  logic [7:0][15:0] ev;
  logic [3:0][23:0] last;
  logic [3:0][24:0] vpp;
  int checks = 0, failures = 0;

  always #12.5 clk = ~clk;

  hv_monitor #(.WINDOW(WIN)) dut (.clk, .rst_n, .cmp, .clear, .adc_valid(av), .adc_ch(ach),
    .adc_data(ad), .cmp_now(now), .cmp_sticky(sticky), .cmp_events(ev), .last, .vpp);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int npulse [8];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 8; i++) npulse[i] = $urandom_range(0, 5);
    for (int r = 0; r < 5; r++) begin
      @(negedge clk);
      for (int i = 0; i < 8; i++) cmp[i] = (r < npulse[i]);
      repeat (4) @(negedge clk);
      cmp = 0;
      repeat (4) @(negedge clk);
    end
    for (int i = 0; i < 8; i++) begin
      check(int'(ev[i]) == npulse[i], $sformatf("comparator %0d: %0d events, expected %0d", i, ev[i], npulse[i]));
      check(sticky[i] == (npulse[i] > 0), "sticky flag");
    end
    check(now == 0, "live flags low");
    // ADC: two windows per channel, interleaved
    for (int w = 0; w < 2; w++) begin
      int mx [4], mn [4];
      for (int c = 0; c < 4; c++) begin mx[c] = -(1 << 30); mn[c] = 1 << 30; end
      for (int n = 0; n < WIN; n++)
        for (int c = 0; c < 4; c++) begin
          int v;
          v = 100000 * (c + 1) - 500000 + int'((1000.0 * (c + 1)) * $sin(n * 0.7)) + $urandom_range(0, 50);
          if (v > mx[c]) mx[c] = v;
          if (v < mn[c]) mn[c] = v;
          @(negedge clk); av = 1; ach = 2'(c); ad = 24'(v);
          @(negedge clk); av = 0;
          if (n == WIN - 1) check(int'(last[c]) == v || $signed(last[c]) == v, "last sample kept");
        end
      @(negedge clk);
      for (int c = 0; c < 4; c++)
        check(int'(vpp[c]) == mx[c] - mn[c], $sformatf("ch %0d vpp %0d expected %0d", c, vpp[c], mx[c] - mn[c]));
    end
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    check(ev == '0 && sticky == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
