// tb_hv_control: a DAC8532 model in the testbench shifts in 24 bits on the
// falling sclk edges while sync_n is low and keeps the codes of channels A and
// B. Checks the offset code for the normal, 100 pA test and modulation levels,
// the control bytes, mid-scale B outside the modulation, a sine on B during
// modulation (against 0x8000 + 32767*sin(2*pi*i/256), +-1), and the sample
// period for both excitation frequencies.
module tb_hv_control;
  localparam int S30 = 600, S100 = 180;
  logic clk = 0, rst_n = 0;
  logic tl = 0, mod = 0, f100 = 0;
  logic [15:0] nc = 16'h9000, tc = 16'h7000, mc = 16'hA000;
  logic [7:0] pos;
  logic tick, sync_n, sclk, din;
  logic [15:0] oc, mcode;
  logic [15:0] dac_a = 0, dac_b = 0;
  logic [23:0] sh;
  int nbits = 0, nwords = 0, badctl = 0;
  int checks = 0, failures = 0;
  longint cyc = 0;

  always #12.5 clk = ~clk;
  always @(posedge clk) cyc++;

  hv_control #(.SAMPLE_30(S30), .SAMPLE_100(S100), .SCLK_HALF(2)) dut (.clk, .rst_n,
    .test_level(tl), .modulation(mod), .freq_100(f100), .normal_code(nc), .test_code(tc),
    .mod_level_code(mc), .position(pos), .sample_tick(tick), .offset_code(oc), .mod_code(mcode),
    .sync_n, .sclk, .din);

  // DAC model
  always @(negedge sclk) if (!sync_n) begin sh = {sh[22:0], din}; nbits++; end
  always @(posedge sync_n) if (rst_n) begin
    if (nbits == 24) begin
      nwords++;
      if (sh[23:16] == 8'h10)      dac_a = sh[15:0];
      else if (sh[23:16] == 8'h24) dac_b = sh[15:0];
      else badctl++;
    end else badctl++;
    nbits = 0;
  end
  always @(negedge sync_n) nbits = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int sine(input int i);
    real v;
    v = 32768.0 + 32767.0 * $sin(2.0 * 3.141592653589793 * i / 256.0);
    return int'(v);
  endfunction

  initial begin
    longint t1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (200) @(negedge clk);
    check(dac_a == nc && dac_b == 16'h8000, "normal level, B mid-scale");
    tl = 1; repeat (200) @(negedge clk);
    check(dac_a == tc, "100 pA test level");
    mod = 1; repeat (200) @(negedge clk);
    check(dac_a == mc, "modulation level");
    // follow the sine over one period at 30 mHz
    for (int k = 0; k < 256 + 4; k++) begin
      int e;
      @(posedge tick);
      repeat (250) @(negedge clk);   // A then B written, about 200 clocks
      e = sine(int'(pos));
      check(int'(dac_b) inside {[e - 1 : e + 1]},
            $sformatf("sine at %0d: %h expected %h", pos, dac_b, e));
    end
    @(posedge tick); t1 = cyc; @(posedge tick);
    check(cyc - t1 == S30, $sformatf("30 mHz sample period %0d", cyc - t1));
    f100 = 1;
    @(posedge tick); t1 = cyc; @(posedge tick);
    check(cyc - t1 == S100, $sformatf("100 mHz sample period %0d", cyc - t1));
    mod = 0; tl = 0; repeat (400) @(negedge clk);
    check(dac_a == nc && dac_b == 16'h8000, "back to normal");
    check(badctl == 0 && nwords > 500, $sformatf("%0d words, %0d bad", nwords, badctl));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
