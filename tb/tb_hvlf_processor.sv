// tb_hvlf_processor: 4 channels, 16 positions per modulation cycle. The
// reference (HV image) is a sine; channel 0 answers in quadrature (a chamber
// is a capacitor), channel 1 in phase, channel 3 in anti-phase and channel 2
// is a disconnected channel (flat with noise). The testbench computes the
// mean-removed correlations I and Q itself and checks them, the pass flags
// against the thresholds, the number of passing channels and the processing
// time (about NPOS + NCH*(NPOS+3) clocks).
module tb_hvlf_processor;
  localparam int NCH = 4, NPOS = 16;
  logic clk = 0, rst_n = 0;
  logic lw = 0, tick = 0, en = 1;
  logic [1:0] lch, thr_addr, res_addr = 0;
  logic [31:0] ld;
  logic [3:0] cpos;
  logic signed [23:0] hv;
  logic [63:0] thr_data;
  logic rpass, busy, done;
  logic signed [65:0] ri, rq;
  logic [2:0] npass;
  int checks = 0, failures = 0;
  longint thr [NCH];
  longint x [NCH][NPOS];
  longint r [NPOS];

  always #12.5 clk = ~clk;

  assign thr_data = 64'(thr[thr_addr]);

  hvlf_processor #(.NCH(NCH), .NPOS(NPOS)) dut (.clk, .rst_n, .log_wr(lw), .log_ch(lch),
    .log_data(ld), .sample_tick(tick), .cap_pos(cpos), .hv_v(hv), .enable(en),
    .thr_addr, .thr_data, .res_addr, .res_pass(rpass), .res_i(ri), .res_q(rq), .busy,
    .done, .npass);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    longint sum, mean, ei, eq, amp;
    int t0, t1, np;
    for (int p = 0; p < NPOS; p++) begin
      real ph;
      ph = 2.0 * 3.141592653589793 * p / NPOS;
      r[p]    = 5000 + longint'(1000.0 * $sin(ph));
      x[0][p] = 10000 + longint'(500.0 * $cos(ph)) + $urandom_range(0, 20);
      x[1][p] = 10000 + longint'(300.0 * $sin(ph)) + $urandom_range(0, 20);
      x[2][p] = 10000 + $urandom_range(0, 20);
      x[3][p] = 20000 - longint'(800.0 * $sin(ph)) + $urandom_range(0, 20);
    end
    for (int c = 0; c < NCH; c++) thr[c] = 1_000_000;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < NPOS; p++) begin
      for (int c = 0; c < NCH; c++) begin
        @(negedge clk); lw = 1; lch = 2'(c); ld = 32'(x[c][p]);
      end
      @(negedge clk); lw = 0; hv = 24'(r[p]); cpos = 4'(p); tick = 1;
      @(negedge clk); tick = 0;
      repeat (2 * NCH + 4) @(negedge clk);
    end
    t0 = $time;
    wait (done);
    t1 = $time;
    check((t1 - t0) / 25 <= NPOS + NCH * (NPOS + 3) + 10,
          $sformatf("processing took %0d clocks", (t1 - t0) / 25));
    sum = 0;
    for (int p = 0; p < NPOS; p++) sum += r[p];
    mean = sum >>> 4;
    np = 0;
    for (int c = 0; c < NCH; c++) begin
      ei = 0; eq = 0;
      for (int p = 0; p < NPOS; p++) begin
        ei += x[c][p] * (r[p] - mean);
        eq += x[c][p] * (r[(p + NPOS / 4) % NPOS] - mean);
      end
      amp = (ei < 0 ? -ei : ei) + (eq < 0 ? -eq : eq);
      @(negedge clk); res_addr = 2'(c);
      @(negedge clk); @(negedge clk);
      check(longint'(ri) == ei && longint'(rq) == eq,
            $sformatf("ch %0d I %0d Q %0d expected %0d %0d", c, longint'(ri), longint'(rq), ei, eq));
      check(rpass == (amp >= thr[c]), $sformatf("ch %0d pass flag (amp %0d)", c, amp));
      np += int'(amp >= thr[c]);
    end
    check(int'(npass) == np && np == 3, $sformatf("%0d channels pass", npass));
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
