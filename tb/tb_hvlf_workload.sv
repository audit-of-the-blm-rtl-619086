// tb_hvlf_workload: the HVLF evaluation at its full size (256 channels, 256
// sine positions, default parameters) on the situation of the first field
// trial: only 4 of the channels have a chamber connected. Those 4 answer the
// modulation with a current in quadrature to the HV (the chamber is a
// capacitor); all others are flat with noise. The running maximums of all 256
// channels are logged at every position, the HV image is the reference. The
// testbench computes I, Q and |I|+|Q| of every channel itself and checks the
// results, that exactly the 4 connected channels pass and the processing time
// (NPOS + NCH*(NPOS+3) clocks).
module tb_hvlf_workload;
  localparam int NCH = 256, NPOS = 256;
  localparam int CONNECTED [4] = '{17, 64, 130, 201};
  logic clk = 0, rst_n = 0;
  logic lw = 0, tick = 0, en = 1;
  logic [7:0] lch = 0, thr_addr, res_addr = 0, cpos = 0;
  logic [31:0] ld = 0;
  logic signed [23:0] hv = 0;
  logic [63:0] thr_data;
  logic rpass, busy, done;
  logic signed [65:0] ri, rq;
  logic [8:0] npass;
  int checks = 0, failures = 0;
  longint x [NCH][NPOS];
  longint r [NPOS];

  always #12.5 clk = ~clk;

  assign thr_data = 64'd10_000_000;

  hvlf_processor dut (.clk, .rst_n, .log_wr(lw), .log_ch(lch),
    .log_data(ld), .sample_tick(tick), .cap_pos(cpos), .hv_v(hv), .enable(en),
    .thr_addr, .thr_data, .res_addr, .res_pass(rpass), .res_i(ri), .res_q(rq), .busy,
    .done, .npass);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit is_connected(input int c);
    foreach (CONNECTED[k]) if (CONNECTED[k] == c) return 1'b1;
    return 1'b0;
  endfunction

  initial begin
    longint sum, mean, ei, eq, amp;
    longint t0, t1;
    int np, bad;
    for (int p = 0; p < NPOS; p++) begin
      real ph;
      ph = 2.0 * 3.141592653589793 * p / NPOS;
      r[p] = 1_505_000 + longint'(4000.0 * $sin(ph));
      for (int c = 0; c < NCH; c++)
        x[c][p] = 10000 + (is_connected(c) ? longint'(300.0 * $cos(ph)) : 0) + $urandom_range(0, 20);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < NPOS; p++) begin
      for (int c = 0; c < NCH; c++) begin
        @(negedge clk); lw = 1; lch = 8'(c); ld = 32'(x[c][p]);
      end
      @(negedge clk); lw = 0; hv = 24'(r[p]); cpos = 8'(p); tick = 1;
      @(negedge clk); tick = 0;
      repeat (NCH + 8) @(negedge clk);
    end
    t0 = $time;
    wait (done);
    t1 = $time;
    $display("processing: %0d clocks", (t1 - t0) / 25);
    check((t1 - t0) / 25 <= NPOS + NCH * (NPOS + 3) + 10,
          $sformatf("processing took %0d clocks", (t1 - t0) / 25));
    sum = 0;
    for (int p = 0; p < NPOS; p++) sum += r[p];
    mean = sum >>> 8;
    np = 0; bad = 0;
    for (int c = 0; c < NCH; c++) begin
      ei = 0; eq = 0;
      for (int p = 0; p < NPOS; p++) begin
        ei += x[c][p] * (r[p] - mean);
        eq += x[c][p] * (r[(p + NPOS / 4) % NPOS] - mean);
      end
      amp = (ei < 0 ? -ei : ei) + (eq < 0 ? -eq : eq);
      @(negedge clk); res_addr = 8'(c);
      @(negedge clk); @(negedge clk);
      if (longint'(ri) != ei || longint'(rq) != eq || rpass != is_connected(c)) begin
        bad++;
        if (bad < 5) $display("ch %0d I %0d Q %0d (expected %0d %0d) pass %b amp %0d",
                              c, longint'(ri), longint'(rq), ei, eq, rpass, amp);
      end
      np += int'(rpass);
    end
    check(bad == 0, $sformatf("%0d channels with wrong I, Q or pass", bad));
    check(int'(npass) == 4 && np == 4, $sformatf("%0d channels pass, 4 connected", npass));
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
