// lv_monitor: survey of the low voltages of the combiner for ripple.
//
// Eight supplies are watched (5 V and 3.3 V of the crate, 5 V, +15 V and -15 V
// of the analog backplane, the 5 V DAC reference and the two 10 V comparator
// references). Ripple, seen on older cards as the supplies aged, is caught in
// two ways:
//  * a comparator per supply flags "below threshold" (under). Its falls below
//    threshold are counted in events, and the time spent below is counted in
//    time_below in microseconds (both 32-bit, saturating, cleared by clear);
//  * ADC samples (about 5 kHz per supply) arrive as (adc_valid, adc_ch,
//    adc_data); a minmax_window per supply gives delta = max - min over WINDOW
//    samples. ripple[c] is set when delta exceeds the threshold thr.
module lv_monitor #(
  parameter int unsigned NCH         = 8,
  parameter int unsigned WINDOW      = 256,
  parameter int unsigned CLKS_PER_US = 40
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NCH-1:0]         under,
  input  logic                   clear,
  input  logic                   adc_valid,
  input  logic [2:0]             adc_ch,
  input  logic signed [15:0]     adc_data,
  input  logic [16:0]            thr,
  output logic [NCH-1:0][31:0]   events,
  output logic [NCH-1:0][31:0]   time_below,
  output logic [NCH-1:0][16:0]   delta,
  output logic [NCH-1:0]         ripple
);
  localparam int unsigned UW = $clog2(CLKS_PER_US + 1);
  logic [NCH-1:0] s1, s2, prev;
  logic [UW-1:0]  ucnt;
  logic           us_tick;

  assign us_tick = (ucnt == UW'(CLKS_PER_US - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0; s2 <= '0; prev <= '0; ucnt <= '0; events <= '0; time_below <= '0;
    end else begin
      s1 <= under; s2 <= s1; prev <= s2;
      ucnt <= us_tick ? '0 : ucnt + 1'b1;
      if (clear) begin
        events <= '0; time_below <= '0;
      end else begin
        for (int c = 0; c < NCH; c++) begin
          if (s2[c] && !prev[c] && events[c] != '1) events[c] <= events[c] + 1'b1;
          if (s2[c] && us_tick && time_below[c] != '1) time_below[c] <= time_below[c] + 1'b1;
        end
      end
    end
  end

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    logic dv;
    minmax_window #(.W(16), .WINDOW(WINDOW)) u_mm (
      .clk, .rst_n, .valid(adc_valid && adc_ch == 3'(c)), .sample(adc_data),
      .delta(delta[c]), .delta_valid(dv));
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n)     ripple[c] <= 1'b0;
      else if (clear) ripple[c] <= 1'b0;
      else if (dv && delta[c] > thr) ripple[c] <= 1'b1;
  end
endmodule
