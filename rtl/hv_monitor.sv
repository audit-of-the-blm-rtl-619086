// hv_monitor: survey of the two chamber high-voltage supplies.
//
// Each supply has analog monitor outputs of its voltage and current. Window
// comparators on the board flag them (voltage < 500 V or > 2100 V, current
// < 0.5 mA or > 18 mA); the eight flags come in as cmp, per supply
// {I high, I low, V high, V low} with supply 1 in the low nibble. Each flag is
// synchronised, shown live in cmp_now, kept in cmp_sticky until clear, and its
// rising edges are counted (16-bit, saturating). The same monitor outputs are
// digitised by a 24-bit ADC; its samples arrive as (adc_valid, adc_ch, adc_data)
// with channels 0..3 = V1, I1, V2, I2. The last sample of each channel is kept,
// and a minmax_window per channel gives the peak-to-peak value over WINDOW
// samples (used to see the HV modulation). The ADC part number and its
// interface are not given: any front end that delivers such samples fits.
module hv_monitor #(
  parameter int unsigned WINDOW = 256
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [7:0]         cmp,
  input  logic               clear,
  input  logic               adc_valid,
  input  logic [1:0]         adc_ch,
  input  logic signed [23:0] adc_data,
  output logic [7:0]         cmp_now,
  output logic [7:0]         cmp_sticky,
  output logic [7:0][15:0]   cmp_events,
  output logic [3:0][23:0]   last,
  output logic [3:0][24:0]   vpp
);
  logic [7:0] s1, s2, prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0; s2 <= '0; prev <= '0; cmp_sticky <= '0; cmp_events <= '0; last <= '0;
    end else begin
      s1 <= cmp; s2 <= s1; prev <= s2;
      if (clear) begin
        cmp_sticky <= '0; cmp_events <= '0;
      end else begin
        cmp_sticky <= cmp_sticky | s2;
        for (int i = 0; i < 8; i++)
          if (s2[i] && !prev[i] && cmp_events[i] != 16'hFFFF)
            cmp_events[i] <= cmp_events[i] + 1'b1;
      end
      if (adc_valid) last[adc_ch] <= adc_data;
    end
  end
  assign cmp_now = s2;

  for (genvar c = 0; c < 4; c++) begin : g_pp
    logic dv;
    minmax_window #(.W(24), .WINDOW(WINDOW)) u_mm (
      .clk, .rst_n, .valid(adc_valid && adc_ch == 2'(c)), .sample(adc_data),
      .delta(vpp[c]), .delta_valid(dv));
  end
endmodule
