// bp_line_driver: makes the clock that keeps the beam permit one-shots high.
//
// Each beam permit line leaves the card through a retriggerable one-shot. The
// FPGA feeds its trigger input with a 2 MHz clock while the line must be
// 'True'; the one-shot's clear input carries the line from the previous card, so
// the line is 'True' only if the previous card's line is 'True' and this
// card's clock keeps running. When the permit drops the clock stops at low and
// the one-shot falls after its pulse width. A stuck FPGA thus removes the permit.
// HALF_PERIOD clocks per half period: 10 at 40 MHz gives 2 MHz.
// The four lines are unmaskable A/B and maskable A/B.
module bp_line_driver #(
  parameter int unsigned HALF_PERIOD = 10
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] permit,
  output logic [3:0] trig_clk
);
  localparam int unsigned CW = $clog2(HALF_PERIOD + 1);
  logic [CW-1:0] cnt;
  logic          phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; phase <= 1'b0; trig_clk <= '0;
    end else begin
      if (cnt == CW'(HALF_PERIOD - 1)) begin
        cnt   <= '0;
        phase <= ~phase;
      end else begin
        cnt <= cnt + 1'b1;
      end
      trig_clk <= permit & {4{phase}};
    end
  end
endmodule
