// oneshot_lv123: behavioural model, not synthesizable logic, of one half of a
// retriggerable monostable multivibrator of the SN74LV123 type, as used on each
// beam permit line.
//
// A rising edge on B while A_n is low and CLR_n is high starts (or restarts) a
// pulse of TW_NS nanoseconds on Q; Q_n is its inverse. CLR_n low forces Q low at
// once. With a trigger every 500 ns (2 MHz) and a pulse width near 1 us
// (10 kOhm with 100 pF, the parts on the combiner; K taken as 1.0) Q stays high
// as long as the trigger clock runs and the clear input, the line from the
// previous card, is high. A pull-down on that input makes a broken wire read as
// 'False'; the model treats a low input the same way.
module oneshot_lv123 #(
  parameter int TW_NS = 1000
) (
  input  logic a_n,
  input  logic b,
  input  logic clr_n,
  output logic q,
  output logic q_n
);
  int unsigned gen = 0;
  logic pulse = 1'b0;

  always @(posedge b) begin
    if (!a_n && clr_n) begin
      pulse = 1'b1;
      gen   = gen + 1;
      fork
        begin : expire
          automatic int unsigned g = gen;
          #(TW_NS * 1ns);
          if (g == gen) pulse = 1'b0;
        end
      join_none
    end
  end

  always @(negedge clr_n) begin
    gen   = gen + 1;
    pulse = 1'b0;
  end

  assign q   = pulse && clr_n;
  assign q_n = !q;
endmodule
