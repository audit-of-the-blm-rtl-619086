// bp_combiner: combines the beam permit inputs of the combiner and sets the four
// lines sent to the next combiner or to the interlock interface.
//
// Beam permitted is '1'. For the unmaskable (U) and the maskable (M) permit the
// input from the last processing card of the crate, the A and B lines from the
// combiner upstream and the system test result are ANDed (first combiner of a
// chain: tie the upstream inputs to '1'). In normal operation both output lines
// A and B of a permit follow that AND. Three things override it:
//   hold_low  - the lines are forced 'False' (system test pending or failed,
//               or system under test on the last crate),
//   test_mode - the lines are 'False' except that an outside system may force
//               exactly one of A or B to 'True' per permit (force_*_en with
//               force_sel_b choosing B). The other line always stays 'False'.
// u_recv / m_recv are the received permits alone (without the system test
// result): the last crate reports on OD3 what it received, also while its own
// lines are forced 'False'.
// Inputs are asynchronous and pass a two-flop synchroniser; outputs are
// registered, so a change on an input reaches the outputs in 3 clocks.
module bp_combiner (
  input  logic clk,
  input  logic rst_n,
  input  logic tc_u, tc_m,               // from the last processing card
  input  logic up_ua, up_ub, up_ma, up_mb,  // from the upstream combiner
  input  logic sys_ok,                   // system test result
  input  logic hold_low,
  input  logic test_mode,
  input  logic force_u_en, force_m_en, force_sel_b,
  output logic u_comb, m_comb,           // combined permits (before line control)
  output logic u_recv, m_recv,           // received permits, without sys_ok
  output logic out_ua, out_ub, out_ma, out_mb
);
  logic [5:0] s1, s2;
  logic       nu, nm;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin s1 <= '0; s2 <= '0; end
    else begin
      s1 <= {tc_u, tc_m, up_ua, up_ub, up_ma, up_mb};
      s2 <= s1;
    end

  assign nu = s2[5] & s2[3] & s2[2] & sys_ok;
  assign nm = s2[4] & s2[1] & s2[0] & sys_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u_comb <= 1'b0; m_comb <= 1'b0; u_recv <= 1'b0; m_recv <= 1'b0;
      out_ua <= 1'b0; out_ub <= 1'b0; out_ma <= 1'b0; out_mb <= 1'b0;
    end else begin
      u_comb <= nu;
      m_comb <= nm;
      u_recv <= s2[5] & s2[3] & s2[2];
      m_recv <= s2[4] & s2[1] & s2[0];
      if (hold_low) begin
        {out_ua, out_ub, out_ma, out_mb} <= 4'b0000;
      end else if (test_mode) begin
        out_ua <= force_u_en && !force_sel_b;
        out_ub <= force_u_en &&  force_sel_b;
        out_ma <= force_m_en && !force_sel_b;
        out_mb <= force_m_en &&  force_sel_b;
      end else begin
        {out_ua, out_ub, out_ma, out_mb} <= {nu, nu, nm, nm};
      end
    end
  end

  // Under test never both lines of a permit 'True' (checked on the clock
  // after the outputs were set from test_mode).
  logic test_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) test_q <= 1'b0;
    else        test_q <= test_mode;

  a_one_line_u: assert property (@(posedge clk) disable iff (!rst_n)
                                 test_q |-> !(out_ua && out_ub));
  a_one_line_m: assert property (@(posedge clk) disable iff (!rst_n)
                                 test_q |-> !(out_ma && out_mb));
endmodule
