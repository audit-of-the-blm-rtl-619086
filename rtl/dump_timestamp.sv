// dump_timestamp: time-stamps a beam dump request of the combiner.
//
// When the combined beam permit falls (the dump request), two counters of
// microseconds start:
//   to_freeze - stops at the post-mortem freeze trigger from the beam
//               synchronous timing receiver; with the freeze arrival time the
//               CPU computes the time of the dump request to 1 us,
//   to_info   - stops when the beam info of the interlock interface goes
//               'False'; info_after_dump tells that the beam info fell after
//               the dump request, and to_info is then the delay between them.
// At the same edge the turn counter (turn clock pulses) and the bunch counter
// (clocks since the last turn pulse; the 40 MHz clock is taken as the bunch
// clock) are frozen into turn_frozen and bunch_frozen. Everything is held until
// rearm. The counters saturate. Trigger and turn inputs are asynchronous and
// are synchronised (2 flops) and edge-detected here.
// The turn clock is also checked continuously: turn_ok falls when no turn pulse
// came for TURN_TIMEOUT clocks (two LHC turns of 88.9 us by default, a value
// of this design), and turn_missing counts such losses (saturating).
module dump_timestamp #(
  parameter int unsigned CLKS_PER_US  = 40,
  parameter int unsigned TURN_TIMEOUT = 7200
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        permit,       // combined beam permit, '1' = permitted
  input  logic        beam_info,    // '1' = beam info 'True'
  input  logic        pm_freeze,    // post-mortem freeze trigger
  input  logic        turn_clk,     // turn clock pulses
  input  logic        rearm,
  output logic        dumped,       // a dump request has been seen
  output logic        freeze_seen,
  output logic [31:0] to_freeze,
  output logic        info_seen,
  output logic        info_after_dump,
  output logic [31:0] to_info,
  output logic [31:0] turn_count,
  output logic [15:0] bunch_count,
  output logic [31:0] turn_frozen,
  output logic [15:0] bunch_frozen,
  output logic        turn_ok,      // turn clock present
  output logic [15:0] turn_missing  // number of turn clock losses
);
  localparam int unsigned UW = $clog2(CLKS_PER_US + 1);

  logic [2:0] s_perm, s_frz, s_turn;
  logic [1:0] s_info;
  logic       perm_fall, frz_rise, turn_rise, info_now;
  logic [UW-1:0] ucnt;
  logic       us_tick;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      s_perm <= '0; s_frz <= '0; s_turn <= '0; s_info <= '0;
    end else begin
      s_perm <= {s_perm[1:0], permit};
      s_frz  <= {s_frz[1:0], pm_freeze};
      s_turn <= {s_turn[1:0], turn_clk};
      s_info <= {s_info[0], beam_info};
    end

  assign perm_fall = s_perm[2] && !s_perm[1];
  assign frz_rise  = !s_frz[2] && s_frz[1];
  assign turn_rise = !s_turn[2] && s_turn[1];
  assign info_now  = s_info[1];
  assign us_tick   = (ucnt == UW'(CLKS_PER_US - 1));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ucnt <= '0;
    else        ucnt <= us_tick ? '0 : ucnt + 1'b1;

  // Turn clock check.
  localparam int unsigned TTW = $clog2(TURN_TIMEOUT + 1);
  logic [TTW-1:0] tto;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      tto <= '0; turn_ok <= 1'b0; turn_missing <= '0;
    end else if (turn_rise) begin
      tto <= '0; turn_ok <= 1'b1;
    end else if (tto == TTW'(TURN_TIMEOUT - 1)) begin
      if (turn_ok && turn_missing != 16'hFFFF) turn_missing <= turn_missing + 1'b1;
      turn_ok <= 1'b0;
    end else tto <= tto + 1'b1;

  // Turn and bunch counters.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      turn_count <= '0; bunch_count <= '0;
    end else if (turn_rise) begin
      turn_count  <= turn_count + 1'b1;
      bunch_count <= '0;
    end else if (bunch_count != 16'hFFFF) begin
      bunch_count <= bunch_count + 1'b1;
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dumped <= 1'b0; freeze_seen <= 1'b0; info_seen <= 1'b0; info_after_dump <= 1'b0;
      to_freeze <= '0; to_info <= '0; turn_frozen <= '0; bunch_frozen <= '0;
    end else if (rearm) begin
      dumped <= 1'b0; freeze_seen <= 1'b0; info_seen <= 1'b0; info_after_dump <= 1'b0;
      to_freeze <= '0; to_info <= '0;
    end else if (!dumped) begin
      if (perm_fall) begin
        dumped          <= 1'b1;
        turn_frozen     <= turn_count;
        bunch_frozen    <= bunch_count;
        info_after_dump <= info_now;   // beam info still 'True' at the request
        info_seen       <= !info_now;
      end
    end else begin
      if (frz_rise) freeze_seen <= 1'b1;
      else if (!freeze_seen && us_tick && to_freeze != '1) to_freeze <= to_freeze + 1'b1;
      if (!info_now) info_seen <= 1'b1;
      else if (!info_seen && us_tick && to_info != '1) to_info <= to_info + 1'b1;
    end
  end
endmodule
