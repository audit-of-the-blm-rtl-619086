// energy_selector: chooses the beam energy from the redundant links A and B and
// keeps the reception counters.
//
// Selection follows the combiner's source table. A good frame on A is always
// used; a good frame on B is used only while A is in error
// (link_err_a: CRC error or frame timeout). With both links in error nothing is
// updated and the previous energy stays. The toggle bit of the CISV frame must
// change every 100 ms; if it has not changed for TOGGLE_TIMEOUT clocks (110 % of
// 100 ms = 4.4e6 clocks at 40 MHz) the energy is replaced by the highest value
// 0xFFFF, err is raised and the toggle-timeout counter counts once. The first
// toggle change clears the timeout. Counters (16 bits, saturating) count good
// frames, CRC errors and lost frames per link and toggle timeouts; clear resets
// them and restarts ms_since_clear, the number of milliseconds since the last
// clear. both_broken is high while both links are in error.
// Latency: energy follows a good frame by one clock.
module energy_selector
  import blecs_pkg::*;
#(
  parameter int unsigned TOGGLE_TIMEOUT = 4_400_000,  // 110 ms at 40 MHz
  parameter int unsigned CLKS_PER_MS    = 40_000
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             good_a, crc_err_a, lost_a, link_err_a,
  input  logic [15:0]      energy_a,
  input  logic             toggle_a,
  input  logic             good_b, crc_err_b, lost_b, link_err_b,
  input  logic [15:0]      energy_b,
  input  logic             toggle_b,
  input  logic             clear,
  output logic [15:0]      energy,
  output logic             err,         // toggle timeout active
  output logic             toggle,      // toggle bit of the selected source
  output logic             src_b,       // last value taken from B
  output logic             both_broken,
  output energy_counters_t counters,
  output logic [31:0]      ms_since_clear
);
  localparam int unsigned TW = $clog2(TOGGLE_TIMEOUT + 1);
  localparam int unsigned MW = $clog2(CLKS_PER_MS + 1);

  logic          take_a, take_b, new_val;
  logic [15:0]   sel_energy;
  logic          sel_toggle;
  logic [TW-1:0] tcnt;
  logic [15:0]   value;
  logic [MW-1:0] mscnt;

  function automatic logic [15:0] sat_inc(input logic [15:0] c, input logic en);
    return (en && c != 16'hFFFF) ? c + 16'd1 : c;
  endfunction

  assign take_a     = good_a;
  assign take_b     = good_b && link_err_a && !good_a;
  assign new_val    = take_a || take_b;
  assign sel_energy = take_a ? energy_a : energy_b;
  assign sel_toggle = take_a ? toggle_a : toggle_b;
  assign both_broken = link_err_a && link_err_b;
  assign energy     = err ? 16'hFFFF : value;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      value <= '0; toggle <= 1'b0; src_b <= 1'b0; err <= 1'b0; tcnt <= '0;
    end else begin
      if (new_val) begin
        value <= sel_energy;
        src_b <= take_b;
        toggle <= sel_toggle;
      end
      if (new_val && sel_toggle != toggle) begin
        tcnt <= '0;
        err  <= 1'b0;
      end else if (tcnt == TW'(TOGGLE_TIMEOUT - 1)) begin
        err <= 1'b1;
      end else begin
        tcnt <= tcnt + 1'b1;
      end
    end
  end

  logic to_event;
  assign to_event = !err && !(new_val && sel_toggle != toggle) && tcnt == TW'(TOGGLE_TIMEOUT - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      counters <= '0; mscnt <= '0; ms_since_clear <= '0;
    end else if (clear) begin
      counters <= '0; mscnt <= '0; ms_since_clear <= '0;
    end else begin
      counters.frames_a       <= sat_inc(counters.frames_a, good_a);
      counters.frames_b       <= sat_inc(counters.frames_b, good_b);
      counters.crc_err_a      <= sat_inc(counters.crc_err_a, crc_err_a);
      counters.crc_err_b      <= sat_inc(counters.crc_err_b, crc_err_b);
      counters.lost_a         <= sat_inc(counters.lost_a, lost_a);
      counters.lost_b         <= sat_inc(counters.lost_b, lost_b);
      counters.toggle_timeout <= sat_inc(counters.toggle_timeout, to_event);
      if (mscnt == MW'(CLKS_PER_MS - 1)) begin
        mscnt          <= '0;
        ms_since_clear <= ms_since_clear + 1'b1;
      end else begin
        mscnt <= mscnt + 1'b1;
      end
    end
  end
endmodule
