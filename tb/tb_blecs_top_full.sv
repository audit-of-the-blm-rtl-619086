// tb_blecs_top_full: the combiner at its default (real) time constants, taken
// through one complete operation: the energy source sends a frame every 1 ms on
// both links, the combiner forwards the 5-bit energy level and the beam infos
// to the 16 processing cards, the four permit lines stay 'True' through the
// one-shots, a card dumps, and then the BPTC runs over all 16 cards and both
// lines (about 64 ms of beam time, 2.6 million clocks at 40 MHz). The LHC turn
// clock runs throughout and must be seen as present.
module tb_blecs_top_full;
  import blecs_pkg::*;
  localparam int CPB = 40, FP = 40_000;
  localparam int NCH = 256, NPOS = 256;

  logic clk = 0, rst_n = 0;
  // ports of the top
  logic cisv_a, cisv_b, tc_link_a, tc_link_b, energy_cnt_clear = 0, soft_reset_tc = 0;
  logic subst_en = 0;
  logic [15:0] subst_energy = 16'h0000, energy;
  composite_t tc_word;
  energy_counters_t energy_counters;
  logic [31:0] ms_since_clear;
  logic energy_err, energy_src_b, tc_frame_sent;
  logic tc_u, tc_m, up_ua = 1, up_ub = 1, up_ma = 1, up_mb = 1;
  logic [3:0] bp_lines, bp_trig_clk;
  logic u_info = 1, m_info = 1;
  logic pm_freeze = 0, turn_clk = 0, ts_rearm = 0;
  logic [31:0] ts_to_freeze, ts_to_info, ts_turn;
  logic [15:0] ts_bunch;
  logic ts_turn_ok;
  logic [15:0] ts_turn_missing;
  logic ts_dumped, ts_freeze_seen, ts_info_seen, ts_info_after_dump;
  logic bpl_test_req = 0, bpl_force_u = 0, bpl_force_m = 0, bpl_sel_b = 0;
  logic bpl_result_valid = 0, bpl_result_pass = 0, bpl_test_mode, bpl_blocked;
  logic [2:0] bpl_state;
  logic bptc_start = 0, bptc_done, bptc_pass;
  logic [31:0] bptc_result;
  logic systest_start = 0, systest_busy, systest_done, systest_pass;
  logic cons_wr = 0, cons_pass = 0, bpbis_wr = 0, bpbis_pass = 0;
  logic systest_req_normal, systest_req_high, bp_forced_false;
  logic od1_in, od2_in, od3_in, last_id_in = 1;
  logic od1_pull, od2_pull, od3_pull, id_out, is_last, sys_under_test;
  logic modulation_test = 0;
  logic hv_freq_100 = 0;
  logic [15:0] hv_normal_code = 16'h9000, hv_test_code = 16'h7000, hv_mod_code = 16'hA000;
  logic dac_sync_n, dac_sclk, dac_din;
  logic [7:0] hv_pos;
  logic hv_tick;
  logic [15:0] hv_offset, hv_modc;
  logic pot_start = 0;
  logic [7:0] pot_value = 8'h5A;
  logic pot_sda_in;
  logic pot_sda_pull, pot_scl_pull, pot_nack, pot_busy, pot_done;
  logic [7:0] hv_cmp = 0;
  logic mon_clear = 0, hv_adc_valid = 0;
  logic [1:0] hv_adc_ch = 0;
  logic signed [23:0] hv_adc_data = 0;
  logic [7:0] hv_cmp_now, hv_cmp_sticky;
  logic [7:0][15:0] hv_cmp_events;
  logic [3:0][24:0] hv_vpp;
  logic log_wr = 0;
  logic [7:0] log_ch = 0;
  logic [31:0] log_data = 0;
  logic [7:0] hvlf_thr_addr;
  logic [63:0] hvlf_thr_data = 64'd100_000;
  logic [7:0] hvlf_res_addr = 0;
  logic hvlf_res_pass;
  logic signed [65:0] hvlf_res_i, hvlf_res_q;
  logic hvlf_done, hvlf_busy;
  logic [8:0] hvlf_npass;
  logic [8:0] hvlf_expected = 9'd4;
  logic [7:0] lv_under = 0;
  logic lv_adc_valid = 0;
  logic [2:0] lv_adc_ch = 0;
  logic signed [15:0] lv_adc_data = 0;
  logic [16:0] lv_thr = 17'd200;
  logic [7:0][31:0] lv_events, lv_time_below;
  logic [7:0][16:0] lv_delta;
  logic [7:0] lv_ripple;

  int checks = 0, failures = 0;

  always #12.5 clk = ~clk;

  blecs_top dut (.*);

  logic [15:0] cisv_energy = 16'h2A00;
  logic cisv_toggle = 0, corrupt_a = 0, corrupt_b = 0, silent_a = 0, silent_b = 0;
  int cisv_frames;
  cisv_model #(.CPB(CPB), .PERIOD(FP)) u_cisv (.clk, .energy(cisv_energy), .toggle(cisv_toggle),
    .corrupt_a, .corrupt_b, .silent_a, .silent_b, .line_a(cisv_a), .line_b(cisv_b),
    .frames(cisv_frames));

  logic drop_u = 0, drop_m = 0, deaf = 0;
  logic [15:0] tc_seen_word;
  int tc_frames, tc_bad;
  bletc_chain_model #(.CPB(CPB)) u_cards (.clk, .link(tc_link_a), .drop_u, .drop_m, .deaf,
    .deaf_card(4'd0), .word(tc_seen_word), .frames(tc_frames), .bad_frames(tc_bad), .tc_u, .tc_m);

  logic [3:0] bp_q, bp_qn, clr_in;
  assign clr_in = {tc_u, tc_u, tc_m, tc_m};
  for (genvar i = 0; i < 4; i++) begin : g_os
    oneshot_lv123 #(.TW_NS(1000)) u_os (.a_n(1'b0), .b(bp_trig_clk[i]), .clr_n(clr_in[i]),
      .q(bp_q[i]), .q_n(bp_qn[i]));
  end

  assign od1_in = !od1_pull;
  assign od2_in = !od2_pull;
  assign od3_in = !od3_pull;
  assign pot_sda_in = !pot_sda_pull;

  // LHC turn clock: 88.9 us = 3557 clocks
  always begin
    repeat (3552) @(negedge clk); turn_clk = 1;
    repeat (5) @(negedge clk); turn_clk = 0;
  end

  always begin
    repeat (20 * FP) @(posedge clk);
    cisv_toggle = !cisv_toggle;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int t0;
  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    // energy from the source to the cards
    repeat (4 * FP) @(negedge clk);
    check(energy == 16'h2A00 && !energy_err && !energy_src_b, "energy received on link A");
    check(tc_seen_word[15:11] == 5'd5 && tc_seen_word[10] == 0, $sformatf("level 5 at the cards: %h", tc_seen_word));
    check(tc_seen_word[7:6] == 2'b11, "beam infos in the word");
    check(energy_counters.frames_a >= 3 && energy_counters.crc_err_a == 0, "frame counter");
    check(tc_bad == 0 && tc_frames >= 3, "card link frames");
    // one BLECS frame per millisecond
    t0 = tc_frames;
    repeat (10 * FP) @(negedge clk);
    check(tc_frames - t0 == 10, $sformatf("%0d frames in 10 ms", tc_frames - t0));
    cisv_energy = 16'hC400;
    repeat (3 * FP) @(negedge clk);
    check(tc_seen_word[15:11] == 5'd24, "new level at the cards");
    // permit through the one-shots, then a dump from a card
    check(bp_lines == 4'b1111 && bp_q == 4'b1111, "permit lines 'True'");
    pulse_rearm();
    drop_m = 1;
    repeat (40 * 5) @(negedge clk);
    check(bp_lines[1:0] == 2'b00 && bp_q[1:0] == 2'b00, "M lines 'False' after the dump");
    check(bp_lines[3:2] == 2'b11, "U lines stay 'True' after an M dump");
    check(ts_dumped, "dump time-stamped");
    drop_m = 0;
    repeat (100) @(negedge clk);
    check(bp_lines == 4'b1111, "lines back");
    // beam permit test of the 16 cards
    @(negedge clk); bptc_start = 1; @(negedge clk); bptc_start = 0;
    wait (bptc_done);
    @(negedge clk);
    check(bptc_pass && bptc_result == 32'hFFFF_FFFF, $sformatf("BPTC result %h", bptc_result));
    repeat (3 * FP) @(negedge clk);
    check(bp_lines == 4'b1111 && !sys_under_test, "normal after BPTC");
    check(tc_bad == 0, "no bad frame on the card link");
    check(ts_turn_ok && ts_turn_missing == 0, "turn clock present");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse_rearm();
    @(negedge clk); ts_rearm = 1; @(negedge clk); ts_rearm = 0;
  endtask

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
