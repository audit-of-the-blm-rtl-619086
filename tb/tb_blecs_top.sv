// tb_blecs_top: end-to-end test of the combiner with shortened time constants.
// One crate, which is also the last one before the interlock interface. The
// timing interface card, the 16 processing cards (energy link decoder and
// daisy-chained permits), the one-shots of the four permit lines, the DAC, the
// potentiometer and the common lines are modelled in the testbench. Every
// mechanism is made to happen at least once and counted:
//   energy from A, from B (A corrupted), previous value (both corrupted),
//   toggle timeout with broken-link word, substitution in test mode,
//   permit through the one-shots, a dump with its time stamps,
//   forced 'False' by the high-priority system test request and its release
//   by a system test (BPTC then HVLF) run and decided by the combiner,
//   outside test of the lines (one line forced), BPTC over all 16 cards,
//   HV test level and modulation with DAC writes, HVLF evaluation,
//   potentiometer write, HV comparator events, LV ripple, turn clock loss.
module tb_blecs_top;
  import blecs_pkg::*;
  localparam int CPB = 40, FP = 2000;
  localparam int NCH = 16, NPOS = 16;

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
  logic [3:0] log_ch = 0;
  logic [31:0] log_data = 0;
  logic [3:0] hvlf_thr_addr;
  logic [63:0] hvlf_thr_data = 64'd2_000_000;
  logic [3:0] hvlf_res_addr = 0;
  logic hvlf_res_pass;
  logic signed [65:0] hvlf_res_i, hvlf_res_q;
  logic hvlf_done, hvlf_busy;
  logic [4:0] hvlf_npass;
  logic [4:0] hvlf_expected = 5'd12;
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

  blecs_top #(
    .CLKS_PER_BIT(CPB), .FRAME_TIMEOUT(3000), .FRAME_PERIOD(FP), .TOGGLE_TIMEOUT(22_000),
    .CLKS_PER_MS(2000), .CLKS_PER_US(40), .TURN_TIMEOUT(700), .BP_HALF_PERIOD(10), .ENTER_DELAY(500),
    .BPTC_TIMEOUT(8000), .CLKS_PER_S(1000), .NORMAL_S(100), .HIGH_S(200),
    .SAMPLE_30(600), .SAMPLE_100(400), .MON_WINDOW(16), .I2C_QUARTER(10),
    .HVLF_NCH(NCH), .HVLF_NPOS(NPOS)
  ) dut (.*);

  // ---- models ---------------------------------------------------------------
  logic [15:0] cisv_energy = 16'h4000;
  logic cisv_toggle = 0, corrupt_a = 0, corrupt_b = 0, silent_a = 0, silent_b = 0;
  int cisv_frames;
  cisv_model #(.CPB(CPB), .PERIOD(FP)) u_cisv (.clk, .energy(cisv_energy), .toggle(cisv_toggle),
    .corrupt_a, .corrupt_b, .silent_a, .silent_b, .line_a(cisv_a), .line_b(cisv_b),
    .frames(cisv_frames));

  logic drop_u = 0, drop_m = 0, deaf = 0;
  logic [15:0] tc_seen_word;
  int tc_frames, tc_bad;
  bletc_chain_model #(.CPB(CPB)) u_cards (.clk, .link(tc_link_a), .drop_u, .drop_m, .deaf,
    .deaf_card(4'd3), .word(tc_seen_word), .frames(tc_frames), .bad_frames(tc_bad), .tc_u, .tc_m);

  // one-shots of the four lines; the clear input is the combiner's own input
  // level (last card of the crate for U/M)
  logic [3:0] bp_q, bp_qn;
  logic [3:0] clr_in;
  assign clr_in = {tc_u, tc_u, tc_m, tc_m};
  for (genvar i = 0; i < 4; i++) begin : g_os
    oneshot_lv123 #(.TW_NS(1000)) u_os (.a_n(1'b0), .b(bp_trig_clk[i]), .clr_n(clr_in[i]),
      .q(bp_q[i]), .q_n(bp_qn[i]));
  end

  // common lines: a single crate, pulled up
  assign od1_in = !od1_pull;
  assign od2_in = !od2_pull;
  assign od3_in = !od3_pull;
  assign pot_sda_in = !pot_sda_pull && !(pot_ack);
  logic pot_ack = 0;
  int pot_bits = 0;
  always @(posedge (!pot_scl_pull)) if (pot_busy) pot_bits++;
  always @(negedge (!pot_scl_pull)) pot_ack <= pot_busy && (pot_bits % 9 == 8);

  // DAC model
  logic [23:0] dsh;
  int dbits = 0, dac_words = 0;
  logic [15:0] dac_a = 0, dac_b = 0;
  always @(negedge dac_sclk) if (!dac_sync_n) begin dsh = {dsh[22:0], dac_din}; dbits++; end
  always @(posedge dac_sync_n) if (rst_n) begin
    if (dbits == 24) begin
      dac_words++;
      if (dsh[23:16] == 8'h10) dac_a = dsh[15:0];
      if (dsh[23:16] == 8'h24) dac_b = dsh[15:0];
    end
    dbits = 0;
  end

  // HV image and running maximums follow the modulation position
  // processing cards: running maximums logged at every sine step while the HV
  // is modulated; channels 0..11 follow the HV (capacitor current), 12..15 flat
  always @(posedge hv_tick) if (od2_pull) begin
    for (int c = 0; c < NCH; c++) begin
      @(negedge clk);
      log_wr = 1; log_ch = 4'(c);
      log_data = 32'(10000 + ((c < 12) ? int'(300.0 * $cos(2.0 * 3.14159265 * hv_pos / 256.0 * 16.0)) : 0));
    end
    @(negedge clk); log_wr = 0;
  end

  always @(posedge clk) if (rst_n && od2_pull) begin
    hv_adc_valid <= !hv_adc_valid;
    hv_adc_ch    <= 2'd0;
    hv_adc_data  <= 24'(1500_000 + int'(4000.0 * $sin(2.0 * 3.14159265 * hv_pos / 256.0 * 16.0)));
  end

  // turn clock every 300 clocks (short orbit)
  logic turn_stop = 0;
  always begin
    repeat (295) @(negedge clk);
    wait (!turn_stop);
    turn_clk = 1; repeat (5) @(negedge clk); turn_clk = 0;
  end

  // the energy source changes its toggle bit regularly unless told to freeze it
  logic freeze_toggle = 0;
  always begin
    repeat (5 * FP) @(posedge clk);
    if (!freeze_toggle) cisv_toggle = !cisv_toggle;
  end

  // ---- checks and counters ----------------------------------------------------
  int m_src_a = 0, m_src_b = 0, m_prev = 0, m_toggle_to = 0, m_subst = 0, m_permit = 0,
      m_dump = 0, m_forced = 0, m_bpl = 0, m_bptc = 0, m_testlevel = 0, m_mod = 0,
      m_hvlf = 0, m_pot = 0, m_hvcmp = 0, m_lv = 0, m_turn = 0, m_systest = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wait_frames(input int n);
    repeat (n * FP) @(negedge clk);
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    pulse(energy_cnt_clear);
    // ---------------- energy distribution ----------------
    cisv_energy = 16'h4800;
    wait_frames(3);
    check(energy == 16'h4800 && !energy_src_b, "energy from A");
    check(tc_seen_word[15:11] == 5'd9 && tc_seen_word[10] == 0, $sformatf("cards got level 9: %h", tc_seen_word));
    check(tc_seen_word[7:6] == 2'b11, "beam infos in the word");
    if (energy == 16'h4800) m_src_a++;
    corrupt_a = 1; cisv_energy = 16'h6000;
    wait_frames(3);
    check(energy == 16'h6000 && energy_src_b, "A corrupted: energy from B");
    if (energy_src_b) m_src_b++;
    corrupt_b = 1; cisv_energy = 16'h7000;
    wait_frames(3);
    check(energy == 16'h6000, "both corrupted: previous value");
    if (energy == 16'h6000) m_prev++;
    check(energy_counters.crc_err_a >= 5 && energy_counters.crc_err_b >= 2, "CRC error counters");
    // both links silent: toggle timeout, broken-link word to the cards
    corrupt_a = 0; corrupt_b = 0; silent_a = 1; silent_b = 1; freeze_toggle = 1;
    wait_frames(14);
    check(energy_err && energy == 16'hFFFF, "toggle timeout");
    check(tc_seen_word == 16'hFCC0, $sformatf("broken-link word at the cards: %h", tc_seen_word));
    if (energy_counters.toggle_timeout == 1) m_toggle_to++;
    silent_a = 0; silent_b = 0; freeze_toggle = 0; cisv_toggle = !cisv_toggle; cisv_energy = 16'h1000;
    wait_frames(3);
    check(!energy_err && energy == 16'h1000, "recovery after toggle change");
    check(energy_counters.frames_a > 5 && energy_counters.lost_a > 0, "frame and lost counters");
    check(tc_bad == 0 && tc_frames > 20, $sformatf("card link: %0d frames, %0d bad", tc_frames, tc_bad));

    // ---------------- beam permit through the one-shots ----------------
    check(bp_lines == 4'b1111, "all lines 'True'");
    #5us;
    check(bp_q == 4'b1111, "one-shots high");
    if (bp_q == 4'b1111) m_permit++;
    // a real dump from a card of the crate
    pulse(ts_rearm);
    repeat (400) @(negedge clk);
    drop_u = 1;
    repeat (40 * 20) @(negedge clk);
    pm_freeze = 1; repeat (5) @(negedge clk); pm_freeze = 0;
    repeat (40 * 10) @(negedge clk);
    u_info = 0; m_info = 0;
    repeat (100) @(negedge clk);
    check(bp_lines[3:2] == 2'b00 && bp_q[3:2] == 2'b00, "U lines 'False' after the dump");
    check(ts_dumped && ts_freeze_seen && ts_to_freeze inside {[19:21]}, $sformatf("dump to freeze %0d us", ts_to_freeze));
    check(ts_info_after_dump && ts_to_info inside {[29:31]}, $sformatf("dump to beam info %0d us", ts_to_info));
    if (ts_dumped && ts_freeze_seen) m_dump++;
    drop_u = 0;
    u_info = 1; m_info = 1;
    repeat (100) @(negedge clk);
    check(bp_lines == 4'b1111, "lines back");

    // ---------------- system test supervision ----------------
    wait (systest_req_high);
    drop_m = 1; repeat (20) @(negedge clk); drop_m = 0;
    repeat (20) @(negedge clk);
    check(bp_forced_false && bp_lines == 4'b0000, "forced 'False' after high request and dump");
    if (bp_forced_false) m_forced++;
    // the system test: BPTC over the 16 cards, then the HVLF modulation
    pulse(systest_start);
    wait (systest_done);
    @(negedge clk);
    check(systest_pass, "system test passed (BPTC and HVLF)");
    if (systest_pass) m_systest++;
    repeat (10) @(negedge clk);
    check(!bp_forced_false && bp_lines == 4'b1111, "released by a passed system test");

    // ---------------- outside test of the lines ----------------
    bpl_test_req = 1;
    repeat (100) @(negedge clk);
    check(!bpl_test_mode, "no test mode with beam info 'True'");
    u_info = 0; m_info = 0;
    repeat (700) @(negedge clk);
    check(bpl_test_mode, "test mode");
    check(tc_word.u_info == 0 && tc_word.m_info == 0, "beam infos 'False' in the word");
    bpl_force_u = 1; bpl_sel_b = 1;
    repeat (10) @(negedge clk);
    check(bp_lines == 4'b0100, $sformatf("only U-B forced 'True': %b", bp_lines));
    if (bp_lines == 4'b0100) m_bpl++;
    // energy substitution allowed in test mode
    subst_en = 1; subst_energy = 16'hF000;
    wait_frames(3);
    check(tc_seen_word[15:11] == 5'd30, "substituted energy at the cards");
    if (tc_seen_word[15:11] == 5'd30) m_subst++;
    subst_en = 0;
    bpl_result_pass = 1; pulse(bpl_result_valid);
    bpl_force_u = 0; bpl_sel_b = 0; bpl_test_req = 0;
    u_info = 1; m_info = 1;
    repeat (10) @(negedge clk);
    check(!bpl_test_mode && bp_lines == 4'b1111, "normal after a passed test");

    // ---------------- BPTC over the 16 cards ----------------
    pulse(bptc_start);
    repeat (10) @(negedge clk);
    check(sys_under_test && bp_lines == 4'b0000, "under test: last crate holds its lines");
    check(hv_offset == hv_test_code, "HV at the 100 pA test level");
    if (hv_offset == hv_test_code) m_testlevel++;
    wait (bptc_done);
    @(negedge clk);
    check(bptc_pass && bptc_result == 32'hFFFF_FFFF, $sformatf("BPTC result %h", bptc_result));
    if (bptc_pass) m_bptc++;
    // again with card 3 deaf on M
    deaf = 1;
    pulse(bptc_start);
    wait (bptc_done);
    @(negedge clk);
    check(!bptc_pass && bptc_result == ~(32'd1 << 19), $sformatf("BPTC finds the deaf card: %h", bptc_result));
    deaf = 0;
    repeat (FP * 3) @(negedge clk);
    check(bp_lines == 4'b1111, "lines back after BPTC");

    // ---------------- modulation and HVLF ----------------
    modulation_test = 1;
    wait (hvlf_done);
    wait (!hvlf_done);
    wait (hvlf_done);
    check(od1_pull && od2_pull, "modulation requested on the common lines");
    check(hv_offset == hv_mod_code && dac_a == hv_mod_code, "modulation level written to the DAC");
    check(dac_b != 16'h8000, "sine on the modulation channel");
    if (dac_b != 16'h8000) m_mod++;
    m_hvlf += int'(hvlf_done);
    $display("HVLF: %0d channels pass", hvlf_npass);
    check(hvlf_npass == 12, "HVLF finds the 12 connected channels");
    modulation_test = 0;
    repeat (300) @(negedge clk);
    check(dac_a == hv_normal_code && dac_b == 16'h8000, "HV back to normal");

    // ---------------- potentiometer, monitors ----------------
    pulse(pot_start);
    wait (pot_done);
    check(!pot_nack, "potentiometer acknowledged");
    m_pot++;
    hv_cmp = 8'h01; repeat (6) @(negedge clk); hv_cmp = 0; repeat (6) @(negedge clk);
    check(hv_cmp_events[0] == 1 && hv_cmp_sticky[0], "HV comparator event");
    if (hv_cmp_events[0] == 1) m_hvcmp++;
    lv_under[3] = 1; repeat (400) @(negedge clk); lv_under[3] = 0;
    for (int n = 0; n < 16; n++) begin
      @(negedge clk); lv_adc_valid = 1; lv_adc_ch = 3'd3; lv_adc_data = 16'(5000 + ((n % 2) ? 300 : -300));
      @(negedge clk); lv_adc_valid = 0;
    end
    @(negedge clk);
    check(lv_events[3] == 1 && lv_time_below[3] inside {[9:11]} && lv_ripple[3], "LV ripple seen");
    if (lv_ripple[3]) m_lv++;

    // ---------------- turn clock check ----------------
    check(ts_turn_ok && ts_turn_missing == 0, "turn clock present");
    turn_stop = 1;
    repeat (1500) @(negedge clk);
    check(!ts_turn_ok && ts_turn_missing == 1, "turn clock loss counted");
    if (ts_turn_missing == 1) m_turn++;
    turn_stop = 0;

    // ---------------- every mechanism happened ----------------
    check(m_src_a > 0, "mechanism: energy from A");
    check(m_src_b > 0, "mechanism: energy from B");
    check(m_prev > 0, "mechanism: previous energy kept");
    check(m_toggle_to > 0, "mechanism: toggle timeout");
    check(m_subst > 0, "mechanism: substitution");
    check(m_permit > 0, "mechanism: permit through one-shots");
    check(m_dump > 0, "mechanism: dump time stamp");
    check(m_forced > 0, "mechanism: forced by system test request");
    check(m_bpl > 0, "mechanism: outside line test");
    check(m_bptc > 0, "mechanism: BPTC");
    check(m_testlevel > 0, "mechanism: HV test level");
    check(m_mod > 0, "mechanism: HV modulation");
    check(m_hvlf > 0, "mechanism: HVLF evaluation");
    check(m_pot > 0, "mechanism: potentiometer write");
    check(m_hvcmp > 0, "mechanism: HV comparator");
    check(m_lv > 0, "mechanism: LV ripple");
    check(m_turn > 0, "mechanism: turn clock loss");
    check(m_systest > 0, "mechanism: system test run by the combiner");
    $display("mechanisms: A %0d B %0d prev %0d toggle-timeout %0d subst %0d permit %0d dump %0d forced %0d bpl %0d bptc %0d testlevel %0d mod %0d hvlf %0d pot %0d hvcmp %0d lv %0d turn %0d systest %0d",
             m_src_a, m_src_b, m_prev, m_toggle_to, m_subst, m_permit, m_dump, m_forced, m_bpl,
             m_bptc, m_testlevel, m_mod, m_hvlf, m_pot, m_hvcmp, m_lv, m_turn, m_systest);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
