// blecs_top: FPGA logic of the BLECS combiner and survey card, the card that
// links one crate of the beam loss monitoring system to the beam interlock
// system, distributes the beam energy, drives the chamber high voltage and
// watches the supplies.
//
//  Energy path: two redundant 1 Mbit/s Manchester links (A, B) from the timing
//    interface card -> energy_frame_rx x2 -> energy_selector (A/B choice,
//    toggle timeout, counters) -> energy_composer (16->5 bit level plus test
//    and beam-info bits) -> blecs_tx (frame to the 16 processing cards, both
//    output links every millisecond).
//  Beam permit: bp_combiner ANDs the permits of the crate's processing cards,
//    of the combiner upstream and the system test result, and sets the four
//    output lines (U/M, A/B); bp_line_driver turns them into the 2 MHz trigger
//    clocks of the external one-shots. dump_timestamp time-stamps the dump.
//  Tests: bpl_test_ctrl (outside system tests the lines to the interlock
//    interface), bptc_sequencer (dump provoked on each processing card via the
//    energy link), system_test_seq (runs BPTC then the HVLF modulation and
//    decides the system test), test_supervisor (periodic system test
//    requests, lines forced 'False' until a passed system test).
//  Crate lines: crate_lines drives and reads OD1..OD3 and finds the last crate.
//  High voltage: hv_control (DAC8532 offset + sine modulation), digipot_i2c
//    (modulation attenuator), hv_monitor, hvlf_processor (chamber connection
//    test from the modulation), lv_monitor (supply ripple).
// The VME interface of the card is not part of this logic: registers and
// status are plain ports. Clock is 40 MHz; every time constant is a parameter
// given in clocks so that simulations can shorten them.
module blecs_top
  import blecs_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT   = 40,
  parameter int unsigned FRAME_TIMEOUT  = 60_000,
  parameter int unsigned FRAME_PERIOD   = 40_000,
  parameter int unsigned TOGGLE_TIMEOUT = 4_400_000,
  parameter int unsigned CLKS_PER_MS    = 40_000,
  parameter int unsigned CLKS_PER_US    = 40,
  parameter int unsigned TURN_TIMEOUT   = 7200,
  parameter int unsigned BP_HALF_PERIOD = 10,
  parameter int unsigned ENTER_DELAY    = 40_000_000,
  parameter int unsigned BPTC_TIMEOUT   = 120_000,
  parameter int unsigned CLKS_PER_S     = 40_000_000,
  parameter int unsigned NORMAL_S       = 86_400,
  parameter int unsigned HIGH_S         = 172_800,
  parameter int unsigned SAMPLE_30      = 5_208_333,
  parameter int unsigned SAMPLE_100     = 1_562_500,
  parameter int unsigned MON_WINDOW     = 256,
  parameter int unsigned I2C_QUARTER    = 100,
  parameter int unsigned HVLF_NCH       = 256,
  parameter int unsigned HVLF_NPOS      = 256
) (
  input  logic clk,
  input  logic rst_n,
  // energy links from the timing interface card and to the processing cards
  input  logic              cisv_a, cisv_b,
  output logic              tc_link_a, tc_link_b,
  input  logic              energy_cnt_clear,
  input  logic              soft_reset_tc,
  input  logic              subst_en,
  input  logic [15:0]       subst_energy,
  output logic [15:0]       energy,
  output composite_t        tc_word,
  output energy_counters_t  energy_counters,
  output logic [31:0]       ms_since_clear,
  output logic              energy_err,
  output logic              energy_src_b,   // last energy taken from link B
  output logic              tc_frame_sent,
  // beam permit lines
  input  logic              tc_u, tc_m,
  input  logic              up_ua, up_ub, up_ma, up_mb,
  output logic [3:0]        bp_lines,       // {UA, UB, MA, MB} wanted state
  output logic [3:0]        bp_trig_clk,    // to the one-shot trigger inputs
  input  logic              u_info, m_info, // beam info from the interlock interface
  // time stamping
  input  logic              pm_freeze, turn_clk, ts_rearm,
  output logic [31:0]       ts_to_freeze, ts_to_info, ts_turn,
  output logic [15:0]       ts_bunch,
  output logic              ts_turn_ok,
  output logic [15:0]       ts_turn_missing,
  output logic              ts_dumped, ts_freeze_seen, ts_info_seen, ts_info_after_dump,
  // beam permit line test by an outside system
  input  logic              bpl_test_req, bpl_force_u, bpl_force_m, bpl_sel_b,
  input  logic              bpl_result_valid, bpl_result_pass,
  output logic              bpl_test_mode, bpl_blocked,
  output logic [2:0]        bpl_state,
  // BPTC
  input  logic              bptc_start,
  output logic              bptc_done, bptc_pass,
  output logic [31:0]       bptc_result,
  // system test supervision
  input  logic              systest_start,
  input  logic [$clog2(HVLF_NCH+1)-1:0] hvlf_expected,
  output logic              systest_busy, systest_done, systest_pass,
  input  logic              cons_wr, cons_pass, bpbis_wr, bpbis_pass,
  output logic              systest_req_normal, systest_req_high, bp_forced_false,
  // common lines between crates
  input  logic              od1_in, od2_in, od3_in, last_id_in,
  output logic              od1_pull, od2_pull, od3_pull, id_out,
  output logic              is_last, sys_under_test,
  input  logic              modulation_test,
  // high voltage control
  input  logic              hv_freq_100,
  input  logic [15:0]       hv_normal_code, hv_test_code, hv_mod_code,
  output logic              dac_sync_n, dac_sclk, dac_din,
  output logic [7:0]        hv_pos,         // sine sample of the modulation
  output logic              hv_tick,
  output logic [15:0]       hv_offset, hv_modc,
  input  logic              pot_start,
  input  logic [7:0]        pot_value,
  input  logic              pot_sda_in,
  output logic              pot_sda_pull, pot_scl_pull, pot_nack, pot_busy, pot_done,
  // HV monitoring
  input  logic [7:0]        hv_cmp,
  input  logic              mon_clear,
  input  logic              hv_adc_valid,
  input  logic [1:0]        hv_adc_ch,
  input  logic signed [23:0] hv_adc_data,
  output logic [7:0]        hv_cmp_now, hv_cmp_sticky,
  output logic [7:0][15:0]  hv_cmp_events,
  output logic [3:0][24:0]  hv_vpp,
  // HVLF
  input  logic                         log_wr,
  input  logic [$clog2(HVLF_NCH)-1:0]  log_ch,
  input  logic [31:0]                  log_data,
  output logic [$clog2(HVLF_NCH)-1:0]  hvlf_thr_addr,
  input  logic [63:0]                  hvlf_thr_data,
  input  logic [$clog2(HVLF_NCH)-1:0]  hvlf_res_addr,
  output logic                         hvlf_res_pass,
  output logic signed [65:0]           hvlf_res_i, hvlf_res_q,
  output logic                         hvlf_done, hvlf_busy,
  output logic [$clog2(HVLF_NCH+1)-1:0] hvlf_npass,
  // LV monitoring
  input  logic [7:0]        lv_under,
  input  logic              lv_adc_valid,
  input  logic [2:0]        lv_adc_ch,
  input  logic signed [15:0] lv_adc_data,
  input  logic [16:0]       lv_thr,
  output logic [7:0][31:0]  lv_events, lv_time_below,
  output logic [7:0][16:0]  lv_delta,
  output logic [7:0]        lv_ripple
);
  // ---------------- energy -------------------------------------------------
  logic        good_a, crc_a, lost_a, lerr_a, tog_a;
  logic        good_b, crc_b, lost_b, lerr_b, tog_b;
  logic [15:0] en_a, en_b;
  logic        toggle, both_broken;

  energy_frame_rx #(.CLKS_PER_BIT(CLKS_PER_BIT), .FRAME_TIMEOUT(FRAME_TIMEOUT)) u_rx_a (
    .clk, .rst_n, .line_in(cisv_a), .good(good_a), .crc_err(crc_a), .lost(lost_a),
    .link_err(lerr_a), .energy(en_a), .toggle(tog_a));
  energy_frame_rx #(.CLKS_PER_BIT(CLKS_PER_BIT), .FRAME_TIMEOUT(FRAME_TIMEOUT)) u_rx_b (
    .clk, .rst_n, .line_in(cisv_b), .good(good_b), .crc_err(crc_b), .lost(lost_b),
    .link_err(lerr_b), .energy(en_b), .toggle(tog_b));

  energy_selector #(.TOGGLE_TIMEOUT(TOGGLE_TIMEOUT), .CLKS_PER_MS(CLKS_PER_MS)) u_sel (
    .clk, .rst_n,
    .good_a, .crc_err_a(crc_a), .lost_a, .link_err_a(lerr_a), .energy_a(en_a), .toggle_a(tog_a),
    .good_b, .crc_err_b(crc_b), .lost_b, .link_err_b(lerr_b), .energy_b(en_b), .toggle_b(tog_b),
    .clear(energy_cnt_clear), .energy, .err(energy_err), .toggle, .src_b(energy_src_b), .both_broken,
    .counters(energy_counters), .ms_since_clear);

  // beam info from the interlock interface, synchronised
  logic [1:0] info_s1, info_s2;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin info_s1 <= '0; info_s2 <= '0; end
    else begin info_s1 <= {u_info, m_info}; info_s2 <= info_s1; end

  logic       bptc_under_test, bptc_u, bptc_m;
  logic [3:0] bptc_card;
  logic       modulation;
  logic       test_any;

  energy_composer u_comp (
    .clk, .rst_n, .energy, .err(energy_err), .both_broken,
    .test_mode(test_any), .subst_en, .subst_energy,
    .soft_reset(soft_reset_tc), .under_test(sys_under_test),
    .u_info(info_s2[1]), .m_info(info_s2[0]),
    .u_test(bptc_u), .m_test(bptc_m), .card(bptc_card), .word(tc_word));

  blecs_tx #(.CLKS_PER_BIT(CLKS_PER_BIT), .FRAME_PERIOD(FRAME_PERIOD)) u_tx (
    .clk, .rst_n, .word(tc_word), .toggle, .tx_a(tc_link_a), .tx_b(tc_link_b),
    .frame_sent(tc_frame_sent));

  // ---------------- tests and crate lines ----------------------------------
  logic sys_ok, bp_hold_low, last_got_dump, crate_hold_low;
  logic u_comb, m_comb, u_recv, m_recv, perm_q, dump;
  logic seq_bptc_start, seq_mod;
  logic f_u, f_m, f_b;

  assign test_any = sys_under_test || bpl_test_mode;

  bpl_test_ctrl #(.ENTER_DELAY(ENTER_DELAY)) u_bpl (
    .clk, .rst_n, .test_req(bpl_test_req), .u_info(info_s2[1]), .m_info(info_s2[0]),
    .ext_force_u(bpl_force_u), .ext_force_m(bpl_force_m), .ext_sel_b(bpl_sel_b),
    .result_valid(bpl_result_valid), .result_pass(bpl_result_pass),
    .test_mode(bpl_test_mode), .blocked(bpl_blocked),
    .force_u_en(f_u), .force_m_en(f_m), .force_sel_b(f_b), .state_o(bpl_state));

  bptc_sequencer #(.NCARDS(16), .WAIT_TIMEOUT(BPTC_TIMEOUT)) u_bptc (
    .clk, .rst_n, .start(bptc_start || seq_bptc_start), .od3_low(last_got_dump),
    .under_test(bptc_under_test), .u_test(bptc_u), .m_test(bptc_m), .card(bptc_card),
    .done(bptc_done), .pass(bptc_pass), .result(bptc_result));

  // system test: BPTC then HVLF modulation, result to the supervisor
  system_test_seq #(.NCH(HVLF_NCH)) u_seq (
    .clk, .rst_n, .start(systest_start), .bptc_done, .bptc_pass, .hvlf_done,
    .hvlf_npass, .hvlf_expected, .bptc_start(seq_bptc_start), .modulation(seq_mod),
    .busy(systest_busy), .done(systest_done), .pass(systest_pass), .bptc_ok(), .hvlf_ok());

  // dump request: fall of the combined beam permit
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) perm_q <= 1'b0;
    else        perm_q <= u_comb && m_comb;
  assign dump = perm_q && !(u_comb && m_comb);
  // dumps provoked by a test (BPTC, outside line test) do not count as beam
  // dumps for the overdue system test

  test_supervisor #(.CLKS_PER_S(CLKS_PER_S), .NORMAL_S(NORMAL_S), .HIGH_S(HIGH_S)) u_sup (
    .clk, .rst_n, .dump(dump && !test_any), .systest_done, .systest_pass, .cons_wr, .cons_pass,
    .bpbis_wr, .bpbis_pass, .req_normal(systest_req_normal), .req_high(systest_req_high),
    .forced_false(bp_forced_false), .sys_ok, .seconds());

  crate_lines u_lines (
    .clk, .rst_n, .od1_in, .od2_in, .od3_in, .last_id_in,
    .local_test(bptc_under_test), .local_modulation(modulation_test || seq_mod),
    .permit_in_low(!(u_recv && m_recv)),
    .od1_pull, .od2_pull, .od3_pull, .id_out, .is_last, .sys_under_test,
    .modulation, .last_got_dump, .hold_low(crate_hold_low));

  // ---------------- beam permit ----------------------------------------------
  assign bp_hold_low = crate_hold_low || bpl_blocked;

  bp_combiner u_bp (
    .clk, .rst_n, .tc_u, .tc_m, .up_ua, .up_ub, .up_ma, .up_mb, .sys_ok,
    .hold_low(bp_hold_low), .test_mode(bpl_test_mode),
    .force_u_en(f_u), .force_m_en(f_m), .force_sel_b(f_b),
    .u_comb, .m_comb, .u_recv, .m_recv,
    .out_ua(bp_lines[3]), .out_ub(bp_lines[2]), .out_ma(bp_lines[1]), .out_mb(bp_lines[0]));

  bp_line_driver #(.HALF_PERIOD(BP_HALF_PERIOD)) u_drv (
    .clk, .rst_n, .permit(bp_lines), .trig_clk(bp_trig_clk));

  dump_timestamp #(.CLKS_PER_US(CLKS_PER_US), .TURN_TIMEOUT(TURN_TIMEOUT)) u_ts (
    .clk, .rst_n, .permit(u_comb && m_comb), .beam_info(u_info || m_info),
    .pm_freeze, .turn_clk, .rearm(ts_rearm), .dumped(ts_dumped),
    .freeze_seen(ts_freeze_seen), .to_freeze(ts_to_freeze), .info_seen(ts_info_seen),
    .info_after_dump(ts_info_after_dump), .to_info(ts_to_info),
    .turn_count(), .bunch_count(), .turn_frozen(ts_turn), .bunch_frozen(ts_bunch),
    .turn_ok(ts_turn_ok), .turn_missing(ts_turn_missing));

  // ---------------- high voltage ----------------------------------------------

  logic hv_sync_n, hv_sclk, hv_din;

  hv_control #(.SAMPLE_30(SAMPLE_30), .SAMPLE_100(SAMPLE_100)) u_hv (
    .clk, .rst_n, .test_level(sys_under_test), .modulation, .freq_100(hv_freq_100),
    .normal_code(hv_normal_code), .test_code(hv_test_code), .mod_level_code(hv_mod_code),
    .position(hv_pos), .sample_tick(hv_tick), .offset_code(hv_offset), .mod_code(hv_modc),
    .sync_n(hv_sync_n), .sclk(hv_sclk), .din(hv_din));

  // only the last crate before the interlock interface drives the HV; the
  // others keep the DAC bus quiet and only read the monitors
  assign dac_sync_n = hv_sync_n || !is_last;
  assign dac_sclk   = hv_sclk && is_last;
  assign dac_din    = hv_din && is_last;

  digipot_i2c #(.QUARTER(I2C_QUARTER)) u_pot (
    .clk, .rst_n, .start(pot_start), .value(pot_value), .sda_in(pot_sda_in),
    .sda_pull(pot_sda_pull), .scl_pull(pot_scl_pull), .busy(pot_busy), .done(pot_done),
    .nack(pot_nack));

  logic [3:0][23:0]  hv_last;
  hv_monitor #(.WINDOW(MON_WINDOW)) u_hvmon (
    .clk, .rst_n, .cmp(hv_cmp), .clear(mon_clear), .adc_valid(hv_adc_valid),
    .adc_ch(hv_adc_ch), .adc_data(hv_adc_data), .cmp_now(hv_cmp_now),
    .cmp_sticky(hv_cmp_sticky), .cmp_events(hv_cmp_events), .last(hv_last), .vpp(hv_vpp));

  hvlf_processor #(.NCH(HVLF_NCH), .NPOS(HVLF_NPOS)) u_hvlf (
    .clk, .rst_n, .log_wr, .log_ch, .log_data, .sample_tick(hv_tick),
    .cap_pos($clog2(HVLF_NPOS)'(hv_pos - 8'd1)), .hv_v(hv_last[0]),
    .enable(modulation), .thr_addr(hvlf_thr_addr), .thr_data(hvlf_thr_data),
    .res_addr(hvlf_res_addr), .res_pass(hvlf_res_pass), .res_i(hvlf_res_i),
    .res_q(hvlf_res_q), .busy(hvlf_busy), .done(hvlf_done), .npass(hvlf_npass));

  lv_monitor #(.NCH(8), .WINDOW(MON_WINDOW), .CLKS_PER_US(CLKS_PER_US)) u_lvmon (
    .clk, .rst_n, .under(lv_under), .clear(mon_clear), .adc_valid(lv_adc_valid),
    .adc_ch(lv_adc_ch), .adc_data(lv_adc_data), .thr(lv_thr), .events(lv_events),
    .time_below(lv_time_below), .delta(lv_delta), .ripple(lv_ripple));
endmodule
