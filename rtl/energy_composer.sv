// energy_composer: converts the 16-bit beam energy to the 5-bit level of the BLM
// system and builds the 16-bit composite word for the processing cards.
//
// The conversion is linear and fixed: level = energy[15:11], so 0xFFFF gives the
// highest level 31 (32 levels of 2048 counts each; the linear mapping is given,
// the exact division is this design's reading of it). In test mode a
// substitute 16-bit energy value replaces the received one. The other fields
// come straight from their sources: error bit, soft reset, system under test,
// the two beam infos of the interlock interface and the BPL test fields. When
// the toggle bit has timed out while both links are broken, the whole word is
// the broken-link state (energy 31, error 1, both beam infos 1, rest 0).
// The word is registered: one clock of latency.
module energy_composer
  import blecs_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] energy,
  input  logic        err,
  input  logic        both_broken,
  input  logic        test_mode,
  input  logic        subst_en,
  input  logic [15:0] subst_energy,
  input  logic        soft_reset,
  input  logic        under_test,
  input  logic        u_info,
  input  logic        m_info,
  input  logic        u_test,
  input  logic        m_test,
  input  logic [3:0]  card,
  output composite_t  word
);
  logic [15:0] e;
  composite_t  w;

  always_comb begin
    e = (test_mode && subst_en) ? subst_energy : energy;
    w.energy     = e[15:11];
    w.err        = err;
    w.soft_reset = soft_reset;
    w.under_test = under_test;
    w.u_info     = u_info;
    w.m_info     = m_info;
    w.u_test     = u_test;
    w.m_test     = m_test;
    w.card       = card;
    if (err && both_broken) w = BROKEN_LINK;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) word <= BROKEN_LINK;
    else        word <= w;
endmodule
