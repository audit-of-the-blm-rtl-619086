// hv_control: sets the control voltage of the two chamber HV supplies through
// the 16-bit dual DAC (DAC8532) of the combiner.
//
// DAC channel A gives the offset (working voltage), channel B the modulation,
// which an 8-bit digital potentiometer attenuates (1/100 to 1/500) before an
// analog sum. The offset code depends on the level asked by the common lines:
//   normal            -> normal_code (working voltage, 5 to 6.8 V),
//   test (100 pA)     -> test_code, set as soon as any test starts,
//   modulation        -> mod_level_code, and channel B plays a sine.
// The sine has 256 samples per period; a sample lasts SAMPLE_30 or SAMPLE_100
// clocks for a 30 mHz or a 100 mHz excitation (freq_100 selects). Outside the
// modulation test channel B sits at mid-scale 0x8000 (no modulation, this
// design's choice). On every sample tick, and whenever the offset code changes,
// both channels are rewritten: A first (control byte 0x10, write and update A)
// then B (0x24, write and update B). position is the current sine sample, for
// the correlation of the HVLF test. Only the last combiner drives the HV; on
// the others the DAC is still written, and the board decides what is connected.
module hv_control #(
  parameter int unsigned SAMPLE_30  = 5_208_333,  // 40 MHz * (1/0.03 Hz) / 256
  parameter int unsigned SAMPLE_100 = 1_562_500,  // 40 MHz * (1/0.1 Hz) / 256
  parameter int unsigned SCLK_HALF  = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        test_level,      // a test is running: 100 pA level
  input  logic        modulation,      // modulation test
  input  logic        freq_100,        // 1: 100 mHz, 0: 30 mHz
  input  logic [15:0] normal_code,
  input  logic [15:0] test_code,
  input  logic [15:0] mod_level_code,
  output logic [7:0]  position,
  output logic        sample_tick,
  output logic [15:0] offset_code,
  output logic [15:0] mod_code,
  output logic        sync_n, sclk, din
);
  localparam int unsigned SW = $clog2(SAMPLE_30 + 1);

  // Sine table, offset binary: 0x8000 + round(32767 * sin(2*pi*i/256)).
  typedef logic [15:0] sine_t [256];
  function automatic sine_t make_sine();
    sine_t t;
    for (int i = 0; i < 256; i++)
      t[i] = 16'($rtoi(32768.0 + 32767.0 * $sin(6.283185307179586 * i / 256.0) +
                       ((i >= 128) ? -0.5 : 0.5)));
    return t;
  endfunction
  localparam sine_t SINE = make_sine();

  logic [SW-1:0] scnt;
  logic [15:0]   last_offset;
  logic          pend_a, pend_b, busy, start;
  logic [23:0]   word;

  always_comb begin
    if (modulation)      offset_code = mod_level_code;
    else if (test_level) offset_code = test_code;
    else                 offset_code = normal_code;
  end
  assign mod_code = modulation ? SINE[position] : 16'h8000;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scnt <= '0; position <= '0; sample_tick <= 1'b0;
    end else begin
      sample_tick <= 1'b0;
      if (!modulation) begin
        scnt <= '0; position <= '0;
      end else if (scnt >= (freq_100 ? SW'(SAMPLE_100 - 1) : SW'(SAMPLE_30 - 1))) begin
        scnt <= '0; position <= position + 1'b1; sample_tick <= 1'b1;
      end else begin
        scnt <= scnt + 1'b1;
      end
    end
  end

  // Write sequencer: channel A then channel B.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_a <= 1'b1; pend_b <= 1'b1; last_offset <= '0;
    end else begin
      if (sample_tick || offset_code != last_offset) begin
        pend_a <= 1'b1; pend_b <= 1'b1; last_offset <= offset_code;
      end else if (start) begin
        if (pend_a) pend_a <= 1'b0;
        else        pend_b <= 1'b0;
      end
    end
  end

  assign start = !busy && (pend_a || pend_b) && !(sample_tick || offset_code != last_offset);
  assign word  = pend_a ? {8'h10, offset_code} : {8'h24, mod_code};

  dac8532_spi #(.SCLK_HALF(SCLK_HALF)) u_spi (
    .clk, .rst_n, .start, .word, .busy, .sync_n, .sclk, .din);
endmodule
