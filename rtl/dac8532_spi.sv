// dac8532_spi: writes one 24-bit command word to a DAC8532 dual 16-bit DAC.
//
// A word is an 8-bit control byte followed by the 16-bit code, MSB first. sync_n
// goes low for the 24 bits; data changes after the rising edge of sclk and is
// stable at the falling edge, where the DAC samples it. SCLK_HALF clocks per
// half period of sclk (2 gives 10 MHz at 40 MHz). One word takes
// 48*SCLK_HALF + 2 clocks; busy is high meanwhile and start is ignored.
module dac8532_spi #(
  parameter int unsigned SCLK_HALF = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [23:0] word,
  output logic        busy,
  output logic        sync_n,
  output logic        sclk,
  output logic        din
);
  localparam int unsigned HW = $clog2(SCLK_HALF + 1);
  logic [23:0]   sh;
  logic [4:0]    nbit;
  logic [HW-1:0] hcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '0; nbit <= '0; hcnt <= '0; busy <= 1'b0; sync_n <= 1'b1; sclk <= 1'b0; din <= 1'b0;
    end else if (!busy) begin
      sclk <= 1'b0;
      if (start) begin
        busy <= 1'b1; sync_n <= 1'b0; sh <= word; nbit <= '0; hcnt <= '0;
        sclk <= 1'b1; din <= word[23];
      end
    end else if (hcnt == HW'(SCLK_HALF - 1)) begin
      hcnt <= '0;
      if (sclk) begin
        sclk <= 1'b0;                        // DAC samples din here
      end else if (nbit == 5'd23) begin
        busy <= 1'b0; sync_n <= 1'b1;
      end else begin
        sclk <= 1'b1;
        sh   <= {sh[22:0], 1'b0};
        din  <= sh[22];
        nbit <= nbit + 1'b1;
      end
    end else begin
      hcnt <= hcnt + 1'b1;
    end
  end
endmodule
