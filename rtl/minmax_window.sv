// minmax_window: peak-to-peak value of a sample stream over windows of WINDOW
// samples.
//
// Each valid sample updates the running maximum and minimum. After WINDOW
// samples, delta = max - min is published (delta_valid pulses) and a new
// window starts with the next sample. Samples are signed W-bit values.
module minmax_window #(
  parameter int unsigned W      = 24,
  parameter int unsigned WINDOW = 256
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                valid,
  input  logic signed [W-1:0] sample,
  output logic        [W:0]   delta,
  output logic                delta_valid
);
  localparam int unsigned NW = $clog2(WINDOW + 1);
  logic signed [W-1:0] mx, mn, nmx, nmn;
  logic [NW-1:0]       n;

  always_comb begin
    nmx = (n == '0 || sample > mx) ? sample : mx;
    nmn = (n == '0 || sample < mn) ? sample : mn;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mx <= '0; mn <= '0; n <= '0; delta <= '0; delta_valid <= 1'b0;
    end else begin
      delta_valid <= 1'b0;
      if (valid) begin
        mx <= nmx;
        mn <= nmn;
        if (n == NW'(WINDOW - 1)) begin
          n           <= '0;
          delta       <= (W+1)'(nmx) - (W+1)'(nmn);
          delta_valid <= 1'b1;
        end else begin
          n <= n + 1'b1;
        end
      end
    end
  end
endmodule
