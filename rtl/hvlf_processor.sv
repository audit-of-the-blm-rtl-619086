// hvlf_processor: on-board evaluation of the HVLF test (connection of every
// chamber from the HV supply to the processing card), run during the HV
// modulation.
//
// The HV is modulated with a sine of 256 samples per period. The chambers are
// capacitors, so each connected channel's running maximum (the logged value of
// the processing card) follows the modulation.
// Data path:
//  * RAM1 (NCH x 32 bit) holds the latest running maximum of every channel, written
//    by every logging read of the processing cards (log_wr).
//  * On each sample tick, the position p whose sample just ended (cap_pos) is
//    captured: RAM1 is copied, channel by channel, into RAM2[ch][p]
//    (NCH x NPOS x 32 bit, one modulation cycle), and the monitored HV voltage
//    is stored as REF[p], the real excitation signal.
//  * When position NPOS-1 has been captured and enable is high, the channels
//    are processed one after the other. First the mean of REF is removed. Then
//    for each channel two correlations are summed over the cycle:
//        I = sum_p x[p] * (REF[p] - mean)
//        Q = sum_p x[p] * (REF[(p + NPOS/4) mod NPOS] - mean)   (90 degrees)
//    The amplitude estimate |I| + |Q| (independent of phase) is compared with
//    the channel's threshold read from the external non-volatile memory
//    (thr_addr/thr_data, data valid one clock after the address).
//  * The result memory keeps {pass, I, Q} per channel, read via res_addr
//    (one clock). npass counts passing channels; done pulses at the end.
// Processing takes about NPOS + NCH*(NPOS+3) clocks (65.5k clocks, 1.6 ms at
// 40 MHz), well inside one sample period, so capture never collides with it.
// The figure gives the blocks (RAMs, excitation, phase and gain tracking,
// thresholds, store); the correlation arithmetic is this design's own. The
// amplitude estimate is 67 bits wide, thresholds 64 bits (sign-extended).
module hvlf_processor #(
  parameter int unsigned NCH  = 256,
  parameter int unsigned NPOS = 256
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     log_wr,
  input  logic [$clog2(NCH)-1:0]   log_ch,
  input  logic [31:0]              log_data,
  input  logic                     sample_tick,
  input  logic [$clog2(NPOS)-1:0]  cap_pos,
  input  logic signed [23:0]       hv_v,
  input  logic                     enable,
  output logic [$clog2(NCH)-1:0]   thr_addr,
  input  logic [63:0]              thr_data,
  input  logic [$clog2(NCH)-1:0]   res_addr,
  output logic                     res_pass,
  output logic signed [65:0]       res_i,
  output logic signed [65:0]       res_q,
  output logic                     busy,
  output logic                     done,
  output logic [$clog2(NCH+1)-1:0] npass
);
  localparam int unsigned CB = $clog2(NCH);
  localparam int unsigned PB = $clog2(NPOS);
  localparam int unsigned AW = 66;
  typedef logic signed [AW-1:0] acc_t;
  typedef struct packed { logic pass; acc_t i; acc_t q; } res_t;

  logic [31:0]        ram1 [NCH];
  logic [31:0]        ram2 [NCH*NPOS];
  logic signed [23:0] refv [NPOS];
  res_t               resm [NCH];

  typedef enum logic [2:0] {IDLE, CAP, MEAN, MAC, FIN} state_t;
  state_t state;

  // ---- RAM1: logging writes, capture reads ------------------------------
  logic [CB-1:0] cap_ch, cap_ch_d;
  logic [PB-1:0] pos_q;
  logic          cap_rd, cap_wr;
  logic [31:0]   ram1_q;
  always_ff @(posedge clk) begin
    if (log_wr) ram1[log_ch] <= log_data;
    ram1_q <= ram1[cap_ch];
  end

  // ---- RAM2: capture writes, processing reads ----------------------------
  logic [CB-1:0] mac_ch;
  logic [PB-1:0] mac_p;
  logic [31:0]   ram2_q;
  always_ff @(posedge clk) begin
    if (cap_wr) ram2[{cap_ch_d, pos_q}] <= ram1_q;
    ram2_q <= ram2[{mac_ch, mac_p}];
  end

  always_ff @(posedge clk)
    if (state == IDLE && sample_tick) refv[cap_pos] <= hv_v;

  // ---- control ------------------------------------------------------------
  logic signed [PB+24:0] ref_sum;
  logic signed [24:0]    mean;
  logic [PB-1:0]         mean_p;
  logic                  v1, last1;       // pipeline stage 1 valid / last position
  logic signed [25:0]    ri1, rq1;        // centred reference values
  acc_t                  acc_i, acc_q, nxt_i, nxt_q, amp;
  logic signed [58:0]    pi, pq;
  logic                  fin_wr;
  res_t                  fin_res;

  assign cap_rd = (state == CAP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; cap_ch <= '0; cap_ch_d <= '0; cap_wr <= 1'b0; pos_q <= '0;
      ref_sum <= '0; mean <= '0; mean_p <= '0; mac_ch <= '0; mac_p <= '0;
      v1 <= 1'b0; last1 <= 1'b0; ri1 <= '0; rq1 <= '0; done <= 1'b0;
    end else begin
      done     <= 1'b0;
      cap_wr   <= cap_rd;
      cap_ch_d <= cap_ch;
      v1       <= 1'b0;
      case (state)
        IDLE: if (sample_tick) begin
          pos_q <= cap_pos; cap_ch <= '0; state <= CAP;
        end
        CAP: begin
          if (cap_ch == CB'(NCH - 1)) begin
            if (pos_q == PB'(NPOS - 1) && enable) begin
              state <= MEAN; ref_sum <= '0; mean_p <= '0;
            end else state <= IDLE;
          end else cap_ch <= cap_ch + 1'b1;
        end
        MEAN: begin
          ref_sum <= ref_sum + (PB+25)'(refv[mean_p]);
          if (mean_p == PB'(NPOS - 1)) begin
            state <= MAC; mac_ch <= '0; mac_p <= '0;
          end
          mean_p <= mean_p + 1'b1;
        end
        MAC: begin
          if (mac_p == '0 && mac_ch == '0)
            mean <= 25'(ref_sum >>> PB);
          v1    <= 1'b1;
          last1 <= (mac_p == PB'(NPOS - 1));
          ri1   <= 26'(refv[mac_p]);
          rq1   <= 26'(refv[mac_p + PB'(NPOS / 4)]);
          if (mac_p == PB'(NPOS - 1)) begin
            if (mac_ch == CB'(NCH - 1)) state <= FIN;
            else mac_ch <= mac_ch + 1'b1;
          end
          mac_p <= mac_p + 1'b1;
        end
        FIN: if (!v1 && !fin_wr) begin
          state <= IDLE; done <= 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // Stage 2: multiply-accumulate on the RAM2 data of stage 1.
  logic signed [25:0] di, dq;
  logic signed [32:0] xs;
  assign di    = ri1 - 26'(mean);
  assign dq    = rq1 - 26'(mean);
  assign xs    = $signed({1'b0, ram2_q});
  assign pi    = 59'(xs) * 59'(di);
  assign pq    = 59'(xs) * 59'(dq);
  assign nxt_i = acc_i + AW'(pi);
  assign nxt_q = acc_q + AW'(pq);
  assign amp   = (nxt_i < 0 ? -nxt_i : nxt_i) + (nxt_q < 0 ? -nxt_q : nxt_q);

  logic [CB-1:0] res_ch;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_i <= '0; acc_q <= '0; fin_wr <= 1'b0; fin_res <= '0; res_ch <= '0; npass <= '0;
    end else begin
      fin_wr <= 1'b0;
      if (state == MEAN) npass <= '0;
      if (v1) begin
        if (last1) begin
          acc_i   <= '0;
          acc_q   <= '0;
          fin_wr  <= 1'b1;
          fin_res <= '{pass: (amp >= AW'($signed(thr_data))), i: nxt_i, q: nxt_q};
        end else begin
          acc_i <= nxt_i;
          acc_q <= nxt_q;
        end
      end
      if (fin_wr) begin
        res_ch <= res_ch + 1'b1;
        if (fin_res.pass) npass <= npass + 1'b1;
      end
      if (state == MEAN) res_ch <= '0;
    end
  end

  // Threshold of the channel in stage 1, addressed one clock ahead.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) thr_addr <= '0;
    else if (state == MEAN) thr_addr <= '0;
    else if (v1 && last1) thr_addr <= thr_addr + 1'b1;

  always_ff @(posedge clk) begin
    if (fin_wr) resm[res_ch] <= fin_res;
    {res_pass, res_i, res_q} <= resm[res_addr];
  end

  assign busy = (state != IDLE);
endmodule
