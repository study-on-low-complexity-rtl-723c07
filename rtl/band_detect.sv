// band_detect: dynamic searching window of the multi-band (MB-OFDM)
// synchronizer.  It finds where the 128 useful samples of a sub-band burst
// lie while the RF front end still sits on one sub-band.
//
// Before band detection the receiver stays on sub-band 1, so only one symbol
// in three carries signal: a 128-sample burst every 3 x 165 samples.  The
// sum of |r|^2 over a sliding 128-sample window, S(k) = sum_{n=0..127}
// |r[k+n]|^2, then peaks once per period, at the window that covers the
// burst.  To find that peak the block compares S at two indices M samples
// apart:
//     D(k) = S(k) - S(k-M),   f(k) = (D(k) > 0)   (rising trend)
// and announces a window at k when f is 1 at k-2, k-6, ..., k-30 and 0 at
// k+2, k+6, ..., k+30: a rise on the left and a fall on the right.  Since
// D compares windows M samples apart, the trend changes sign M/2 samples
// after the best window: for a burst that starts at b the pattern is found
// at k = b + M/2 (give or take a sample of noise).  The block reports that
// index k, as the equation defines it, and S(k - M/2), the energy of the
// best window, which the AGC uses as its power measurement.
//
// How it works: four samples arrive per cycle (sample 4t+l on path l).
// Per-sample powers go into a 32-cycle circular buffer, so the power that
// leaves the window (128 samples back, same path) is read as a new one is
// written, and S is updated sample by sample, four times per cycle, from the
// previous cycle's last value.  D takes S from M/4 cycles back on the same
// path.  The flags at k-30 .. k+30 in steps of 4 all lie on one path; each
// path keeps a 16-bit flag history, and a window is found when a history
// reads eight 1s followed by eight 0s.  When windows are found on several
// paths in the same cycle, the earliest index wins.  One burst satisfies
// the pattern at a few neighbouring indices, so after a report further hits
// are ignored for HOLD cycles; each burst gives one report.
//
// Interface: `samp_idx` is the index of lanes[0] in the current cycle and
// must step by 4 each cycle.  `clr` empties the window (powers, sums and
// flags) for a new search.  Timing: the powers of cycle t enter S in cycle
// t+1.  The flag at k+30 belongs to window end k+157, which arrives 157 samples
// after k, so `det_valid` for index k pulses three cycles after the cycle
// that holds sample k+157, together with `det_idx` = k and
// `det_pow` = S(k - M/2).
// Equation, M = 8 and the 16-flag pattern follow the text.  The circular
// power buffer, the full-precision sums and the choice of reporting the
// window start and its energy are this design's own; the text says only that
// the detected index marks the band boundary and that the power estimate
// feeds the AGC.  The fine correction of the boundary by the matched filter
// is left to the surrounding controller.
module band_detect
  import fsync_pkg::*;
#(
  parameter int unsigned M    = 8,  // trend distance in samples; a multiple of 4
  parameter int unsigned HOLD = 8   // cycles without reports after a report
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clr,
  input  idx_t            samp_idx,
  input  sample_t         lanes [LANES],
  output logic            det_valid,
  output idx_t            det_idx,
  output logic [2*ADC_W+$clog2(SEQ_LEN)-1:0] det_pow
);

  localparam int unsigned PW    = 2 * ADC_W;                 // |r|^2 width
  localparam int unsigned SW    = PW + $clog2(SEQ_LEN);      // window sum width
  localparam int unsigned DEPTH = SEQ_LEN / LANES;           // 32 cycles
  localparam int unsigned MC    = M / LANES;                 // trend distance, cycles
  localparam int unsigned NF    = 16;                        // flags per pattern
  localparam int unsigned DPOW  = 30 + M / 2;                // det_pow window end, samples before the newest
  localparam int unsigned HIST  = (DPOW + 3) / LANES + 1;    // cycles of S kept

  if (M % LANES != 0 || M == 0 || MC >= HIST) begin : g_m_check
    $error("band_detect: M must be a non-zero multiple of 4, at most 4*HIST");
  end

  typedef logic [PW-1:0] pow_t;
  typedef logic [SW-1:0] sum_t;

  // ---- per-sample power -------------------------------------------------
  pow_t p_new [LANES];
  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      logic signed [PW-1:0] si, sq;
      si       = PW'(lanes[l].i);
      sq       = PW'(lanes[l].q);
      p_new[l] = pow_t'(si * si) + pow_t'(sq * sq);
    end
  end

  // ---- 32-cycle circular buffer of powers, read before write ------------
  pow_t                     pbuf [DEPTH][LANES];
  logic [$clog2(DEPTH)-1:0] paddr;
  pow_t                     p_cur [LANES];   // stage 1: powers of cycle t-1
  pow_t                     p_old [LANES];   //          and those 128 samples earlier
  idx_t                     idx1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      paddr <= '0;
      idx1  <= '0;
      for (int a = 0; a < DEPTH; a++)
        for (int l = 0; l < LANES; l++) pbuf[a][l] <= '0;
      for (int l = 0; l < LANES; l++) begin
        p_cur[l] <= '0;
        p_old[l] <= '0;
      end
    end else if (clr) begin
      paddr <= '0;
      for (int a = 0; a < DEPTH; a++)
        for (int l = 0; l < LANES; l++) pbuf[a][l] <= '0;
      for (int l = 0; l < LANES; l++) begin
        p_cur[l] <= '0;
        p_old[l] <= '0;
      end
    end else begin
      paddr <= paddr + 1'b1;
      idx1  <= samp_idx;
      for (int l = 0; l < LANES; l++) begin
        pbuf[paddr][l] <= p_new[l];
        p_cur[l]       <= p_new[l];
        p_old[l]       <= pbuf[paddr][l];
      end
    end
  end

  // ---- stage 2: sliding sums, one per sample ----------------------------
  // s_chain[l] is S of the window that ends with sample idx1 + l.
  sum_t s_chain [LANES];
  sum_t s_hist  [HIST][LANES];   // s_hist[0] = last cycle's sums, [1] the one before, ...
  idx_t idx2;

  always_comb begin
    sum_t acc;
    acc = s_hist[0][LANES-1];
    for (int l = 0; l < LANES; l++) begin
      acc        = acc + sum_t'(p_cur[l]) - sum_t'(p_old[l]);
      s_chain[l] = acc;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx2 <= '0;
      for (int h = 0; h < HIST; h++)
        for (int l = 0; l < LANES; l++) s_hist[h][l] <= '0;
    end else if (clr) begin
      for (int h = 0; h < HIST; h++)
        for (int l = 0; l < LANES; l++) s_hist[h][l] <= '0;
    end else begin
      idx2 <= idx1;
      for (int l = 0; l < LANES; l++) s_hist[0][l] <= s_chain[l];
      for (int h = 1; h < HIST; h++) s_hist[h] <= s_hist[h-1];
    end
  end

  // ---- stage 3: trend flags and the 16-flag pattern ---------------------
  // Sum s_hist[0][l] belongs to the window ending at e = idx2 + l, which
  // starts at k = e - 127.  Its trend flag compares with the window M
  // samples earlier, same path, MC cycles back.
  logic [NF-1:0] fhist [LANES];
  logic [NF-1:0] fnext [LANES];
  logic [LANES-1:0] hit;
  logic [$clog2(HOLD+1)-1:0] hold_cnt;

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      fnext[l] = {fhist[l][NF-2:0], (s_hist[0][l] > s_hist[MC][l])};
      hit[l]   = (fnext[l] == {{(NF/2){1'b1}}, {(NF/2){1'b0}}});
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      det_valid <= 1'b0;
      det_idx   <= '0;
      det_pow   <= '0;
      hold_cnt  <= '0;
      for (int l = 0; l < LANES; l++) fhist[l] <= '0;
    end else if (clr) begin
      det_valid <= 1'b0;
      hold_cnt  <= '0;
      for (int l = 0; l < LANES; l++) fhist[l] <= '0;
    end else begin
      for (int l = 0; l < LANES; l++) fhist[l] <= fnext[l];
      det_valid <= 1'b0;
      if (hold_cnt != 0) hold_cnt <= hold_cnt - 1'b1;
      // The newest flag on path l is for k' = idx2 + l - 127 = k + 30, so the
      // window is at k = idx2 + l - 157.  S(k - M/2) belongs to window end
      // idx2 + l - DPOW: path lp = (l - DPOW) mod 4, h = (lp - l + DPOW) / 4
      // cycles back.
      for (int l = LANES - 1; l >= 0; l--) begin
        if (hit[l] && hold_cnt == 0) begin
          det_valid <= 1'b1;
          hold_cnt  <= ($clog2(HOLD+1))'(HOLD);
          det_idx   <= idx_t'(idx2 + idx_t'(l) - idx_t'(SEQ_LEN + 29));
          det_pow   <= s_hist[(((l + 4 * LANES - (DPOW % LANES)) % LANES) - l + DPOW) / LANES]
                             [(l + 4 * LANES - (DPOW % LANES)) % LANES];
        end
      end
    end
  end

endmodule
