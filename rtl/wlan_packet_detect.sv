// wlan_packet_detect: packet detector of the 802.11a frame synchronizer
// (one sample per clock), normalised auto-correlation with a decision
// window.
//
// The 802.11a short preamble repeats every N = 16 samples.  For each new
// sample the detector forms, over the last PAIRS x N = 48 lagged products
// (three short-symbol pairs),
//     C = sum r[i-16] * conj(r[i]),    P = sum |r[i]|^2
// and a value passes when |C|^2 * 256 >= thr * P^2 (P > 0), thr in units of
// 1/256.  The comparison is independent of the received power, so it works
// before the AGC has settled.  The first passing value opens a decision
// window.  The packet is announced only if all of the next DWIN values pass
// too; one failing value cancels the candidate and the search starts again.
// After an announcement the detector waits for `rearm`.
//
// Datapath: a 64-sample shift register.  The running sums add the product
// of the newest pair and subtract the product of the pair that leaves the
// 48-product window, so nothing but samples is stored.
// Interface: one sample per `in_valid`.  `detect` pulses with `det_idx`, the
// number of the sample that completed the decision window (numbering starts
// at 0 after reset).  `cand` is high while a decision window is open, and
// `cancel` pulses when one fails.  Timing: the pass/fail of sample i's
// value is known two cycles after the cycle that brings sample i, and
// `detect` and `cancel` follow one cycle later.
// Lag 16, the three short-symbol pairs, the normalisation and the
// decision-window rule follow the text.  The way the three pairs are
// combined (one 48-product sum), the window length DWIN = 32, the sample
// width and the threshold format are this design's own.
module wlan_packet_detect #(
  parameter int unsigned DW    = 8,    // sample width (I and Q, signed)
  parameter int unsigned N     = 16,   // short symbol period, samples
  parameter int unsigned PAIRS = 3,    // short-symbol pairs summed
  parameter int unsigned DWIN  = 32    // decision window, values
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_re,
  input  logic signed [DW-1:0] in_im,
  input  logic [7:0]           thr,
  input  logic                 rearm,
  output logic                 detect,
  output logic [15:0]          det_idx,
  output logic                 cand,
  output logic                 cancel
);

  localparam int unsigned L   = PAIRS * N;          // products per sum
  localparam int unsigned D   = L + N;              // samples held
  localparam int unsigned PRW = 2 * DW + 1;         // one product part
  localparam int unsigned SW  = PRW + $clog2(L) + 1;

  typedef logic signed [DW-1:0] smp_t;
  typedef logic signed [SW-1:0] sum_t;

  // sh[0] is the newest sample, sh[D-1] the oldest
  smp_t sh_re [D];
  smp_t sh_im [D];
  logic [$clog2(D+1)-1:0] fill;
  logic [15:0] cnt;

  // products of the new pair (r[i-16], r[i]) and of the leaving pair
  // (r[i-64], r[i-48]); |r|^2 of r[i] and of r[i-48]
  sum_t c_re_in, c_im_in, c_re_out, c_im_out, p_in, p_out;
  always_comb begin
    smp_t a_re, a_im, b_re, b_im;
    a_re = sh_re[N-1];  a_im = sh_im[N-1];   // r[i-16], once in_re is shifted in as r[i]
    b_re = in_re;       b_im = in_im;
    c_re_in  = sum_t'(a_re * b_re) + sum_t'(a_im * b_im);
    c_im_in  = sum_t'(a_im * b_re) - sum_t'(a_re * b_im);
    p_in     = sum_t'(b_re * b_re) + sum_t'(b_im * b_im);
    a_re = sh_re[D-1];  a_im = sh_im[D-1];   // r[i-64]
    b_re = sh_re[L-1];  b_im = sh_im[L-1];   // r[i-48]
    c_re_out = sum_t'(a_re * b_re) + sum_t'(a_im * b_im);
    c_im_out = sum_t'(a_im * b_re) - sum_t'(a_re * b_im);
    p_out    = sum_t'(b_re * b_re) + sum_t'(b_im * b_im);
  end

  sum_t c_re, c_im, p_sum;
  logic v1;
  logic [15:0] idx1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill  <= '0;
      cnt   <= '0;
      c_re  <= '0;
      c_im  <= '0;
      p_sum <= '0;
      v1    <= 1'b0;
      idx1  <= '0;
      for (int k = 0; k < D; k++) begin
        sh_re[k] <= '0;
        sh_im[k] <= '0;
      end
    end else begin
      v1 <= 1'b0;
      if (in_valid) begin
        sh_re[0] <= in_re;
        sh_im[0] <= in_im;
        for (int k = 1; k < D; k++) begin
          sh_re[k] <= sh_re[k-1];
          sh_im[k] <= sh_im[k-1];
        end
        // before the line is full the leaving samples are the reset zeros
        c_re  <= c_re + c_re_in - c_re_out;
        c_im  <= c_im + c_im_in - c_im_out;
        p_sum <= p_sum + p_in - p_out;
        cnt   <= cnt + 1'b1;
        idx1  <= cnt;
        if (fill != ($clog2(D+1))'(D)) fill <= fill + 1'b1;
        v1    <= (fill >= ($clog2(D+1))'(D - 1));
      end
    end
  end

  // ---- stage 2: normalised comparison --------------------------------------
  logic        v2, pass2;
  logic [15:0] idx2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2    <= 1'b0;
      pass2 <= 1'b0;
      idx2  <= '0;
    end else begin
      v2    <= v1;
      idx2  <= idx1;
      pass2 <= (p_sum != '0) &&
               ((2*SW+8)'(c_re * c_re + c_im * c_im) << 8 >= (2*SW+8)'(thr) * (2*SW+8)'(p_sum * p_sum));
    end
  end

  // ---- stage 3: decision window --------------------------------------------
  typedef enum logic [1:0] {PD_IDLE, PD_WIN, PD_DONE} pd_state_e;
  pd_state_e st;
  logic [$clog2(DWIN+1)-1:0] wcnt;

  assign cand = (st == PD_WIN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= PD_IDLE;
      wcnt    <= '0;
      detect  <= 1'b0;
      cancel  <= 1'b0;
      det_idx <= '0;
    end else begin
      detect <= 1'b0;
      cancel <= 1'b0;
      case (st)
        PD_IDLE: if (v2 && pass2) begin
          st   <= PD_WIN;
          wcnt <= '0;
        end
        PD_WIN: if (v2) begin
          if (!pass2) begin
            st     <= PD_IDLE;
            cancel <= 1'b1;
          end else if (wcnt == ($clog2(DWIN+1))'(DWIN - 1)) begin
            st      <= PD_DONE;
            detect  <= 1'b1;
            det_idx <= idx2;
          end else begin
            wcnt <= wcnt + 1'b1;
          end
        end
        default: if (rearm) st <= PD_IDLE;
      endcase
    end
  end

endmodule
