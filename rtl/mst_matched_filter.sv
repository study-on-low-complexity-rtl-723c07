// mst_matched_filter: low-complexity cross-correlator for FFT window
// detection in an IEEE 802.11a receiver (one sample per clock).
//
// A full detector correlates the last 64 received samples with the 64
// time-domain samples C_n of the 802.11a long training symbol.  This one
// keeps only the N_TAPS coefficients of largest magnitude (most-significant
// taps) and rounds each of their real and imaginary parts to the nearest of
// {0, +-2^-3, +-2^-4, +-2^-5, +-2^-6}, so every multiplier becomes a shift:
//     Delta(k) = | sum_{m=1..N_TAPS} R[k + S[m]] * conj(Q[S[m]]) |^2
// with S the tap positions sorted by decreasing |C| (1-based positions
// 1..64 of the 64-sample window; position p holds R[k + p - 1]).
//
// Coefficients: C_n = (1/64) sum_{k=-26..26} L_k exp(j 2 pi k n / 64), the
// long training symbol of the 802.11a standard (L_k its +-1 subcarrier
// values, L_0 = 0), computed at elaboration; Q is held in units of 2^-6
// ({0, +-1, +-2, +-4, +-8}).  The sorted positions are those of the text's
// index-sorting matrix.  The magnitudes come in equal pairs; the order
// within a pair is the text's.  Position 56, absent from the printed list,
// takes its place by magnitude (62nd, between 10 and 5).  N_TAPS = 16 is the
// tap count the text settles on; 20 is the count it prefers for long delay
// spreads, and any count up to the full 64 can be set.  The accumulator is
// DW+8 bits for up to 20 taps and DW+10 bits above that (the sum of the
// quantised coefficient magnitudes is 216 for 20 taps and 536 for 64).
//
// Datapath: a 64-sample shift register (only the N_TAPS tapped positions
// feed logic), shift-and-add complex products, an adder tree, a squarer.
// Interface: `in_valid`/`in_re`/`in_im` bring one sample per cycle.
// Timing: `out_valid` and `power` follow two cycles after the sample that
// completes the window; `out_idx` counts input samples and gives the
// index k of the window's first sample (sample numbering starts at 0 after
// reset).  The sample width (8 bits) is this design's own choice; the text
// does not give the 802.11a converter width.
module mst_matched_filter #(
  parameter int unsigned DW     = 8,    // sample width (I and Q, signed)
  parameter int unsigned N_TAPS = 16,   // most-significant taps used, 1..64
  localparam int unsigned AW    = DW + ((N_TAPS <= 20) ? 8 : 10)   // accumulator width
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DW-1:0]     in_re,
  input  logic signed [DW-1:0]     in_im,
  output logic                     out_valid,
  output logic [15:0]              out_idx,
  output logic [2*AW-1:0]          power
);

  localparam int unsigned WIN = 64;

  if (N_TAPS < 1 || N_TAPS > 64) begin : g_taps_check
    $error("mst_matched_filter: N_TAPS must lie in 1..64");
  end

  // tap positions, largest |C| first (1-based)
  localparam int SORTED [64] = '{15, 51, 1, 33, 25, 41, 30, 36, 46, 20, 54, 12, 35, 31, 39, 27,
                                 59, 7, 62, 4, 45, 21, 26, 40, 2, 64, 16, 50, 3, 63, 55, 11,
                                 8, 58, 60, 6, 28, 38, 48, 18, 43, 23, 57, 9, 34, 32, 49, 17,
                                 44, 22, 19, 47, 53, 13, 14, 52, 42, 24, 37, 29, 10, 56, 5, 61};

  // 802.11a long training symbol, subcarriers -26..26
  localparam logic [52:0] LTS_POS = 53'b1100_1101_0111_1110_0110_1011_1101_0011_0101_0000_0110_0101_0111_1;
  localparam logic [52:0] LTS_USED = {{26{1'b1}}, 1'b0, {26{1'b1}}};

  // quantised coefficient in units of 2^-6; im selects the imaginary part
  function automatic int qcoef(input int n, input bit im);
    real acc, mag, pi;
    int  q;
    pi  = 3.14159265358979323846;
    acc = 0.0;
    for (int k = -26; k <= 26; k++) begin
      real l;
      if (LTS_USED[52 - (k + 26)]) begin
        l   = LTS_POS[52 - (k + 26)] ? 1.0 : -1.0;
        acc = acc + l * (im ? $sin(2.0 * pi * k * n / 64.0) : $cos(2.0 * pi * k * n / 64.0));
      end
    end
    acc = acc / 64.0;
    mag = (acc < 0.0) ? -acc : acc;
    // nearest of 0, 1/64, 1/32, 1/16, 1/8
    if (mag < 0.5 / 64.0)       q = 0;
    else if (mag < 1.5 / 64.0)  q = 1;
    else if (mag < 3.0 / 64.0)  q = 2;
    else if (mag < 6.0 / 64.0)  q = 4;
    else                        q = 8;
    return (acc < 0.0) ? -q : q;
  endfunction

  typedef int qtab_t [64];

  // quantised coefficients of the sorted taps, real (im = 0) or imaginary part
  function automatic qtab_t qtable(input bit im);
    qtab_t t;
    for (int m = 0; m < 64; m++) t[m] = qcoef(SORTED[m] - 1, im);
    return t;
  endfunction

  localparam qtab_t QRE = qtable(1'b0);
  localparam qtab_t QIM = qtable(1'b1);

  // products with a power-of-two coefficient: shift and negate
  function automatic logic signed [AW-1:0] pmul(input logic signed [DW-1:0] x, input int q);
    logic signed [AW-1:0] xe;
    xe = AW'(x);
    case (q)
      1:  return xe;
      2:  return xe <<< 1;
      4:  return xe <<< 2;
      8:  return xe <<< 3;
      -1: return -xe;
      -2: return -(xe <<< 1);
      -4: return -(xe <<< 2);
      -8: return -(xe <<< 3);
      default: return '0;
    endcase
  endfunction

  // ---- window shift register: win_*[p-1] holds R[k + p - 1] --------------
  logic signed [DW-1:0] win_re [WIN];
  logic signed [DW-1:0] win_im [WIN];
  logic [6:0]           fill;
  logic [15:0]          cnt;
  logic                 shifted;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill    <= '0;
      cnt     <= '0;
      shifted <= 1'b0;
      for (int p = 0; p < WIN; p++) begin
        win_re[p] <= '0;
        win_im[p] <= '0;
      end
    end else begin
      shifted <= in_valid;
      if (in_valid) begin
        for (int p = 0; p < WIN - 1; p++) begin
          win_re[p] <= win_re[p+1];
          win_im[p] <= win_im[p+1];
        end
        win_re[WIN-1] <= in_re;
        win_im[WIN-1] <= in_im;
        cnt           <= cnt + 1'b1;
        if (fill != 7'(WIN)) fill <= fill + 1'b1;
      end
    end
  end

  // ---- stage 1: complex correlation, R * conj(Q) -------------------------
  logic signed [AW-1:0] sum_re_c, sum_im_c, sum_re, sum_im;
  logic                 v1;
  logic [15:0]          idx1;

  always_comb begin
    sum_re_c = '0;
    sum_im_c = '0;
    for (int m = 0; m < N_TAPS; m++) begin
      // (a + jb)(qr - j qi) = a qr + b qi + j (b qr - a qi)
      sum_re_c = sum_re_c + pmul(win_re[SORTED[m] - 1], QRE[m]) + pmul(win_im[SORTED[m] - 1], QIM[m]);
      sum_im_c = sum_im_c + pmul(win_im[SORTED[m] - 1], QRE[m]) - pmul(win_re[SORTED[m] - 1], QIM[m]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1     <= 1'b0;
      idx1   <= '0;
      sum_re <= '0;
      sum_im <= '0;
    end else begin
      // a new window is ready after a shift that completed 64 samples
      v1     <= shifted && (fill == 7'(WIN));
      idx1   <= cnt - 16'(WIN);
      sum_re <= sum_re_c;
      sum_im <= sum_im_c;
    end
  end

  // ---- stage 2: power ----------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_idx   <= '0;
      power     <= '0;
    end else begin
      out_valid <= v1;
      out_idx   <= idx1;
      power     <= (2*AW)'(sum_re * sum_re) + (2*AW)'(sum_im * sum_im);
    end
  end

endmodule
