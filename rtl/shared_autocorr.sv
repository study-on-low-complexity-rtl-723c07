// shared_autocorr: the auto-correlator shared by packet detection and
// preamble timing detection.
//
// Packet detection (mode AC_PD) correlates one symbol of received samples
// with the samples three symbols later, a lag the carrier-offset estimator
// can share.  Per block X it forms
//     A_X = sum r[i] * conj(r[i + 495])      P_X = sum |r[i + 495]|^2
// over every fourth sample (reduction factor 4) and declares a packet when
// |A|^2 >= thr/256 * P^2 holds for two blocks in a row.
// Preamble timing detection (mode AC_PTD) correlates each sync sequence with
// the one a symbol later, D_Y = sum r[i] * conj(r[i + 165]), and uses the
// dynamic threshold |D_Y + D_Y-1|^2 >= |D_Y-1 + D_Y-2|^2 / 4.  The frame
// sync symbols are the packet sync symbols negated, so the pair (last packet
// sync, first frame sync) gives a negative D and the test fails there: that
// failure is reported as `ptd_fs`, naming Y as the last packet sync symbol.
//
// Datapath: one sample per 132 MHz cycle is picked from the four paths by a
// 4-to-1 multiplexer and written to a circular delay line; the complex
// multiplier combines the sample read back D cycles later with a sample of
// the current cycle, an accumulator sums a block, a squarer forms the
// metric.  A lag of L samples is not a whole number of cycles (495 and 165
// are odd), so the multiplexer looks at a five-sample window (the previous
// cycle's four paths plus path 0 of the current cycle) and each delay-line
// word carries the path it was taken from: the partner sample is then taken
// from the neighbouring window position, which makes the lag exact whatever
// the path selection did in between.  The word also carries the two block
// flags `mark` (sample belongs to the block) and `last` (block ends here)
// that the control unit sets at write time, so blocks are defined on the
// older symbol and evaluated when its partner arrives.
//
// Interface: `start` resets the block history and ignores delay-line words
// written before it; `mode` selects the lag.  Timing: the result of a block
// whose `last` sample was written in cycle t appears in cycle t + D + 3
// (D = 124 for packet detection, 41 for preamble timing) as a one-cycle
// `pd_eval` or `ptd_eval` pulse.
// The lags, the reduction factor, the two-block rule and the shifted
// dynamic threshold follow the text.  The text takes the symbol power from
// the AGC; this block computes it itself, and the fixed-point threshold
// format is this design's own.
module shared_autocorr
  import fsync_pkg::*;
#(
  parameter int unsigned LAG_PD  = 3 * SYM_LEN,
  parameter int unsigned LAG_PTD = SYM_LEN,
  parameter int unsigned THR_F   = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  ac_mode_e        mode,
  input  sample_t         lanes [LANES],
  input  logic [1:0]      sel,
  input  logic            mark,
  input  logic            last,
  input  logic [THR_F-1:0] pd_thr,
  output logic            pd_eval,
  output logic            pd_pass,
  output logic            pd_hit,
  output logic            ptd_eval,
  output logic            ptd_fs,
  output logic signed [17:0] blk_re,
  output logic signed [17:0] blk_im,
  output logic [15:0]     blk_pow
);

  localparam int D_PD   = (LAG_PD  + 2) / 4;
  localparam int D_PTD  = (LAG_PTD + 2) / 4;
  localparam int E_PD   = int'(LAG_PD)  - 4 * D_PD;
  localparam int E_PTD  = int'(LAG_PTD) - 4 * D_PTD;
  localparam int DEPTH  = (D_PD > D_PTD) ? D_PD : D_PTD;
  localparam int AW     = $clog2(DEPTH);
  localparam int ACC_W  = 18;
  localparam int PWR_W  = 16;

  if ((E_PD != 1 && E_PD != -1) || (E_PTD != 1 && E_PTD != -1)) begin : g_lag_check
    $error("shared_autocorr: each lag must be an odd number of samples");
  end

  typedef struct packed {
    sample_t    s;
    logic [1:0] sel;
    logic       mark;
    logic       last;
  } dword_t;

  // ---------------- five-sample window and delay line ----------------
  sample_t prev [LANES];
  sample_t win  [LANES+1];
  always_comb begin
    for (int k = 0; k < LANES; k++) win[k] = prev[k];
    win[LANES] = lanes[0];
  end

  dword_t          dline [DEPTH];
  logic [AW-1:0]   waddr, raddr;
  logic [AW:0]     fill;
  int              dly, eoff;
  logic [2:0]      kw;

  always_comb begin
    dly  = (mode == AC_PTD) ? D_PTD : D_PD;
    eoff = (mode == AC_PTD) ? E_PTD : E_PD;
    kw   = 3'(sel) + ((eoff < 0) ? 3'd1 : 3'd0);
    raddr = (int'(waddr) >= dly) ? AW'(int'(waddr) - dly) : AW'(int'(waddr) + DEPTH - dly);
  end

  always_ff @(posedge clk) begin
    dline[waddr] <= '{s: win[kw], sel: sel, mark: mark, last: last};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      waddr <= '0;
      fill  <= '0;
      for (int k = 0; k < LANES; k++) prev[k] <= '0;
    end else begin
      waddr <= (int'(waddr) == DEPTH - 1) ? '0 : waddr + 1'b1;
      for (int k = 0; k < LANES; k++) prev[k] <= lanes[k];
      if (start)                  fill <= (AW+1)'(1);
      else if (int'(fill) < dly)  fill <= fill + 1'b1;
    end
  end

  // ---------------- complex multiplier ----------------
  dword_t  rd;
  sample_t cur;
  logic    rd_ok;
  logic [2:0] kr;
  logic signed [11:0] p_re, p_im;
  logic [10:0]        p_pow;

  always_comb begin
    rd    = dline[raddr];
    rd_ok = (int'(fill) >= dly) && !start;
    kr    = 3'(int'(rd.sel) + ((eoff < 0) ? 1 : 0) + eoff);
    cur   = win[kr];
    // older * conj(newer)
    p_re  = 12'(rd.s.i * cur.i) + 12'(rd.s.q * cur.q);
    p_im  = 12'(rd.s.q * cur.i) - 12'(rd.s.i * cur.q);
    p_pow = 11'(cur.i * cur.i) + 11'(cur.q * cur.q);
  end

  // ---------------- pipeline: product, accumulate, decide ----------------
  logic                    m1, l1;
  logic signed [11:0]      re1, im1;
  logic [10:0]             pw1;
  logic signed [ACC_W-1:0] acc_re, acc_im;
  logic [PWR_W-1:0]        acc_pw;
  logic                    dv;
  logic signed [ACC_W-1:0] d_re, d_im;
  logic [PWR_W-1:0]        d_pw;

  // history for the decisions
  logic                    pass_prev;
  logic signed [ACC_W-1:0] dprev_re, dprev_im;
  logic [2*ACC_W+1:0]      s_prev;
  logic [1:0]              nblk;

  // decision arithmetic
  logic [2*ACC_W:0]        a_pow;
  logic [2*ACC_W+THR_F:0]  lhs;
  logic [2*PWR_W+THR_F-1:0] rhs;
  logic signed [ACC_W:0]   s_re, s_im;
  logic [2*ACC_W+1:0]      s_pow;
  logic                    pass_now;

  always_comb begin
    a_pow    = (2*ACC_W+1)'(d_re * d_re) + (2*ACC_W+1)'(d_im * d_im);
    lhs      = (2*ACC_W+THR_F+1)'(a_pow) << THR_F;
    rhs      = (2*PWR_W+THR_F)'(pd_thr) * (2*PWR_W+THR_F)'(d_pw) * (2*PWR_W+THR_F)'(d_pw);
    pass_now = (d_pw != '0) && (lhs >= (2*ACC_W+THR_F+1)'(rhs));
    s_re     = (ACC_W+1)'(d_re) + (ACC_W+1)'(dprev_re);
    s_im     = (ACC_W+1)'(d_im) + (ACC_W+1)'(dprev_im);
    s_pow    = (2*ACC_W+2)'(s_re * s_re) + (2*ACC_W+2)'(s_im * s_im);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m1 <= 1'b0; l1 <= 1'b0; re1 <= '0; im1 <= '0; pw1 <= '0;
      acc_re <= '0; acc_im <= '0; acc_pw <= '0;
      dv <= 1'b0; d_re <= '0; d_im <= '0; d_pw <= '0;
      pass_prev <= 1'b0; dprev_re <= '0; dprev_im <= '0; s_prev <= '0; nblk <= '0;
      pd_eval <= 1'b0; pd_pass <= 1'b0; pd_hit <= 1'b0;
      ptd_eval <= 1'b0; ptd_fs <= 1'b0;
      blk_re <= '0; blk_im <= '0; blk_pow <= '0;
    end else if (start) begin
      m1 <= 1'b0; l1 <= 1'b0;
      acc_re <= '0; acc_im <= '0; acc_pw <= '0;
      dv <= 1'b0;
      pass_prev <= 1'b0; nblk <= '0;
      pd_eval <= 1'b0; pd_hit <= 1'b0; ptd_eval <= 1'b0; ptd_fs <= 1'b0;
    end else begin
      // stage 1: product register
      m1  <= rd_ok && rd.mark;
      l1  <= rd_ok && rd.mark && rd.last;
      re1 <= p_re;
      im1 <= p_im;
      pw1 <= p_pow;
      // stage 2: accumulator, dumped at the end of a block
      dv <= 1'b0;
      if (m1) begin
        if (l1) begin
          d_re   <= acc_re + ACC_W'(re1);
          d_im   <= acc_im + ACC_W'(im1);
          d_pw   <= acc_pw + PWR_W'(pw1);
          dv     <= 1'b1;
          acc_re <= '0;
          acc_im <= '0;
          acc_pw <= '0;
        end else begin
          acc_re <= acc_re + ACC_W'(re1);
          acc_im <= acc_im + ACC_W'(im1);
          acc_pw <= acc_pw + PWR_W'(pw1);
        end
      end
      // stage 3: decision
      pd_eval  <= 1'b0;
      pd_hit   <= 1'b0;
      ptd_eval <= 1'b0;
      ptd_fs   <= 1'b0;
      if (dv) begin
        blk_re  <= d_re;
        blk_im  <= d_im;
        blk_pow <= d_pw;
        if (mode == AC_PD) begin
          pd_eval   <= 1'b1;
          pd_pass   <= pass_now;
          pd_hit    <= pass_now && pass_prev;
          pass_prev <= pass_now;
        end else begin
          dprev_re <= d_re;
          dprev_im <= d_im;
          s_prev   <= s_pow;
          if (nblk != 2'd3) nblk <= nblk + 1'b1;
          // needs D_Y, D_Y-1 and D_Y-2
          if (nblk >= 2'd2) begin
            ptd_eval <= 1'b1;
            ptd_fs   <= (s_pow < (s_prev >> 2));
          end
        end
      end
    end
  end

endmodule
