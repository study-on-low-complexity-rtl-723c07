// tb_shared_autocorr: drives the auto-correlator the way the control unit
// does, first in packet-detection mode (blocks of 42 marked cycles, path
// select rotating every 10 cycles) and then in preamble-timing mode (windows
// of 32 marked cycles with a random path select per window).  The stream is
// random with a stretch that repeats every 495 samples (so packet detection
// passes) and a stretch that repeats every 165 samples with one sign flip
// (so the dynamic threshold trips).  For every block the reference computes
// sum older*conj(newer) and the newer power from the stream at the exact
// sample lag, and the decisions from those sums; values, decisions and the
// result cycle (last write + delay + 3) are checked.
module tb_shared_autocorr;
  timeunit 1ns;
  timeprecision 100ps;
  import fsync_pkg::*;

  localparam int NCYC   = 3000;
  localparam int NS     = 4 * NCYC + 8;
  localparam int PTD_AT = 1700;     // cycle at which preamble timing mode starts

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic start = 0, mark = 0, last = 0;
  ac_mode_e mode = AC_PD;
  sample_t lanes [LANES];
  logic [1:0] sel = 0;
  logic [7:0] pd_thr = 8'd128;
  logic pd_eval, pd_pass, pd_hit, ptd_eval, ptd_fs;
  logic signed [17:0] blk_re, blk_im;
  logic [15:0] blk_pow;

  shared_autocorr dut (.*);

  int ri [NS], rq [NS];
  int t = 0;
  int checks = 0, failures = 0;

  typedef struct { int cyc; longint re, im, pw; } blk_t;
  blk_t exp_q [$];
  longint acc_re, acc_im, acc_pw;
  int n_pass = 0, n_hit = 0, n_fs = 0, n_ptd = 0;

  always_comb
    for (int p = 0; p < LANES; p++) begin
      lanes[p].i = 5'(ri[4 * t + p]);
      lanes[p].q = 5'(rq[4 * t + p]);
    end

  // reference decisions
  bit     prev_pass;
  longint dprev_re, dprev_im, sprev;
  int     nblk;

  task automatic check_block(input bit is_pd);
    blk_t e;
    bit ok;
    checks++;
    if (exp_q.size() == 0) begin
      failures++; $display("FAIL t=%0d: unexpected result", t); return;
    end
    e = exp_q.pop_front();
    ok = (e.cyc == t) && (longint'(blk_re) == e.re) && (longint'(blk_im) == e.im) && (longint'(blk_pow) == e.pw);
    if (!ok) begin
      failures++;
      $display("FAIL t=%0d (exp %0d): got %0d %0d %0d expected %0d %0d %0d", t, e.cyc,
               blk_re, blk_im, blk_pow, e.re, e.im, e.pw);
    end
    if (is_pd) begin
      bit pass;
      pass = (e.pw != 0) && ((e.re * e.re + e.im * e.im) * 256 >= longint'(pd_thr) * e.pw * e.pw);
      checks++;
      if (pd_pass != pass || pd_hit != (pass && prev_pass)) begin
        failures++; $display("FAIL t=%0d: pass %0b/%0b hit %0b", t, pd_pass, pass, pd_hit);
      end
      if (pass) n_pass++;
      if (pass && prev_pass) n_hit++;
      prev_pass = pass;
    end else begin
      longint s_re, s_im, s;
      s_re = e.re + dprev_re;
      s_im = e.im + dprev_im;
      s = s_re * s_re + s_im * s_im;
      if (nblk >= 2) begin
        checks++;
        if (!ptd_eval || ptd_fs != (s < (sprev >>> 2))) begin
          failures++; $display("FAIL t=%0d: ptd_fs %0b", t, ptd_fs);
        end
        n_ptd++;
        if (ptd_fs) n_fs++;
      end else begin
        checks++;
        if (ptd_eval) begin failures++; $display("FAIL t=%0d: early ptd_eval", t); end
      end
      dprev_re = e.re; dprev_im = e.im; sprev = s; nblk++;
    end
  endtask

  initial begin
    int blk, hold, win_left, gap, ws, lag, dly, kw;
    for (int n = 0; n < NS; n++) begin
      ri[n] = $urandom_range(31) - 16;
      rq[n] = $urandom_range(31) - 16;
    end
    // packet-detection stretch: period 495
    for (int n = 2000; n < 5000; n++) begin ri[n] = ri[n - 495]; rq[n] = rq[n - 495]; end
    // preamble stretch: period 165, negated from sample 8000 on
    for (int n = 6600; n < NS; n++) begin
      int s;
      s = (n >= 8000 && n < 8165) ? -1 : 1;
      ri[n] = s * ri[n - 165]; rq[n] = s * rq[n - 165];
      if (ri[n] > 15) ri[n] = 15;
      if (rq[n] > 15) rq[n] = 15;
    end
    prev_pass = 0; nblk = 0; dprev_re = 0; dprev_im = 0; sprev = 0;
    acc_re = 0; acc_im = 0; acc_pw = 0;
    blk = 0; hold = 0; win_left = 0; gap = 0; ws = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (t = 1; t < NCYC; ) begin
      // results visible in this cycle
      if (pd_eval) check_block(1);
      if (mode == AC_PTD && (ptd_eval || (exp_q.size() > 0 && exp_q[0].cyc == t))) check_block(0);
      else if (exp_q.size() > 0 && exp_q[0].cyc == t) check_block(mode == AC_PD);
      // controls for this cycle
      start = (t == 1) || (t == PTD_AT);
      if (t == PTD_AT) begin
        mode = AC_PTD; nblk = 0; exp_q.delete(); acc_re = 0; acc_im = 0; acc_pw = 0;
      end
      mark = 0; last = 0;
      if (mode == AC_PD && t >= 2) begin
        mark = 1;
        last = (blk == 41);
        blk  = (blk + 1) % 42;
        if (hold == 9) begin sel = sel + 1; hold = 0; end else hold++;
        lag = 495; dly = 124; kw = sel + 1;
      end else if (mode == AC_PTD) begin
        if (win_left == 0 && gap == 0) begin
          win_left = 32; gap = 41 + $urandom_range(1); sel = 2'($urandom);
        end
        if (win_left > 0) begin
          mark = 1; last = (win_left == 1); win_left--;
        end
        if (gap > 0) gap--;
        lag = 165; dly = 41; kw = sel;
      end
      if (mark) begin
        int iw;
        iw = 4 * (t - 1) + kw;
        acc_re += ri[iw] * ri[iw + lag] + rq[iw] * rq[iw + lag];
        acc_im += rq[iw] * ri[iw + lag] - ri[iw] * rq[iw + lag];
        acc_pw += ri[iw + lag] * ri[iw + lag] + rq[iw + lag] * rq[iw + lag];
        if (last) begin
          blk_t e;
          e.cyc = t + dly + 3; e.re = acc_re; e.im = acc_im; e.pw = acc_pw;
          // blocks that end before the mode switch is seen are dropped
          if (!(mode == AC_PD && e.cyc >= PTD_AT)) exp_q.push_back(e);
          acc_re = 0; acc_im = 0; acc_pw = 0;
        end
      end
      @(negedge clk);
      t++;
    end
    $display("blocks passing %0d, packet hits %0d, timing decisions %0d, frame sync %0d", n_pass, n_hit, n_ptd, n_fs);
    checks++;
    if (n_hit == 0 || n_fs == 0 || n_pass == n_hit) begin
      failures++; $display("FAIL: a decision path was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * NCYC) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
