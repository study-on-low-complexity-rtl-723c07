// tb_frame_sync_top: end-to-end test of the frame synchronizer at its default
// parameters.
//
// The stimulus is a 528 MS/s sample stream built in memory:
//   A  noise, then a clean frame: 21 packet sync, 3 frame sync (negated),
//      6 channel estimation and 8 data symbols; each sync symbol is the
//      128-chip sequence with its last 32 chips as prefix and 5 zero guard
//      samples (165 samples in all);
//   B  the same frame through a two-path channel whose first path is half
//      as strong as an echo two samples later (the pre-cursor search must
//      pick the first path);
//   C  packet sync symbols that go on to the end of the run, with no frame
//      sync symbol (the preamble timing search must give up and return to
//      packet detection).
// Checks: packet detected inside each preamble, boundary congruent to the
// true sync-sequence start modulo one symbol, one frame sync per frame, the
// first FFT window at the first channel estimation symbol, every gated
// sample equal to the stream, 128 samples per window, CES/data typing, and
// the return to packet detection.  Each mechanism (path rotation, two-block
// rule, pre-cursor pick, dynamic threshold, timeout, gate) is counted and
// must occur at least once.
// The multi-band ports get their own stream: a receiver parked on one
// sub-band sees a 128-sample QPSK burst every 495 samples.  The burst
// amplitude follows the AGC gain, 8 * 10^((gain - MB_GOPT)/20) rounded and
// kept within 1..15, so the gain loop is closed.  The reset gain is 23 dB
// too low, which forces a binary-search step before the lookup steps.
// Checks: one band report per burst at its start + 4 (the trend distance
// of 8 samples splits the difference), the reported energy equal to the
// 128-sample sum from the stream, a gain within 4 dB of MB_GOPT at the end
// (the integer amplitudes limit the precision), silence after `mb_clr`, and
// a saved training gain restored.
// The 802.11a ports get a third stream, one sample every other cycle: a
// 36-sample periodic stretch (too short to be a packet), then two frames,
// each a short preamble, guard interval, two long training symbols and
// data; the second frame arrives over a weak first path and a stronger
// echo three samples later.  Checks: one announcement inside each short
// preamble, at least one cancelled candidate, each boundary at a long
// training symbol start of the first path, and the pre-cursor flag set for
// the second frame only.
module tb_frame_sync_top;
  import fsync_pkg::*;

  localparam int TOTAL = 25000;
  localparam int F1 = 1500, F2 = 8500, F3 = 16000;
  localparam int NDATA = 8;
  localparam int AMP = 9;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  sample_t          adc [LANES];
  logic [7:0]       pd_thr = 8'd128;
  logic             frame_end = 0;
  logic             fft_valid, fft_first, fft_type;
  sample_t          fft_data [LANES];
  logic [LANES-1:0] fft_mask;
  logic [15:0]      fft_sym_cnt;
  logic             pkt_detect, boundary_valid, precursor, frame_sync, ptd_timeout;
  idx_t             fft_boundary, samp_idx;
  logic [2:0]       state;

  localparam int MB0 = 400, MB_PER = 3 * SYM_LEN, MB_GOPT = 58;
  localparam int MB_CLR_T = 3000, MB_SAVE_T = 2500;
  sample_t          mb_adc [LANES];
  logic             mb_clr = 0, mb_train_sel = 0, mb_train_save = 0, mb_train_load = 0;
  logic             mb_band_valid, mb_gain_coarse;
  idx_t             mb_band_idx;
  logic [2*ADC_W+$clog2(SEQ_LEN)-1:0] mb_band_pow;
  logic [6:0]       mb_gain;
  logic signed [5:0] mb_gain_est;
  int mbi [TOTAL];
  int mbq [TOTAL];
  int mb_amp [TOTAL / MB_PER + 1];

  localparam int WNS = TOTAL / 8;
  localparam int WFAKE = 200, WFB [2] = '{600, 1600};
  logic              w_valid = 0, w_rearm = 0;
  logic signed [7:0] w_re = '0, w_im = '0;
  logic [7:0]        w_thr = 8'd100;
  logic              w_pkt_detect, w_pkt_cand, w_pkt_cancel, w_boundary_valid, w_precursor;
  logic [15:0]       w_pkt_idx, w_boundary;
  int wr [WNS];
  int wi [WNS];
  int w_sent = 0, n_wpkt = 0, n_wcancel = 0, n_wbnd = 0, n_wpre = 0;

  frame_sync_top dut (.*);

  int si [TOTAL];
  int sq [TOTAL];
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (cycle sample %0d)", what, samp_idx);
    end
  endtask

  function automatic int chip(int n);
    return SYNC_SEQ[n] ? AMP : -AMP;
  endfunction

  function automatic int clip5(int v);
    return (v > 15) ? 15 : (v < -16) ? -16 : v;
  endfunction

  // transmitted frame sample k (in-phase / quadrature), before the channel;
  // nsym < 0 means an endless run of packet sync symbols
  int qi [38 * SYM_LEN];
  int qq [38 * SYM_LEN];
  function automatic void frame_tx(int k, int nsym, output int ti, output int tq);
    int y, o, sign;
    y = k / SYM_LEN;
    o = k % SYM_LEN;
    ti = 0; tq = 0;
    if (nsym >= 0 && y >= nsym) return;
    if (nsym < 0 || y < 24) begin
      if (o >= CP_LEN + SEQ_LEN) return;               // guard
      sign = (nsym >= 0 && y >= 21) ? -1 : 1;           // frame sync symbols negated
      ti = sign * chip((o < CP_LEN) ? (SEQ_LEN - CP_LEN + o) : (o - CP_LEN));
    end else begin
      // channel estimation and data: random QPSK
      ti = qi[k];
      tq = qq[k];
    end
  endfunction

  initial begin
    int ti, tq, ei, eq;
    for (int n = 0; n < TOTAL; n++) begin
      si[n] = $urandom_range(4) - 2;
      sq[n] = $urandom_range(4) - 2;
    end
    for (int k = 0; k < 38 * SYM_LEN; k++) begin
      qi[k] = $urandom_range(1) ? 6 : -6;
      qq[k] = $urandom_range(1) ? 6 : -6;
    end
    for (int k = 0; k < 38 * SYM_LEN; k++) begin
      frame_tx(k, 38, ti, tq);
      si[F1 + k] += ti;
      sq[F1 + k] += tq;
      // two paths: (2/3) x[n] + x[n-2]
      if (k >= 2) frame_tx(k - 2, 38, ei, eq); else begin ei = 0; eq = 0; end
      si[F2 + k] += (2 * ti) / 3 + ei;
      sq[F2 + k] += (2 * tq) / 3 + eq;
    end
    for (int k = 0; F3 + k < TOTAL; k++) begin
      frame_tx(k, -1, ti, tq);
      si[F3 + k] += ti;
      sq[F3 + k] += tq;
    end
    for (int n = 0; n < TOTAL; n++) begin
      si[n] = clip5(si[n]);
      sq[n] = clip5(sq[n]);
    end
  end

  // drive four samples per cycle
  int t = 0;
  always_comb
    for (int p = 0; p < LANES; p++) begin
      adc[p].i = 5'(si[(4 * t + p) % TOTAL]);
      adc[p].q = 5'(sq[(4 * t + p) % TOTAL]);
    end

  // multi-band stream of cycle tt, burst amplitude taken at each burst start
  task automatic mb_drive(int tt);
    for (int p = 0; p < LANES; p++) begin
      int n, j, pos;
      n = 4 * tt + p;
      mbi[n] = 0;
      mbq[n] = 0;
      if (n >= MB0) begin
        j   = (n - MB0) / MB_PER;
        pos = (n - MB0) % MB_PER;
        if (pos == 0) begin
          real a;
          a = 8.0 * (10.0 ** (real'(int'(mb_gain) - MB_GOPT) / 20.0));
          mb_amp[j] = (a > 15.0) ? 15 : (a < 1.0) ? 1 : int'(a);
        end
        if (pos < SEQ_LEN) begin
          mbi[n] = ($urandom_range(0, 1) != 0) ? mb_amp[j] : -mb_amp[j];
          mbq[n] = ($urandom_range(0, 1) != 0) ? mb_amp[j] : -mb_amp[j];
        end
      end
      mb_adc[p].i = 5'(mbi[n]);
      mb_adc[p].q = 5'(mbq[n]);
    end
  endtask

  int n_band = 0, n_coarse = 0, n_fine = 0, mb_saved = -1, mb_last_rep = -1000;

  always @(posedge clk) if (rst_n) begin
    if (mb_band_valid) begin
      int k, b, e, d;
      k = int'(mb_band_idx);
      b = MB0 + ((k - MB0 + 100) / MB_PER) * MB_PER;
      n_band++;
      check(k - (b + 4) >= -2 && k - (b + 4) <= 2, $sformatf("band report %0d for burst %0d", k, b));
      check(!(4 * t > 4 * MB_CLR_T && 4 * t < 4 * MB_CLR_T + 157),
            "no band report right after the clear");
      e = 0;
      for (int n = k - 4; n < k - 4 + SEQ_LEN; n++)
        if (n >= 0 && n < TOTAL) e += mbi[n] * mbi[n] + mbq[n] * mbq[n];
      check(int'(mb_band_pow) == e, $sformatf("band energy %0d expected %0d", mb_band_pow, e));
      check(k - mb_last_rep > 400, "one band report per burst");
      mb_last_rep = k;
    end
  end
  // the gain step of a report shows one cycle later
  logic mb_rep_d = 1'b0;
  always @(posedge clk) mb_rep_d <= mb_band_valid;
  always @(negedge clk) if (rst_n && mb_rep_d) begin
    if (mb_gain_coarse) n_coarse++; else n_fine++;
  end

  // ---------------- monitors ----------------
  int n_rot = 0, n_pd_single = 0, n_pkt = 0, n_bnd = 0, n_pre = 0, n_fs = 0;
  int n_tmo = 0, n_ces = 0, n_data = 0, n_win_ok = 0;
  int frame_id;           // 0: A, 1: B, 2: C
  int win_samples;
  bit in_window;
  int expect_idx;         // next sample index expected at the gate output
  logic [1:0] last_sel;
  int pd_prev_pass;

  function automatic int which_frame(int idx);
    if (idx >= F3) return 2;
    if (idx >= F2) return 1;
    return 0;
  endfunction

  function automatic int fstart(int f);
    return (f == 0) ? F1 : (f == 1) ? F2 : F3;
  endfunction

  always @(posedge clk) if (rst_n) begin
    int cur, f;
    cur = 4 * t;
    // path-select rotation during packet detection
    if (dut.u_ac.mark && dut.st == ST_PD && dut.u_ctrl.ac_sel != last_sel) n_rot++;
    last_sel <= dut.u_ctrl.ac_sel;
    // a block passing the threshold without its predecessor
    if (dut.u_ac.pd_eval) begin
      if (dut.u_ac.pd_pass && !pd_prev_pass) n_pd_single++;
      pd_prev_pass = dut.u_ac.pd_pass;
    end
    if (pkt_detect) begin
      f = which_frame(cur);
      n_pkt++;
      check(cur > fstart(f) + 3 * SYM_LEN && (f == 2 || cur < fstart(f) + 21 * SYM_LEN),
            $sformatf("packet detected inside the preamble of frame %0d", f));
    end
    if (boundary_valid) begin
      int b, d;
      f = which_frame(cur);
      n_bnd++;
      b = int'(fft_boundary);
      d = b - (fstart(f) + CP_LEN);
      check(d >= 0 && d % SYM_LEN == 0,
            $sformatf("boundary %0d on a sync sequence start of frame %0d", b, f));
      if (precursor) n_pre++;
    end
    if (frame_sync) begin
      f = which_frame(cur);
      n_fs++;
      frame_id = f;
      check(f != 2, "no frame sync in the burst without frame sync symbols");
      expect_idx = fstart(f) + 24 * SYM_LEN + CP_LEN;   // first CES sequence
      win_samples = 0;
    end
    if (ptd_timeout) begin
      n_tmo++;
      check(which_frame(cur) == 2, "timeout only for the burst");
    end
    // gate output: one cycle behind the input, samples 4(t-1)+p
    if (fft_valid) begin
      for (int p = 0; p < LANES; p++) if (fft_mask[p]) begin
        int idx;
        idx = 4 * (t - 1) + p;
        if (win_samples == 0) begin
          check(fft_first && idx == expect_idx, $sformatf("window start %0d expected %0d", idx, expect_idx));
          if (fft_type) n_data++; else n_ces++;
          check(fft_type == (fft_sym_cnt >= 6), "symbol type");
        end
        check(fft_data[p].i == 5'(si[idx]) && fft_data[p].q == 5'(sq[idx]), "gated sample");
        win_samples++;
        if (win_samples == SEQ_LEN) begin
          win_samples = 0;
          n_win_ok++;
          expect_idx += SYM_LEN;
        end
      end
    end
  end

  // 802.11a stream
  initial begin
    real pi;
    real lr [64];
    real li [64];
    bit [52:0] pos;
    pi  = 3.14159265358979323846;
    pos = 53'b11001101011111100110101111010011010100000110010101111;
    for (int n = 0; n < 64; n++) begin
      lr[n] = 0.0;
      li[n] = 0.0;
      for (int k = -26; k <= 26; k++) if (k != 0) begin
        real l;
        l     = pos[52 - (k + 26)] ? 1.0 : -1.0;
        lr[n] += l * $cos(2.0 * pi * k * n / 64.0) / 64.0;
        li[n] += l * $sin(2.0 * pi * k * n / 64.0) / 64.0;
      end
    end
    for (int n = 0; n < WNS; n++) begin
      wr[n] = $urandom_range(0, 6) - 3;
      wi[n] = $urandom_range(0, 6) - 3;
    end
    for (int f = 0; f < 3; f++) begin
      real sr [16];
      real si [16];
      real fr [520];
      real fi [520];
      int  len, b;
      len = (f == 0) ? 36 : 520;
      b   = (f == 0) ? WFAKE : WFB[f-1];
      for (int k = 0; k < 16; k++) begin
        sr[k] = $urandom_range(0, 100) - 50.0;
        si[k] = $urandom_range(0, 100) - 50.0;
      end
      for (int n = 0; n < len; n++) begin
        if (n < 160) begin
          fr[n] = sr[n % 16];
          fi[n] = si[n % 16];
        end else if (n < 192) begin
          fr[n] = 400.0 * lr[n - 128];
          fi[n] = 400.0 * li[n - 128];
        end else if (n < 320) begin
          fr[n] = 400.0 * lr[(n - 192) % 64];
          fi[n] = 400.0 * li[(n - 192) % 64];
        end else begin
          fr[n] = $urandom_range(0, 100) - 50.0;
          fi[n] = $urandom_range(0, 100) - 50.0;
        end
      end
      for (int n = 0; n < len + 3; n++) begin
        real yr, yi;
        if (f < 2) begin
          yr = (n < len) ? fr[n] : 0.0;
          yi = (n < len) ? fi[n] : 0.0;
        end else begin
          yr = ((n < len) ? 0.4 * fr[n] : 0.0) + ((n >= 3) ? 0.8 * fr[n - 3] : 0.0);
          yi = ((n < len) ? 0.4 * fi[n] : 0.0) + ((n >= 3) ? 0.8 * fi[n - 3] : 0.0);
        end
        wr[b + n] += $rtoi(yr + (yr >= 0.0 ? 0.5 : -0.5));
        wi[b + n] += $rtoi(yi + (yi >= 0.0 ? 0.5 : -0.5));
      end
    end
    for (int n = 0; n < WNS; n++) begin
      if (wr[n] > 127) wr[n] = 127;
      if (wr[n] < -128) wr[n] = -128;
      if (wi[n] > 127) wi[n] = 127;
      if (wi[n] < -128) wi[n] = -128;
    end
  end

  task automatic w_drive(int tt);
    w_valid = (tt % 2 == 0) && (w_sent < WNS);
    w_rearm = (tt == 2 * (WFB[1] - 200));
    if (w_valid) begin
      w_re = 8'(wr[w_sent]);
      w_im = 8'(wi[w_sent]);
      w_sent++;
    end
  endtask

  always @(negedge clk) if (rst_n) begin
    if (w_pkt_cancel) n_wcancel++;
    if (w_pkt_detect) begin
      check(n_wpkt < 2 && int'(w_pkt_idx) >= WFB[n_wpkt] && int'(w_pkt_idx) < WFB[n_wpkt] + 160,
            $sformatf("802.11a packet announced at %0d", w_pkt_idx));
      n_wpkt++;
    end
    if (w_boundary_valid) begin
      int off;
      off = (n_wbnd < 2) ? int'(w_boundary) - WFB[n_wbnd] - 192 : -1;
      check(off == 0 || off == 64, $sformatf("802.11a boundary %0d", w_boundary));
      check(w_precursor == (n_wbnd == 1), $sformatf("802.11a pre-cursor flag %0b", w_precursor));
      if (w_precursor) n_wpre++;
      n_wbnd++;
    end
  end

  // end the frame after 6 channel estimation and NDATA data windows
  always @(negedge clk) frame_end <= (fft_sym_cnt == 16'(6 + NDATA)) && (state == 3'(ST_GATE));

  initial begin
    last_sel = '0;
    pd_prev_pass = 0;
    mb_drive(0);
    w_drive(1);
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (t < TOTAL / 4 - 1) begin
      @(negedge clk);
      t++;
      mb_drive(t);
      w_drive(t);
      mb_clr        = (t == MB_CLR_T);
      mb_train_save = (t == MB_SAVE_T);
      if (t == MB_SAVE_T) mb_saved = int'(mb_gain);
      mb_train_load = (t == TOTAL / 4 - 3);
      if (t == TOTAL / 4 - 2)
        check(int'(mb_gain) == mb_saved, $sformatf("restored gain %0d expected %0d", mb_gain, mb_saved));
      if (t == TOTAL / 4 - 4)
        check(int'(mb_gain) >= MB_GOPT - 4 && int'(mb_gain) <= MB_GOPT + 4,
              $sformatf("gain loop settled at %0d for %0d", mb_gain, MB_GOPT));
    end
    check(n_pkt >= 3, $sformatf("at least three packet detections, saw %0d", n_pkt));
    check(n_bnd == n_pkt, $sformatf("one boundary per packet, saw %0d", n_bnd));
    check(n_fs == 2, $sformatf("two frame syncs, saw %0d", n_fs));
    check(n_win_ok == 2 * (6 + NDATA), $sformatf("windows cut %0d", n_win_ok));
    $display("mechanisms: rotations=%0d single_pass=%0d packets=%0d boundaries=%0d precursor=%0d frame_sync=%0d timeouts=%0d ces=%0d data=%0d",
             n_rot, n_pd_single, n_pkt, n_bnd, n_pre, n_fs, n_tmo, n_ces, n_data);
    check(n_rot > 0, "path rotation happened");
    check(n_pd_single > 0, "two-block rule rejected a single passing block");
    check(n_pre > 0, "pre-cursor search picked an earlier candidate");
    check(n_tmo > 0, "preamble timing timeout happened");
    check(n_ces > 0 && n_data > 0, "gate cut CES and data symbols");
    $display("multi-band: band reports=%0d coarse steps=%0d fine steps=%0d final gain=%0d",
             n_band, n_coarse, n_fine, mb_gain);
    check(n_band >= (TOTAL - MB0) / MB_PER - 4, $sformatf("band reports %0d", n_band));
    check(n_coarse > 0, "AGC binary-search step happened");
    check(n_fine > 0, "AGC lookup step happened");
    $display("802.11a: announcements=%0d cancelled=%0d boundaries=%0d precursor=%0d",
             n_wpkt, n_wcancel, n_wbnd, n_wpre);
    check(n_wpkt == 2, "two 802.11a packets announced");
    check(n_wcancel > 0, "802.11a decision window cancelled a candidate");
    check(n_wbnd == 2, "two 802.11a boundaries");
    check(n_wpre == 1, "802.11a pre-cursor pick happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (TOTAL) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
