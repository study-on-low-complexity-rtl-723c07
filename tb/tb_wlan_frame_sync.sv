// tb_wlan_frame_sync: self-checking testbench for the 802.11a frame
// synchronizer (packet detection followed by FFT window detection).
//
// Six frames, one sample per cycle, in light noise.  Each frame is a short
// preamble (ten repetitions of a random 16-sample symbol), a 32-sample guard
// interval, two long training symbols (computed here from their subcarriers)
// and random data.  Even frames arrive over a single path.  Odd frames arrive
// over two paths: a first path and an echo 2 to 4 samples later that is
// 2.5 dB stronger, so the strongest correlation belongs to the echo and the
// pre-cursor rule must move the boundary back to the first path.  (With a
// first path 6 dB down, the echo's main lobe and its neighbours can fill all
// five candidates, and the first path is lost.)  The detector is
// re-armed between the frames.
// Checks: one packet announcement per frame, inside its short preamble; the
// boundary equals a reference that recomputes the quantised 16-tap
// correlation directly from the samples (expected coefficients written out
// as plain numbers), keeps the five largest values and applies the
// pre-cursor rule; the boundary is the start of a long training symbol of
// the first path; the pre-cursor flag is clear for single-path frames and
// set for two-path frames.  A watchdog ends the run.
module tb_wlan_frame_sync;

  localparam int DW     = 8;
  localparam int NF     = 6;
  localparam int NS     = NF * 1000 + 400;
  localparam int SEARCH = 160;
  localparam int M      = 5;
  localparam int PRE    = 5;
  localparam int S1 [16] = '{15, 51, 1, 33, 25, 41, 30, 36, 46, 20, 54, 12, 35, 31, 39, 27};
  localparam int QR [16] = '{-1, -1, 8, -8, -2, -2, -4, -4, -8, -8, -8, -8, 4, 4, -8, -8};
  localparam int QI [16] = '{8, -8, 0, 0, -8, 8, 8, -8, -4, 4, 4, -4, -8, 8, 1, -1};

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b0;
  logic                 in_valid = 1'b0;
  logic signed [DW-1:0] in_re = '0, in_im = '0;
  logic [7:0]           thr = 8'd100;
  logic                 rearm = 1'b0;
  logic                 pkt_detect, pkt_cand, pkt_cancel;
  logic [15:0]          pkt_idx;
  logic                 boundary_valid, precursor;
  logic [15:0]          boundary;

  wlan_frame_sync dut (.*);

  always #5 clk = ~clk;

  int xr [NS];
  int xi [NS];
  int checks = 0, failures = 0, n_det = 0, n_bnd = 0;
  int det_at [NF];

  function automatic int fb(input int f);    // frame start
    return 300 + 1000 * f;
  endfunction

  function automatic int echo(input int f);  // echo delay, 0 = single path
    return (f % 2 == 1) ? 2 + f % 3 : 0;
  endfunction

  function automatic longint corr_pow(input int k);
    longint ar = 0, ai = 0;
    for (int m = 0; m < 16; m++) begin
      int a, b;
      a  = xr[k + S1[m] - 1];
      b  = xi[k + S1[m] - 1];
      ar += a * QR[m] + b * QI[m];
      ai += b * QR[m] - a * QI[m];
    end
    return ar * ar + ai * ai;
  endfunction

  // reference FFT window search from announcement index d
  function automatic void ref_search(input int d, output int bnd, output bit pre);
    longint tp [M];
    int     ti [M];
    bit     tv [M];
    int     pick;
    for (int j = 0; j < M; j++) tv[j] = 1'b0;
    for (int k = d; k < d + SEARCH; k++) begin
      longint p;
      int pos;
      p   = corr_pow(k);
      pos = M;
      for (int j = M - 1; j >= 0; j--) if (!tv[j] || p > tp[j]) pos = j;
      for (int j = M - 1; j > pos; j--) begin
        tp[j] = tp[j-1]; ti[j] = ti[j-1]; tv[j] = tv[j-1];
      end
      if (pos < M) begin
        tp[pos] = p; ti[pos] = k; tv[pos] = 1'b1;
      end
    end
    pick = ti[0];
    for (int j = 1; j < M; j++)
      if (tv[j] && ti[j] <= ti[0] && ti[0] - ti[j] <= PRE && ti[j] < pick) pick = ti[j];
    bnd = pick;
    pre = (pick != ti[0]);
  endfunction

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
    for (int n = 0; n < NS; n++) begin
      xr[n] = $urandom_range(0, 6) - 3;
      xi[n] = $urandom_range(0, 6) - 3;
    end
    for (int f = 0; f < NF; f++) begin
      real sr [16];
      real si [16];
      real fr [520];
      real fi [520];
      for (int k = 0; k < 16; k++) begin
        sr[k] = $urandom_range(0, 100) - 50.0;
        si[k] = $urandom_range(0, 100) - 50.0;
      end
      for (int n = 0; n < 520; n++) begin
        if (n < 160) begin
          fr[n] = sr[n % 16];
          fi[n] = si[n % 16];
        end else if (n < 192) begin
          fr[n] = 400.0 * lr[n - 160 + 32];
          fi[n] = 400.0 * li[n - 160 + 32];
        end else if (n < 320) begin
          fr[n] = 400.0 * lr[(n - 192) % 64];
          fi[n] = 400.0 * li[(n - 192) % 64];
        end else begin
          fr[n] = $urandom_range(0, 100) - 50.0;
          fi[n] = $urandom_range(0, 100) - 50.0;
        end
      end
      for (int n = 0; n < 520 + echo(f); n++) begin
        real yr, yi;
        if (echo(f) == 0) begin
          yr = (n < 520) ? fr[n] : 0.0;
          yi = (n < 520) ? fi[n] : 0.0;
        end else begin
          yr = ((n < 520) ? 0.6 * fr[n] : 0.0) + ((n >= echo(f)) ? 0.8 * fr[n - echo(f)] : 0.0);
          yi = ((n < 520) ? 0.6 * fi[n] : 0.0) + ((n >= echo(f)) ? 0.8 * fi[n - echo(f)] : 0.0);
        end
        xr[fb(f) + n] += $rtoi(yr + (yr >= 0.0 ? 0.5 : -0.5));
        xi[fb(f) + n] += $rtoi(yi + (yi >= 0.0 ? 0.5 : -0.5));
      end
    end
    for (int n = 0; n < NS; n++) begin
      if (xr[n] > 127) xr[n] = 127;
      if (xr[n] < -128) xr[n] = -128;
      if (xi[n] > 127) xi[n] = 127;
      if (xi[n] < -128) xi[n] = -128;
    end
  end

  // drive one sample per cycle; re-arm once between the frames
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int j = 0; j < NS; j++) begin
      in_valid = 1'b1;
      in_re    = DW'(xr[j]);
      in_im    = DW'(xi[j]);
      rearm    = (j % 1000 == 100) && (j > 1000);
      @(negedge clk);
    end
    in_valid = 1'b0;
    rearm    = 1'b0;
    repeat (8) @(negedge clk);
    checks += 2;
    if (n_det != NF) begin failures++; $display("FAIL %0d packet announcements, expected %0d", n_det, NF); end
    if (n_bnd != NF) begin failures++; $display("FAIL %0d boundaries, expected %0d", n_bnd, NF); end
    $display("announcements %0d, boundaries %0d", n_det, n_bnd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) begin
    if (pkt_detect) begin
      checks++;
      if (n_det < NF) det_at[n_det] = int'(pkt_idx);
      if (n_det >= NF || int'(pkt_idx) < fb(n_det) || int'(pkt_idx) >= fb(n_det) + 160) begin
        failures++;
        $display("FAIL packet announced at %0d", pkt_idx);
      end
      n_det++;
    end
    if (boundary_valid) begin
      int  eb, lts;
      bit  ep;
      checks += 4;
      if (n_bnd >= n_det || n_bnd >= NF) begin
        failures++;
        $display("FAIL boundary without an announcement");
      end else begin
        ref_search(det_at[n_bnd], eb, ep);
        if (int'(boundary) != eb) begin
          failures++;
          $display("FAIL frame %0d boundary %0d, reference %0d", n_bnd, boundary, eb);
        end
        if (precursor !== ep) begin
          failures++;
          $display("FAIL frame %0d pre-cursor flag %0b, reference %0b", n_bnd, precursor, ep);
        end
        lts = int'(boundary) - fb(n_bnd) - 192;
        if (lts != 0 && lts != 64) begin
          failures++;
          $display("FAIL frame %0d boundary %0d is not a long training symbol start", n_bnd, boundary);
        end
        if (precursor !== (echo(n_bnd) != 0)) begin
          failures++;
          $display("FAIL frame %0d pre-cursor flag %0b", n_bnd, precursor);
        end
        $display("frame %0d: echo %0d, announced at %0d, boundary %0d (frame start + %0d), pre-cursor %0b",
                 n_bnd, echo(n_bnd), det_at[n_bnd], boundary, int'(boundary) - fb(n_bnd), precursor);
      end
      n_bnd++;
    end
  end

  initial begin
    #((NS + 100) * 10);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
