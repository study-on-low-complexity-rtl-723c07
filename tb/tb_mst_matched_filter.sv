// tb_mst_matched_filter: self-checking testbench for the 802.11a
// most-significant-taps cross-correlator.
//
// The expected coefficients are written out below as plain numbers, for all
// 64 positions in decreasing order of magnitude.  They are the 802.11a
// long-training-symbol samples, rounded to multiples of 2^-6 from
// {0, 1, 2, 4, 8}; the testbench does not reuse the module's computation.
// Three filters run side by side on the same stream: the default 16 taps,
// 20 taps (the count preferred for long delay spreads) and all 64 taps, the
// last with the wider accumulator.  The stimulus is random samples, with gaps in
// `in_valid`, followed by a long training symbol (computed here from its
// subcarriers, amplitude 400) buried in noise.  Every output is compared with
// the correlation summed directly from the stored stream, including its
// index and its latency of two cycles.  For each filter, the strongest
// output near the symbol must sit at the true symbol start.  A watchdog ends the run.
module tb_mst_matched_filter;

  localparam int DW = 8;
  localparam int NS = 1200;                 // samples
  localparam int K0 = 900;                  // long training symbol start
  localparam int S1 [64] = '{15, 51, 1, 33, 25, 41, 30, 36, 46, 20, 54, 12, 35, 31, 39, 27,
                             59, 7, 62, 4, 45, 21, 26, 40, 2, 64, 16, 50, 3, 63, 55, 11,
                             8, 58, 60, 6, 28, 38, 48, 18, 43, 23, 57, 9, 34, 32, 49, 17,
                             44, 22, 19, 47, 53, 13, 14, 52, 42, 24, 37, 29, 10, 56, 5, 61};
  localparam int QR [64] = '{-1, -1, 8, -8, -2, -2, -4, -4, -8, -8, -8, -8, 4, 4, -8, -8,
                             -8, -8, 8, 8, 4, 4, -8, -8, 0, 0, 8, 8, 2, 2, 0, 0,
                             -2, -2, 4, 4, 4, 4, 2, 2, -4, -4, 8, 8, 1, 1, 4, 4,
                             4, 4, -4, -4, 2, 2, 4, 4, -4, -4, 0, 0, 4, 4, 1, 1};
  localparam int QI [64] = '{8, -8, 0, 0, -8, 8, 8, -8, -4, 4, 4, -4, -8, 8, 1, -1,
                             4, -4, -4, 4, -4, 4, -1, 1, -8, 8, 0, 0, -8, 8, 8, -8,
                             -8, 8, 4, -4, -4, 4, -8, 8, -4, 4, 2, -2, -8, 8, 4, -4,
                             -1, 1, 2, -2, 4, -4, -1, 1, 1, -1, -4, 4, 0, 0, 2, -2};
  localparam int NT [3]  = '{16, 20, 64};

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b0;
  logic                 in_valid = 1'b0;
  logic signed [DW-1:0] in_re = '0, in_im = '0;
  logic                 out_valid;
  logic [15:0]          out_idx;
  logic [2*(DW+8)-1:0]  power;
  logic                 v20, v64;
  logic [15:0]          i20, i64;
  logic [2*(DW+8)-1:0]  p20;
  logic [2*(DW+10)-1:0] p64;

  mst_matched_filter dut (.*);
  mst_matched_filter #(.N_TAPS(20)) dut20 (
    .clk, .rst_n, .in_valid, .in_re, .in_im, .out_valid(v20), .out_idx(i20), .power(p20)
  );
  mst_matched_filter #(.N_TAPS(64)) dut64 (
    .clk, .rst_n, .in_valid, .in_re, .in_im, .out_valid(v64), .out_idx(i64), .power(p64)
  );

  always #5 clk = ~clk;

  int xr [NS];
  int xi [NS];
  int checks = 0, failures = 0;
  int sent = 0;
  int nout [3] = '{0, 0, 0};
  int best_k [3] = '{-1, -1, -1};
  longint best_p [3] = '{-1, -1, -1};
  int vhist [3];    // samples sent, per cycle, for the latency check

  function automatic longint expect_pow(input int k, input int ntaps);
    longint ar = 0, ai = 0;
    for (int m = 0; m < ntaps; m++) begin
      int a, b;
      a  = xr[k + S1[m] - 1];
      b  = xi[k + S1[m] - 1];
      ar += a * QR[m] + b * QI[m];
      ai += b * QR[m] - a * QI[m];
    end
    return ar * ar + ai * ai;
  endfunction

  initial begin
    real pi;
    pi = 3.14159265358979323846;
    for (int n = 0; n < NS; n++) begin
      xr[n] = $urandom_range(0, 40) - 20;
      xi[n] = $urandom_range(0, 40) - 20;
    end
    // long training symbol: subcarrier signs -26..26 as bits, 1 = +1
    for (int n = 0; n < 64; n++) begin
      real ar, ai;
      bit [52:0] pos;
      pos = 53'b11001101011111100110101111010011010100000110010101111;
      ar = 0.0;
      ai = 0.0;
      for (int k = -26; k <= 26; k++) if (k != 0) begin
        real l;
        l  = pos[52 - (k + 26)] ? 1.0 : -1.0;
        ar += l * $cos(2.0 * pi * k * n / 64.0);
        ai += l * $sin(2.0 * pi * k * n / 64.0);
      end
      xr[K0 + n] = $rtoi(ar * 400.0 / 64.0 + (ar >= 0.0 ? 0.5 : -0.5)) + $urandom_range(0, 8) - 4;
      xi[K0 + n] = $rtoi(ai * 400.0 / 64.0 + (ai >= 0.0 ? 0.5 : -0.5)) + $urandom_range(0, 8) - 4;
    end
    for (int n = 0; n < NS; n++) begin
      if (xr[n] > 127) xr[n] = 127;
      if (xr[n] < -128) xr[n] = -128;
      if (xi[n] > 127) xi[n] = 127;
      if (xi[n] < -128) xi[n] = -128;
    end
  end

  // drive: a gap now and then
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    while (sent < NS) begin
      @(negedge clk);
      if ($urandom_range(0, 9) == 0) begin
        in_valid = 1'b0;
      end else begin
        in_valid = 1'b1;
        in_re    = DW'(xr[sent]);
        in_im    = DW'(xi[sent]);
        sent++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (4) @(negedge clk);
    for (int f = 0; f < 3; f++) begin
      checks += 2;
      if (nout[f] != NS - 63) begin
        failures++;
        $display("FAIL %0d taps: %0d outputs, expected %0d", NT[f], nout[f], NS - 63);
      end
      if (best_k[f] != K0) begin
        failures++;
        $display("FAIL %0d taps: strongest correlation at %0d, symbol starts at %0d", NT[f], best_k[f], K0);
      end
      $display("%0d taps: outputs %0d, peak at %0d (power %0d)", NT[f], nout[f], best_k[f], best_p[f]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output check; vhist[2] = number of samples sent two cycles ago
  always @(posedge clk) begin
    vhist[2] <= vhist[1];
    vhist[1] <= vhist[0];
    vhist[0] <= sent;
  end

  task automatic check_out(input int f, input int k, input longint pw);
    longint e;
    e = expect_pow(k, NT[f]);
    nout[f]++;
    checks += 2;
    if (pw != e) begin
      failures++;
      $display("FAIL %0d taps: k=%0d power=%0d expected %0d", NT[f], k, pw, e);
    end
    // the window ending with the sample sent two cycles earlier
    if (k + 64 != vhist[2]) begin
      failures++;
      $display("FAIL %0d taps: k=%0d reported with %0d samples sent two cycles before", NT[f], k, vhist[2]);
    end
    if (k >= K0 - 100 && k < K0 + 100 && pw > best_p[f]) begin
      best_p[f] = pw;
      best_k[f] = k;
    end
  endtask

  always @(negedge clk) if (rst_n) begin
    if (out_valid) check_out(0, int'(out_idx), longint'(power));
    if (v20)       check_out(1, int'(i20), longint'(p20));
    if (v64)       check_out(2, int'(i64), longint'(p64));
  end

  initial begin
    vhist = '{0, 0, 0};
    #((NS * 2 + 100) * 10);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
