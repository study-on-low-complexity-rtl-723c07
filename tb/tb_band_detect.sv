// tb_band_detect: self-checking testbench for the dynamic searching window.
//
// The stimulus imitates a receiver parked on one sub-band: low noise, plus a
// 128-sample QPSK burst every 495 samples.  For every report cycle the
// testbench works out the expected result from its own arrays: per-sample
// powers, sliding 128-sample sums by direct summation, trend flags by the
// equation, the 16-flag pattern and the earliest-index rule.  It compares
// `det_valid`, `det_idx` and `det_pow` cycle by cycle, three cycles after the
// cycle that holds the window's last sample, and drops hits that follow a
// report within the hold-off of 8 cycles.  Halfway through, `clr` starts a
// new search; the model then treats every earlier sample as silent.  Each
// burst must be reported once, at k = b + M/2 within two samples.  A watchdog ends the
// run.
module tb_band_detect;
  import fsync_pkg::*;

  localparam int NB     = 9;                 // bursts
  localparam int PERIOD = 3 * SYM_LEN;       // 495
  localparam int B0     = 300;               // first burst start
  localparam int N      = B0 + NB * PERIOD + 400;
  localparam int NCYC   = N / LANES;
  localparam int C1     = (B0 + 4 * PERIOD + 250) / LANES;  // clear cycle
  localparam int M      = 8;
  localparam int DPOW   = 30 + M / 2;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  logic    clr = 1'b0;
  idx_t    samp_idx = '0;
  sample_t lanes [LANES];
  logic    det_valid;
  idx_t    det_idx;
  logic [2*ADC_W+$clog2(SEQ_LEN)-1:0] det_pow;

  band_detect #(.M(M)) dut (.*);

  always #5 clk = ~clk;

  int si [N];
  int sq [N];
  int pw [N];
  int s1 [N];   // window sums, whole stream
  int s2 [N];   // window sums, stream restarted after the clear
  int checks = 0, failures = 0;
  int found [NB];
  int last_rep = -1000;   // sample cycle of the last report
  int n_supp = 0;         // hits dropped by the hold-off
  localparam int HOLD = 8;

  function automatic int sum_at(input int e, input int first);
    int acc = 0;
    for (int n = e - 127; n <= e; n++) if (n >= first && n >= 0) acc += pw[n];
    return acc;
  endfunction

  function automatic bit flag(input int e, input int seg);
    int a, b;
    if (e < 0) return 1'b0;
    a = seg ? s2[e] : s1[e];
    b = (e - M < 0) ? 0 : (seg ? s2[e-M] : s1[e-M]);
    return a > b;
  endfunction

  function automatic bit pattern(input int e, input int seg);
    for (int i = 0; i < 16; i++) begin
      if (flag(e - 4 * i, seg) != (i >= 8)) return 1'b0;
    end
    return 1'b1;
  endfunction

  initial begin
    for (int n = 0; n < N; n++) begin
      si[n] = int'($urandom_range(0, 2)) - 1;
      sq[n] = int'($urandom_range(0, 2)) - 1;
    end
    for (int j = 0; j < NB; j++) begin
      for (int n = 0; n < SEQ_LEN; n++) begin
        si[B0 + j * PERIOD + n] += ($urandom_range(0, 1) != 0) ? 8 : -8;
        sq[B0 + j * PERIOD + n] += ($urandom_range(0, 1) != 0) ? 8 : -8;
      end
      found[j] = 0;
    end
    for (int n = 0; n < N; n++) pw[n] = si[n] * si[n] + sq[n] * sq[n];
    for (int e = 0; e < N; e++) begin
      s1[e] = sum_at(e, 0);
      s2[e] = sum_at(e, LANES * (C1 + 1));
    end
  end

  initial begin
    for (int l = 0; l < LANES; l++) lanes[l] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int j = 0; j < NCYC + 4; j++) begin
      // drive cycle j
      samp_idx = idx_t'(LANES * j);
      for (int l = 0; l < LANES; l++) begin
        if (j < NCYC) begin
          lanes[l].i = ADC_W'(si[LANES * j + l]);
          lanes[l].q = ADC_W'(sq[LANES * j + l]);
        end else begin
          lanes[l] = '0;
        end
      end
      clr = (j == C1);
      // check the result for sample cycle c = j - 3
      begin
        int  c, seg, exp_e;
        bit  exp_v;
        c     = j - 3;
        exp_v = 1'b0;
        exp_e = 0;
        seg   = (c >= C1 + 1) ? 1 : 0;
        if (c == C1 - 2) last_rep = -1000;   // the clear drops the hold-off
        if (c >= 0 && c < NCYC && !(c >= C1 - 2 && c <= C1) && c - last_rep > HOLD) begin
          for (int l = LANES - 1; l >= 0; l--) begin
            if (pattern(LANES * c + l, seg)) begin
              exp_v = 1'b1;
              exp_e = LANES * c + l;
            end
          end
        end
        if (c >= 0 && c < NCYC && !(c >= C1 - 2 && c <= C1) && c - last_rep <= HOLD)
          for (int l = 0; l < LANES; l++) if (pattern(LANES * c + l, seg)) n_supp++;
        if (exp_v) last_rep = c;
        checks++;
        if (det_valid !== exp_v) begin
          failures++;
          $display("FAIL cycle %0d: det_valid=%0b expected %0b", j, det_valid, exp_v);
        end else if (exp_v) begin
          int k, epow;
          k    = exp_e - 157;
          epow = seg ? s2[exp_e - DPOW] : s1[exp_e - DPOW];
          checks += 2;
          if (det_idx !== idx_t'(k)) begin
            failures++;
            $display("FAIL cycle %0d: det_idx=%0d expected %0d", j, det_idx, k);
          end
          if (int'(det_pow) != epow) begin
            failures++;
            $display("FAIL cycle %0d: det_pow=%0d expected %0d", j, det_pow, epow);
          end
          for (int b = 0; b < NB; b++) begin
            int d;
            d = k - (B0 + b * PERIOD + M / 2);
            if (d >= -2 && d <= 2) found[b]++;
          end
        end
      end
      @(negedge clk);
    end
    // every burst found, except the one cut short by the clear
    for (int b = 0; b < NB; b++) begin
      bit cut;
      cut = (B0 + b * PERIOD + 157 + 3 * LANES >= LANES * (C1 - 2)) &&
            (B0 + b * PERIOD - 200 < LANES * (C1 + 1));
      checks++;
      if (!cut && found[b] != 1) begin
        failures++;
        $display("FAIL burst %0d at %0d found %0d times", b, B0 + b * PERIOD, found[b]);
      end
    end
    checks++;
    if (n_supp == 0) begin
      failures++;
      $display("FAIL hold-off never dropped a hit");
    end
    $display("hits dropped by the hold-off: %0d", n_supp);
    $display("bursts found: %0d %0d %0d %0d %0d %0d %0d %0d %0d",
             found[0], found[1], found[2], found[3], found[4], found[5], found[6], found[7], found[8]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * (NCYC + 200));
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
