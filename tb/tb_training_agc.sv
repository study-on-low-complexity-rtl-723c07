// tb_training_agc: self-checking testbench for the training AGC.
//
// Part 1 feeds random measurements at random gains.  It recomputes the
// table's boundaries from the formula, checks each one against the exact
// real value (within 0.05 dB), and checks est, coarse and the next gain
// against the update rule.  Part 2 closes the loop around a model VGA:
// the measured energy is P_TARGET * 10^((gain - g_opt) / 10).  For g_opt
// across the range, the gain must settle at g_opt within 10 measurements
// from the reset gain.  That makes coarse steps in both directions and then
// fine steps happen.  Part 3 stores gains in both training slots and
// restores them.  Each mechanism is counted and must occur.  A watchdog
// ends the run.
module tb_training_agc;

  localparam int PW = 17;
  localparam int PT = 8192;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          meas_valid = 1'b0;
  logic [PW-1:0] meas_pow = '0;
  logic          train_sel = 1'b0;
  logic          train_save = 1'b0;
  logic          train_load = 1'b0;
  logic [6:0]    gain;
  logic signed [5:0] est;
  logic          coarse;

  training_agc dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_up = 0, n_down = 0, n_fine = 0, n_clamp = 0, n_restore = 0;
  longint bnd [22];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic int table_est(input longint m);
    int c = 0;
    for (int i = 0; i < 22; i++) if (m >= bnd[i]) c++;
    return 11 - c;
  endfunction

  // one measurement: drive, clock, compare against the rule
  task automatic measure(input longint m);
    int g0, e, g1;
    bit cs;
    g0 = int'(gain);
    e  = table_est(m);
    cs = 1'b0;
    if (e > 10) begin g1 = g0 + (70 - g0) / 2; cs = 1'b1; n_up++; end
    else if (e < -10) begin g1 = g0 - g0 / 2; cs = 1'b1; n_down++; end
    else begin
      g1 = g0 + e;
      if (g1 > 70 || g1 < 0) n_clamp++;
      if (g1 > 70) g1 = 70;
      if (g1 < 0) g1 = 0;
      n_fine++;
    end
    meas_pow   = PW'(m);
    meas_valid = 1'b1;
    @(negedge clk);
    meas_valid = 1'b0;
    check(int'(gain) == g1, $sformatf("gain %0d -> %0d expected %0d (m=%0d)", g0, gain, g1, m));
    check(int'(est) == e, $sformatf("est %0d expected %0d (m=%0d)", est, e, m));
    check(coarse == cs, $sformatf("coarse %0b expected %0b", coarse, cs));
  endtask

  function automatic longint vga_out(input int g, input int g_opt);
    real v;
    v = real'(PT) * (10.0 ** (real'(g - g_opt) / 10.0));
    if (v > real'((longint'(1) << PW) - 1)) return (longint'(1) << PW) - 1;
    return longint'(v);
  endfunction

  initial begin
    // boundaries by the formula, checked against the exact dB values
    bnd[0] = longint'(PT) * 891 / 10000;
    for (int i = 1; i < 22; i++) bnd[i] = bnd[i-1] * 12589 / 10000;
    for (int i = 0; i < 22; i++) begin
      real exact, db;
      exact = real'(PT) * (10.0 ** ((real'(i) - 10.5) / 10.0));
      db = 10.0 * $log10(real'(bnd[i]) / exact);
      check(db < 0.05 && db > -0.05, $sformatf("boundary %0d off by %f dB", i, db));
    end

    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(gain == 7'd35, "reset gain");

    // part 1: random measurements
    for (int n = 0; n < 400; n++) begin
      longint m;
      case ($urandom_range(0, 3))
        0: m = longint'($urandom_range(0, 700));
        1: m = longint'($urandom_range(0, (1 << PW) - 1));
        default: m = bnd[$urandom_range(0, 21)] + longint'($urandom_range(0, 2)) - 1;
      endcase
      measure(m);
    end

    // part 2: closed loop, from the reset gain
    for (int g_opt = 2; g_opt <= 68; g_opt += 3) begin
      rst_n = 1'b0;
      @(negedge clk);
      rst_n = 1'b1;
      for (int n = 0; n < 10; n++) measure(vga_out(int'(gain), g_opt));
      check(int'(gain) == g_opt, $sformatf("loop for %0d settled at %0d", g_opt, gain));
    end

    // part 3: training slots
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 10; n++) measure(vga_out(int'(gain), 12));   // noise floor
    train_sel = 1'b0; train_save = 1'b1;
    @(negedge clk);
    train_save = 1'b0;
    for (int n = 0; n < 10; n++) measure(vga_out(int'(gain), 51));   // signal
    train_sel = 1'b1; train_save = 1'b1;
    @(negedge clk);
    train_save = 1'b0;
    measure(bnd[0] - 1);                                              // disturb
    for (int s = 0; s < 2; s++) begin
      train_sel  = s[0];
      train_load = 1'b1;
      meas_valid = 1'b1;                                               // load wins
      meas_pow   = '0;
      @(negedge clk);
      train_load = 1'b0;
      meas_valid = 1'b0;
      check(int'(gain) == (s == 0 ? 12 : 51), $sformatf("slot %0d restored %0d", s, gain));
      check(coarse == 1'b0, "coarse after restore");
      n_restore++;
    end

    check(n_up > 0, "coarse step up happened");
    check(n_down > 0, "coarse step down happened");
    check(n_fine > 0, "fine step happened");
    check(n_clamp > 0, "clamp happened");
    check(n_restore == 2, "restores happened");
    $display("coarse up %0d, coarse down %0d, fine %0d, clamped %0d, restored %0d",
             n_up, n_down, n_fine, n_clamp, n_restore);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
