// tb_tap_reduction_mf: feeds path 0 of a random sample stream into the
// register file and the tap-reduction matched filter, as the top level does,
// and checks each of the four powers against a direct evaluation of
//     | sum_k rf(r[m + 4k + j]) * s[4k + j] |^2   with m = base - j
// from the stream history, two cycles after the words were presented.  The
// search is restarted once (register-file clear and tap reload) midway.
module tb_tap_reduction_mf;
  import fsync_pkg::*;

  localparam int NCYC = 400;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  sample_t stream [4 * NCYC];
  logic    clr, en, full, in_valid, out_valid;
  rfword_t words [NTAPS];
  logic [4:0] waddr;
  idx_t    in_base, out_base;
  mfpow_t  power [LANES];
  int      t;

  addr_regfile #(.DEPTH(NTAPS)) u_rf (
    .clk, .rst_n, .clr, .en, .wdata(to_rfword(stream[4 * t])),
    .words, .waddr, .full
  );
  tap_reduction_mf dut (
    .clk, .rst_n, .load(clr), .shift(en && !clr), .in_valid, .in_base,
    .words, .out_valid, .out_base, .power
  );

  int checks = 0, failures = 0, nvalid = 0;

  function automatic longint ref_power(int m, int j);
    int si, sq;
    rfword_t w;
    si = 0; sq = 0;
    for (int k = 0; k < NTAPS; k++) begin
      w = to_rfword(stream[m + 4 * k + j]);
      si += SYNC_SEQ[4 * k + j] ? int'(w.i) : -int'(w.i);
      sq += SYNC_SEQ[4 * k + j] ? int'(w.q) : -int'(w.q);
    end
    return longint'(si) * si + longint'(sq) * sq;
  endfunction

  // the words of cycle t hold samples 4(t-32) .. 4(t-1) of path 0
  assign in_valid = full && !clr;
  assign in_base  = idx_t'(4 * t - 4 * NTAPS);

  initial begin
    for (int n = 0; n < 4 * NCYC; n++) stream[n] = sample_t'($urandom);
    t = 0; clr = 0; en = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    clr = 1; en = 1;
    while (t < NCYC - 1) begin
      @(negedge clk);
      t++;
      clr = (t == 150);
      if (out_valid) begin
        int b;
        nvalid++;
        b = int'(out_base);
        for (int j = 0; j < LANES; j++) begin
          longint e;
          e = ref_power(b - j, j);
          checks++;
          if (b != 4 * (t - 2) - 4 * NTAPS || longint'(power[j]) != e) begin
            failures++;
            $display("FAIL t=%0d j=%0d base=%0d power=%0d expected %0d", t, j, b, power[j], e);
          end
        end
      end
    end
    // fills: writes from t=1 and t=151, 32 words each, then 2 pipeline
    // cycles; the clear at t=150 stops the first run
    checks++;
    if (nvalid != (150 - (NTAPS + 1)) + (NCYC - 1 - (151 + NTAPS + 2) + 1)) begin
      failures++;
      $display("FAIL: %0d valid outputs", nvalid);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * NCYC) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
