// tb_fft_gate: a random stream whose 16-bit sample index wraps during the
// run; the gate is started at a random index a little ahead and stopped
// after 10 windows.  A reference marks sample n as inside a window when
// (n - start) mod 165 < 128 for the windows between start and stop, and the
// output mask, data, first flag, CES/data type and the window count are
// checked one cycle after the input.
module tb_fft_gate;
  import fsync_pkg::*;

  localparam int T0 = 16300;       // first cycle number: index 65200, wraps soon
  localparam int NCYC = 600;

  logic clk = 0, rst_n = 0, start = 0, stop = 0;
  always #1 clk = ~clk;
  idx_t start_idx, samp_idx;
  sample_t lanes [LANES], out_lanes [LANES];
  logic out_valid, out_first, out_type;
  logic [LANES-1:0] out_mask;
  logic [15:0] sym_cnt;

  fft_gate #(.N_CES(6)) dut (.*);

  int t, checks = 0, failures = 0, s0, stop_t, nwin = 0;
  sample_t hist [LANES];
  bit      active_ref;
  int      first_seen = 0;

  initial begin
    for (int p = 0; p < LANES; p++) lanes[p] = '0;
    t = T0;
    samp_idx = idx_t'(4 * t);
    start_idx = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    s0 = 4 * (T0 + 5) + 3;
    stop_t = -1;
    active_ref = 0;
    for (int c = 0; c < NCYC; c++) begin
      // outputs of the previous cycle
      if (c > 0) begin
        logic [LANES-1:0] emask;
        bit efirst, etype;
        emask = '0; efirst = 0; etype = 0;
        for (int p = 0; p < LANES; p++) begin
          int n, d;
          n = 4 * (t - 1) + p;
          d = n - s0;
          if (active_ref && d >= 0 && (d % SYM_LEN) < SEQ_LEN) begin
            emask[p] = 1;
            if (d % SYM_LEN == 0) efirst = 1;
            etype = (d / SYM_LEN) >= 6;
          end
        end
        checks++;
        if (out_mask != emask || out_first != efirst || (|emask && out_type != etype)) begin
          failures++;
          $display("FAIL t=%0d: mask %b/%b first %0b/%0b type %0b/%0b", t, out_mask, emask, out_first, efirst, out_type, etype);
        end
        for (int p = 0; p < LANES; p++) if (emask[p]) begin
          checks++;
          if (out_lanes[p] != hist[p]) begin failures++; $display("FAIL t=%0d: data lane %0d", t, p); end
        end
        if (efirst) nwin++;
      end
      // stimulus for cycle t
      for (int p = 0; p < LANES; p++) lanes[p] = sample_t'($urandom);
      hist = lanes;
      samp_idx = idx_t'(4 * t);
      start = (c == 3);
      start_idx = idx_t'(s0);
      if (c == 3) active_ref = 1;
      stop = (nwin == 10 && stop_t < 0 && ((4 * t - s0) % SYM_LEN) >= SEQ_LEN + 4);
      if (stop) begin stop_t = t; end
      @(negedge clk);
      if (stop) active_ref = 0;
      t++;
    end
    checks++;
    if (nwin != 10 || stop_t < 0) begin failures++; $display("FAIL: %0d windows", nwin); end
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
