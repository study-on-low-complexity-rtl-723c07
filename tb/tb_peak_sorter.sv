// tb_peak_sorter: runs searches over random powers (drawn from a small range
// so that ties occur) and directed searches in which a weaker candidate lies
// a few samples before the peak.  A reference keeps all offsets of the
// search, sorts them by power with ties resolved towards the earlier offset,
// takes the top M and applies the pre-cursor rule.  Boundary, peak, the
// pre-cursor flag and the two-cycle decision latency are checked.
module tb_peak_sorter;
  import fsync_pkg::*;

  localparam int M = 5, PRE = 5, SEARCH = SYM_LEN;
  localparam int NCYC = (SEARCH + 3) / 4;

  logic clk = 0, rst_n = 0, start = 0, in_valid = 0;
  always #1 clk = ~clk;
  idx_t   in_base, boundary, peak_idx;
  mfpow_t power [LANES];
  logic   done, precursor;

  peak_sorter #(.M(M), .PRE(PRE), .SEARCH_LEN(SEARCH)) dut (.*);

  int checks = 0, failures = 0, n_pre = 0;

  task automatic one_search(input int mode);
    int     cidx [SEARCH];
    longint cpow [SEARCH];
    int     order [SEARCH];
    int     b0, n, last_cyc, cyc, exp_b, exp_p, best_gap;
    b0 = $urandom_range(65535);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    n = 0; cyc = 0;
    while (n < SEARCH) begin
      in_valid = ($urandom_range(9) != 0);
      in_base  = idx_t'(b0 + n + 3);
      for (int j = 0; j < LANES; j++) begin
        longint p;
        if (mode == 0) p = $urandom_range(40);
        else begin
          // peak at offset 100, a weaker early path 3 samples before it
          int off;
          off = n + (LANES - 1 - j);
          p = (off == 100) ? 5000 : (off == 100 - mode) ? 3000 : $urandom_range(2000);
        end
        power[j] = mfpow_t'(p);
        if (in_valid && n + (LANES - 1 - j) < SEARCH) begin
          cidx[n + LANES - 1 - j] = (b0 + n + 3 - j) & 16'hffff;
          cpow[n + LANES - 1 - j] = p;
        end
      end
      @(negedge clk);
      if (in_valid) begin
        n += LANES;
        last_cyc = cyc;
      end
      cyc++;
    end
    in_valid = 0;
    // reference: stable selection of the M largest
    for (int i = 0; i < SEARCH; i++) order[i] = i;
    for (int i = 0; i < M; i++)
      for (int k = i + 1; k < SEARCH; k++)
        if (cpow[order[k]] > cpow[order[i]] ||
            (cpow[order[k]] == cpow[order[i]] && order[k] < order[i])) begin
          int tmp; tmp = order[i]; order[i] = order[k]; order[k] = tmp;
        end
    exp_p = cidx[order[0]];
    exp_b = exp_p; best_gap = 0;
    for (int i = 1; i < M; i++) begin
      int g;
      g = (exp_p - cidx[order[i]]) & 16'hffff;
      if (g <= PRE && g > best_gap) begin best_gap = g; exp_b = cidx[order[i]]; end
    end
    // done is seen at the second negedge after the last input cycle
    checks++;
    if (done) begin failures++; $display("FAIL: done one cycle early"); end
    @(negedge clk);
    if (!done) begin failures++; $display("FAIL: done not two cycles after the last input"); end
    checks++;
    if (int'(boundary) != exp_b || int'(peak_idx) != exp_p || precursor != (exp_b != exp_p)) begin
      failures++;
      $display("FAIL mode %0d: boundary %0d/%0d peak %0d/%0d", mode, boundary, exp_b, peak_idx, exp_p);
    end
    if (precursor) n_pre++;
  endtask

  initial begin
    in_base = '0;
    for (int j = 0; j < LANES; j++) power[j] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 20; r++) one_search(0);
    for (int r = 1; r <= 7; r++) one_search(r);
    checks++;
    if (n_pre == 0) begin failures++; $display("FAIL: pre-cursor never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
