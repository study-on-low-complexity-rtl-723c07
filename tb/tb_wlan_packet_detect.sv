// tb_wlan_packet_detect: self-checking testbench for the 802.11a packet
// detector.
//
// The stream, one sample per cycle: noise; a short periodic stretch (period
// 16) too short to survive the decision window; noise; a full short
// preamble (ten repetitions of a random 16-sample symbol) with light noise;
// random data.  After the first detection the detector is re-armed, and a
// second preamble must be found.  The reference recomputes C and P for every
// sample by direct summation over the last 48 lagged pairs, applies the
// threshold, and runs its own decision-window state machine.  `cand`,
// `cancel`, `detect` and `det_idx` are compared cycle by cycle, three cycles
// after the sample's cycle.  Cancellations and detections must both occur.
// A watchdog ends the run.
module tb_wlan_packet_detect;

  localparam int DW   = 8;
  localparam int NS   = 2400;
  localparam int DWIN = 32;
  localparam int THR  = 100;
  localparam int FAKE = 300, PRE1 = 700, PRE2 = 1700;

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b0;
  logic                 in_valid = 1'b0;
  logic signed [DW-1:0] in_re = '0, in_im = '0;
  logic [7:0]           thr = 8'(THR);
  logic                 rearm = 1'b0;
  logic                 detect, cand, cancel;
  logic [15:0]          det_idx;

  wlan_packet_detect dut (.*);

  always #5 clk = ~clk;

  int xr [NS];
  int xi [NS];
  bit pass [NS];
  int checks = 0, failures = 0, n_det = 0, n_cancel = 0;

  initial begin
    int sr [16];
    int si [16];
    for (int n = 0; n < NS; n++) begin
      xr[n] = $urandom_range(0, 40) - 20;
      xi[n] = $urandom_range(0, 40) - 20;
    end
    for (int seg = 0; seg < 3; seg++) begin
      int b, len;
      b   = (seg == 0) ? FAKE : (seg == 1) ? PRE1 : PRE2;
      len = (seg == 0) ? 36 : 160;
      for (int k = 0; k < 16; k++) begin
        sr[k] = $urandom_range(0, 120) - 60;
        si[k] = $urandom_range(0, 120) - 60;
      end
      for (int n = 0; n < len; n++) begin
        xr[b + n] = sr[n % 16] + $urandom_range(0, 6) - 3;
        xi[b + n] = si[n % 16] + $urandom_range(0, 6) - 3;
      end
    end
    // reference pass/fail per sample
    for (int i = 0; i < NS; i++) begin
      longint cr, ci, p;
      cr = 0; ci = 0; p = 0;
      pass[i] = 1'b0;
      if (i >= 63) begin
        for (int j = i - 47; j <= i; j++) begin
          cr += xr[j-16] * xr[j] + xi[j-16] * xi[j];
          ci += xi[j-16] * xr[j] - xr[j-16] * xi[j];
          p  += xr[j] * xr[j] + xi[j] * xi[j];
        end
        pass[i] = (p != 0) && ((cr * cr + ci * ci) * 256 >= THR * p * p);
      end
    end
  end

  initial begin
    int st, w;      // reference: 0 idle, 1 window, 2 done
    bit e_det, e_can, e_cand;
    st = 0;
    w  = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int j = 0; j < NS + 3; j++) begin
      // check sample i = j - 3
      if (j >= 3) begin
        int i;
        i     = j - 3;
        e_det = 1'b0;
        e_can = 1'b0;
        if (i >= 63) begin
          case (st)
            0: if (pass[i]) begin st = 1; w = 0; end
            1: if (!pass[i]) begin st = 0; e_can = 1'b1; end
               else if (w == DWIN - 1) begin st = 2; e_det = 1'b1; end
               else w++;
            default: ;
          endcase
        end
        e_cand = (st == 1);
        checks += 3;
        if (detect !== e_det) begin failures++; $display("FAIL sample %0d detect=%0b", i, detect); end
        if (cancel !== e_can) begin failures++; $display("FAIL sample %0d cancel=%0b", i, cancel); end
        if (cand !== e_cand) begin failures++; $display("FAIL sample %0d cand=%0b", i, cand); end
        if (e_det) begin
          n_det++;
          checks += 2;
          if (int'(det_idx) != i) begin failures++; $display("FAIL det_idx %0d expected %0d", det_idx, i); end
          if (!((n_det == 1 && i > PRE1 && i < PRE1 + 160) || (n_det == 2 && i > PRE2 && i < PRE2 + 160))) begin
            failures++;
            $display("FAIL detection at %0d outside a preamble", i);
          end
        end
        if (e_can) n_cancel++;
      end
      // re-arm once, well after the first preamble
      rearm = (j == PRE1 + 400);
      if (rearm && st == 2) st = 3;   // takes effect after this cycle's edge
      if (j < NS) begin
        in_valid = 1'b1;
        in_re    = DW'(xr[j]);
        in_im    = DW'(xi[j]);
      end else begin
        in_valid = 1'b0;
      end
      @(negedge clk);
      if (st == 3) st = 0;
    end
    checks += 2;
    if (n_det != 2) begin failures++; $display("FAIL %0d detections, expected 2", n_det); end
    if (n_cancel == 0) begin failures++; $display("FAIL no cancelled candidate"); end
    $display("detections %0d, cancelled candidates %0d", n_det, n_cancel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #((NS + 100) * 10);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
