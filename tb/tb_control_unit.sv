// tb_control_unit: plays the other blocks around the control unit.  It
// checks the packet-detection schedule (a block end every 42 cycles, path
// select stepping every 10), the FFT-window phase (clear pulse, register
// file enabled, matched filter valid from the 33rd write with base =
// current index - 128), the preamble-timing windows (32 marked cycles whose
// first sample is a sync-sequence start b + 165k, constant select, block end
// on the 32nd), the FFT gate start index when a frame sync is reported 75
// cycles after a window began, the return to packet detection on
// `frame_end`, and the timeout when no frame sync comes.
module tb_control_unit;
  timeunit 1ns;
  timeprecision 100ps;
  import fsync_pkg::*;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  idx_t samp_idx;
  logic frame_end = 0, pd_hit = 0, ptd_fs = 0;
  logic ac_start, ac_mark, ac_last, rf_clr, rf_en, rf_full, mf_valid, ps_start, ps_done = 0;
  ac_mode_e ac_mode;
  logic [1:0] ac_sel;
  idx_t mf_base, ps_boundary, gate_idx;
  logic gate_start, gate_stop, ptd_timeout;
  fs_state_e state;

  control_unit dut (.*);

  int t = 0, checks = 0, failures = 0;
  int rf_writes = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0d: %s", t, what); end
  endtask

  assign rf_full = (rf_writes >= 32);

  // register-file write count as the real register file keeps it
  always @(posedge clk) begin
    if (rf_clr) rf_writes <= 0;
    else if (rf_en) rf_writes <= rf_writes + 1;
  end

  task automatic step();
    @(negedge clk);
    t++;
    samp_idx = idx_t'(4 * t);
    #0.1;
  endtask

  // one packet: returns after the gate started (fs=1) or the timeout (fs=0)
  task automatic run_packet(input bit fs);
    int last_cnt, sel_prev, sel_steps, last_step, b, k, win_start_t, nwin, S;
    bit seen_gate;
    // packet detection for a while
    last_cnt = 0; sel_steps = 0;
    check(state == ST_PD, "starts in packet detection");
    for (int c = 0; c < 42 * 5; c++) begin
      if (c > 0 && ac_sel != 2'(sel_prev)) begin
        sel_steps++;
        check(ac_sel == 2'(sel_prev + 1), "select steps through the paths in order");
        if (sel_steps > 1) check(c - last_step == 10, $sformatf("select held %0d cycles", c - last_step));
        last_step = c;
      end
      sel_prev = ac_sel;
      check(ac_mark && ac_mode == AC_PD, "marks every cycle in packet detection");
      if (ac_last) last_cnt++;
      step();
    end
    check(last_cnt == 5, $sformatf("5 block ends in 210 cycles, saw %0d", last_cnt));
    check(sel_steps >= 20, $sformatf("select stepped %0d times in 210 cycles", sel_steps));
    // packet found
    pd_hit = 1; step(); pd_hit = 0;
    check(state == ST_FWD && rf_clr && ps_start, "FFT window phase starts with a clear");
    step();
    for (int c = 1; c <= 34; c++) begin
      check(rf_en, "register file enabled");
      check(mf_valid == (c >= 33), $sformatf("matched filter valid after 32 writes (c=%0d)", c));
      if (mf_valid) check(mf_base == samp_idx - 16'd128, "matched filter base index");
      step();
    end
    // boundary some symbols in the past
    b = 4 * t - 700 + 2;
    ps_boundary = idx_t'(b);
    ps_done = 1; step(); ps_done = 0;
    // alignment and timing windows
    nwin = 0; seen_gate = 0; win_start_t = -1000;
    for (int c = 0; c < 34 * 42 && !seen_gate && state != ST_PD; c++) begin
      if (state == ST_PTD && ac_mark) begin
        int iw;
        iw = 4 * (t - 1) + ac_sel;                       // window position of the marked sample
        check(((iw - b) % SYM_LEN) == 0 && iw - b > 0, $sformatf("window starts on a sync start (%0d)", iw - b));
        check(ac_mode == AC_PTD, "preamble timing mode");
        if (nwin > 0) check(iw - S == SYM_LEN, "windows one symbol apart");
        S = iw;
        for (int m = 0; m < 32; m++) begin
          check(ac_mark && 4 * (t - 1) + ac_sel == iw + 4 * m && ac_last == (m == 31), "window marks");
          if (fs && nwin == 3 && m == 31) begin
            // report 75 cycles after the window began: t = start + 75
            repeat (75 - 31) step();
            ptd_fs = 1;
            #0.1;
            check(gate_start && int'(gate_idx) == ((S + 4 * SYM_LEN) & 16'hffff),
                  $sformatf("gate start %0d expected %0d", gate_idx, (S + 4 * SYM_LEN) & 16'hffff));
            step();
            ptd_fs = 0;
            check(state == ST_GATE, "gate phase");
            seen_gate = 1;
            break;
          end
          step();
        end
        nwin++;
      end else begin
        if (ptd_timeout) check(!fs && nwin == 32, $sformatf("timeout after %0d windows", nwin));
        step();
      end
    end
    if (fs) begin
      check(seen_gate, "frame sync led to the gate");
      repeat (20) step();
      frame_end = 1;
      #0.1;
      check(gate_stop, "gate stopped at frame end");
      step();
      frame_end = 0;
      check(state == ST_PD && ac_start, "back to packet detection");
    end else begin
      check(state == ST_PD && nwin == 32, $sformatf("timed out to packet detection after %0d windows", nwin));
    end
    step();
  endtask

  initial begin
    ps_boundary = '0;
    samp_idx = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_packet(1);
    run_packet(0);
    run_packet(1);
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
