// control_unit: sequencer of the frame synchronizer.
//
// It walks the receiver through the detection phases and drives the shared
// resources:
//   ST_PD    the auto-correlator runs packet detection on blocks of PD_BLK
//            cycles; the 4-to-1 path select rotates every SEL_HOLD cycles
//            (about a quarter symbol) so that no single path's multipath
//            fading dominates.  A packet hit moves on.
//   ST_FWD   the register file is cleared and filled with path 0 (one word
//            per cycle); once it holds 32 words the matched filter runs and
//            the peak sorter examines one symbol of offsets.  Its boundary is
//            the sample index where a sync sequence starts.
//   ST_ALIGN the boundary is stepped by whole symbols until it lies ahead of
//            the samples now arriving.
//   ST_PTD   for every symbol the 32 samples s, s+4, .., s+124 of its sync
//            sequence (cyclic prefix and guard left out) are marked for the
//            auto-correlator, the path select pointing at s's path.  When the
//            dynamic threshold reports the frame sync symbol, the first
//            channel estimation symbol is known to start N_FS+1 symbols after
//            the last packet sync symbol, and the FFT gate is started there.
//            Without a report within PTD_MAX windows the packet is dropped.
//   ST_GATE  the gate cuts symbols until `frame_end`; then back to ST_PD.
//
// Timing: `samp_idx` is the index of path 0's sample in the current cycle.
// The frame sync report for window Y arrives 75 cycles after the window
// started, after window Y+1 began (41 or 42 cycles) and before window Y+2
// does (82 or 83 cycles).  The window start register is advanced as a window
// begins, so it then holds the start of Y+2, and the gate start is derived
// from it.  Phases and their order follow the text; the
// block length, select period, alignment step and timeout are this design's
// own.
module control_unit
  import fsync_pkg::*;
#(
  parameter int unsigned PD_BLK   = (SYM_LEN - 1) / LANES + 1,  // 42 products per block
  parameter int unsigned SEL_HOLD = 10,
  parameter int unsigned N_FS     = 3,
  parameter int unsigned PTD_MAX  = 32
) (
  input  logic       clk,
  input  logic       rst_n,
  input  idx_t       samp_idx,
  input  logic       frame_end,
  // auto-correlator
  input  logic       pd_hit,
  input  logic       ptd_fs,
  output logic       ac_start,
  output ac_mode_e   ac_mode,
  output logic [1:0] ac_sel,
  output logic       ac_mark,
  output logic       ac_last,
  // register file, matched filter, peak sorter
  output logic       rf_clr,
  output logic       rf_en,
  input  logic       rf_full,
  output logic       mf_valid,
  output idx_t       mf_base,
  output logic       ps_start,
  input  logic       ps_done,
  input  idx_t       ps_boundary,
  // FFT gate
  output logic       gate_start,
  output idx_t       gate_idx,
  output logic       gate_stop,
  // status
  output fs_state_e  state,
  output logic       ptd_timeout
);

  localparam int unsigned BW = $clog2(PD_BLK);
  localparam int unsigned HW = $clog2(SEL_HOLD);

  fs_state_e     nxt;
  logic          entry;       // first cycle in the current state
  logic [BW-1:0] blk_cnt;
  logic [HW-1:0] hold_cnt;
  logic [1:0]    pd_sel;
  idx_t          sym_start;   // next sync sequence start to mark
  idx_t          wbase;       // index of window position 0 (previous cycle, path 0)
  idx_t          ahead;
  logic          marking;
  logic [4:0]    mark_cnt;
  logic [1:0]    win_sel;
  logic [5:0]    win_num;
  logic          win_go;

  always_comb begin
    wbase  = samp_idx - idx_t'(LANES);
    ahead  = sym_start - wbase;
    win_go = (state == ST_PTD) && !entry && !marking && (ahead < idx_t'(LANES));
  end

  // next state
  always_comb begin
    nxt = state;
    unique case (state)
      ST_PD:    if (pd_hit) nxt = ST_FWD;
      ST_FWD:   if (ps_done) nxt = ST_ALIGN;
      ST_ALIGN: if (!ahead[IDX_W-1]) nxt = ST_PTD;
      ST_PTD:   if (ptd_fs) nxt = ST_GATE;
                else if (ptd_timeout) nxt = ST_PD;
      ST_GATE:  if (frame_end) nxt = ST_PD;
      default:  nxt = ST_PD;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= ST_PD;
      entry        <= 1'b1;
      blk_cnt      <= '0;
      hold_cnt     <= '0;
      pd_sel       <= '0;
      sym_start    <= '0;
      marking      <= 1'b0;
      mark_cnt     <= '0;
      win_sel      <= '0;
      win_num      <= '0;
    end else begin
      state <= nxt;
      entry <= (nxt != state);
      // packet detection block and path-select counters
      if (state != ST_PD) begin
        blk_cnt  <= '0;
        hold_cnt <= '0;
      end else if (entry) begin
        // the entry cycle is the first cycle of the first block
        blk_cnt  <= BW'(1);
        hold_cnt <= HW'(1);
      end else begin
        blk_cnt <= (blk_cnt == BW'(PD_BLK - 1)) ? '0 : blk_cnt + 1'b1;
        if (hold_cnt == HW'(SEL_HOLD - 1)) begin
          hold_cnt <= '0;
          pd_sel   <= pd_sel + 1'b1;
        end else begin
          hold_cnt <= hold_cnt + 1'b1;
        end
      end
      // boundary capture and alignment
      if (state == ST_FWD && ps_done) begin
        sym_start    <= ps_boundary;
      end else if (state == ST_ALIGN && ahead[IDX_W-1]) begin
        sym_start    <= sym_start + idx_t'(SYM_LEN);
      end
      // preamble timing windows
      if (state != ST_PTD) begin
        marking <= 1'b0;
        win_num <= '0;
      end else if (win_go) begin
        marking   <= 1'b1;
        mark_cnt  <= 5'd1;
        win_sel   <= ahead[1:0];
        sym_start <= sym_start + idx_t'(SYM_LEN);
        if (win_num != 6'(PTD_MAX)) win_num <= win_num + 1'b1;
      end else if (marking) begin
        mark_cnt <= mark_cnt + 1'b1;
        if (mark_cnt == 5'd31) marking <= 1'b0;
      end
    end
  end

  // auto-correlator controls
  always_comb begin
    ac_start = entry && (state == ST_PD || state == ST_PTD);
    ac_mode  = (state == ST_PTD) ? AC_PTD : AC_PD;
    ac_sel   = '0;
    ac_mark  = 1'b0;
    ac_last  = 1'b0;
    if (state == ST_PD) begin
      ac_sel  = pd_sel;
      ac_mark = 1'b1;
      ac_last = (blk_cnt == BW'(PD_BLK - 1));
    end else if (state == ST_PTD) begin
      if (win_go) begin
        ac_sel  = ahead[1:0];
        ac_mark = 1'b1;
      end else if (marking) begin
        ac_sel  = win_sel;
        ac_mark = 1'b1;
        ac_last = (mark_cnt == 5'd31);
      end
    end
  end

  // matched filter controls
  always_comb begin
    rf_clr   = entry && (state == ST_FWD);
    ps_start = rf_clr;
    rf_en    = (state == ST_FWD);
    mf_valid = (state == ST_FWD) && rf_full && !entry;
    mf_base  = samp_idx - idx_t'(SEQ_LEN);
  end

  // gate controls: sym_start holds the start of Y+2, so Y = sym_start - 2
  // symbols; the first channel estimation symbol is Y + 1 + N_FS.
  always_comb begin
    gate_start  = (state == ST_PTD) && ptd_fs;
    gate_idx    = sym_start - idx_t'(2 * SYM_LEN) + idx_t'((N_FS + 1) * SYM_LEN);
    gate_stop   = (state == ST_GATE) && frame_end;
    ptd_timeout = (state == ST_PTD) && (win_num == 6'(PTD_MAX)) && !marking;
  end

endmodule
