// fft_gate: FFT symbol gate.  Once the frame timing is known it cuts the
// 128-sample FFT window out of every following symbol and hands it to the FFT.
//
// `start` loads the sample index of the first window to cut (the first
// channel estimation symbol); afterwards a window begins every SYM_LEN
// samples.  Since the four paths carry samples 4t..4t+3 and a window may begin
// on any of them, the output keeps the four-path format with a per-path
// `out_mask`; a window covers 32 or 33 cycles.  `out_first` marks the cycle
// holding the window's first sample, `out_type` tells channel estimation
// symbols (the first N_CES windows) from data symbols, `sym_cnt` counts
// windows.  Cutting goes on until `stop`.
//
// Timing: inputs of cycle t appear at the outputs in cycle t+1.  The window
// length, symbol length and six channel estimation symbols follow the frame
// format of the text; the output format is this design's own.
module fft_gate
  import fsync_pkg::*;
#(
  parameter int unsigned N_CES = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  idx_t        start_idx,
  input  logic        stop,
  input  idx_t        samp_idx,
  input  sample_t     lanes [LANES],
  output logic        out_valid,
  output sample_t     out_lanes [LANES],
  output logic [LANES-1:0] out_mask,
  output logic        out_first,
  output logic        out_type,      // 0: channel estimation, 1: data
  output logic [15:0] sym_cnt
);

  logic             active;
  idx_t             win_start;
  logic [LANES-1:0] in_win, is_first, is_last;

  always_comb begin
    for (int p = 0; p < LANES; p++) begin
      idx_t d;
      d           = samp_idx + idx_t'(p) - win_start;
      in_win[p]   = active && (d < idx_t'(SEQ_LEN));
      is_first[p] = active && (d == '0);
      is_last[p]  = active && (d == idx_t'(SEQ_LEN - 1));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active    <= 1'b0;
      win_start <= '0;
      sym_cnt   <= '0;
      out_valid <= 1'b0;
      out_mask  <= '0;
      out_first <= 1'b0;
      out_type  <= 1'b0;
      for (int p = 0; p < LANES; p++) out_lanes[p] <= '0;
    end else begin
      out_valid <= |in_win;
      out_mask  <= in_win;
      out_first <= |is_first;
      out_type  <= (sym_cnt >= 16'(N_CES));
      for (int p = 0; p < LANES; p++) out_lanes[p] <= in_win[p] ? lanes[p] : '0;
      if (start) begin
        active    <= 1'b1;
        win_start <= start_idx;
        sym_cnt   <= '0;
      end else if (stop) begin
        active    <= 1'b0;
      end else if (|is_last) begin
        win_start <= win_start + idx_t'(SYM_LEN);
        sym_cnt   <= sym_cnt + 1'b1;
      end
    end
  end

endmodule
