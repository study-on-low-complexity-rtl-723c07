// frame_sync_top: low-complexity frame synchronizer for a 528 MS/s OFDM
// (UWB) receiver, running at 132 MHz on four parallel sample paths.
//
// Flow: the shared auto-correlator finds a packet by the repetition of the
// packet sync symbols (3-symbol lag, every fourth sample); the tap-reduction
// matched filter, four 32-tap sub filters fed from one 32-word address-based
// register file, scans one symbol of offsets and the peak sorter picks the
// FFT window boundary with a TOP-5 pre-cursor search; the auto-correlator
// then compares consecutive sync sequences against a dynamic threshold to
// find the sign flip of the frame sync symbols; finally the FFT gate cuts
// the 128-sample window of every channel estimation and data symbol.
//
// Interface: `adc` carries samples 4t..4t+3 of the 528 MS/s stream in cycle
// t, every cycle.  `pd_thr` is the packet-detection threshold on the
// normalised correlation, in units of 1/256.  `frame_end` (from the
// MAC/decoder) returns the synchronizer to packet detection.  Status pulses:
// `pkt_detect`, `boundary_valid` (with `fft_boundary`, the sample index of a
// sync sequence start, and `precursor`), `frame_sync`, `ptd_timeout`.
// `samp_idx` is the wrapping index of adc[0] in the current cycle.  The FFT
// output is one cycle behind the input.
// The `mb_` ports belong to the multi-band (MB-OFDM) variant of the
// synchronizer, which sits beside the main one with its own sample input
// `mb_adc` (indexed by the same `samp_idx`).  Its band detector reports the
// sub-band burst position and energy on `mb_band_*`, and the training AGC
// turns each report into the VGA gain `mb_gain`.  `mb_train_save` and
// `mb_train_load` store and restore trained gains; `mb_clr` restarts the
// band search.  The `w_` ports belong to a third receiver, the IEEE 802.11a
// synchronizer (one 20 MS/s sample per valid cycle on `w_valid`/`w_re`/
// `w_im`): packet announcement on `w_pkt_*`, FFT window boundary from the
// most-significant-taps matched filter on `w_boundary*`, `w_rearm` to search
// for the next packet.  The three receivers share only clock and reset.
// The architecture follows the text;
// the handshake-free stream interface and status outputs are this design's
// own.
module frame_sync_top
  import fsync_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  sample_t          adc [LANES],
  input  logic [7:0]       pd_thr,
  input  logic             frame_end,
  output logic             fft_valid,
  output sample_t          fft_data [LANES],
  output logic [LANES-1:0] fft_mask,
  output logic             fft_first,
  output logic             fft_type,
  output logic [15:0]      fft_sym_cnt,
  output logic             pkt_detect,
  output logic             boundary_valid,
  output idx_t             fft_boundary,
  output logic             precursor,
  output logic             frame_sync,
  output logic             ptd_timeout,
  output logic [2:0]       state,
  output idx_t             samp_idx,
  // multi-band variant: band detection and training AGC, own sample input
  input  sample_t          mb_adc [LANES],
  input  logic             mb_clr,
  input  logic             mb_train_sel,
  input  logic             mb_train_save,
  input  logic             mb_train_load,
  output logic             mb_band_valid,
  output idx_t             mb_band_idx,
  output logic [2*ADC_W+$clog2(SEQ_LEN)-1:0] mb_band_pow,
  output logic [6:0]       mb_gain,
  output logic signed [5:0] mb_gain_est,
  output logic             mb_gain_coarse,
  input  logic             w_valid,
  input  logic signed [7:0] w_re,
  input  logic signed [7:0] w_im,
  input  logic [7:0]       w_thr,
  input  logic             w_rearm,
  output logic             w_pkt_detect,
  output logic [15:0]      w_pkt_idx,
  output logic             w_pkt_cand,
  output logic             w_pkt_cancel,
  output logic             w_boundary_valid,
  output logic [15:0]      w_boundary,
  output logic             w_precursor
);

  fs_state_e  st;
  logic       ac_start, ac_mark, ac_last;
  ac_mode_e   ac_mode;
  logic [1:0] ac_sel;
  logic       pd_eval, pd_pass, pd_hit, ptd_eval, ptd_fs;
  logic signed [17:0] blk_re, blk_im;
  logic [15:0] blk_pow;
  logic       rf_clr, rf_en, rf_full, mf_valid, ps_start, ps_done;
  idx_t       mf_base, ps_boundary, ps_peak;
  logic       gate_start, gate_stop;
  idx_t       gate_idx;
  rfword_t    rf_words [NTAPS];
  logic [$clog2(NTAPS)-1:0] rf_waddr;
  logic       mfo_valid;
  idx_t       mfo_base;
  mfpow_t     mfo_pow [LANES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) samp_idx <= '0;
    else        samp_idx <= samp_idx + idx_t'(LANES);
  end

  control_unit u_ctrl (
    .clk, .rst_n, .samp_idx, .frame_end,
    .pd_hit, .ptd_fs,
    .ac_start, .ac_mode, .ac_sel, .ac_mark, .ac_last,
    .rf_clr, .rf_en, .rf_full, .mf_valid, .mf_base,
    .ps_start, .ps_done, .ps_boundary,
    .gate_start, .gate_idx, .gate_stop,
    .state(st), .ptd_timeout
  );

  shared_autocorr u_ac (
    .clk, .rst_n, .start(ac_start), .mode(ac_mode), .lanes(adc),
    .sel(ac_sel), .mark(ac_mark), .last(ac_last), .pd_thr,
    .pd_eval, .pd_pass, .pd_hit, .ptd_eval, .ptd_fs,
    .blk_re, .blk_im, .blk_pow
  );

  addr_regfile #(.DEPTH(NTAPS)) u_rf (
    .clk, .rst_n, .clr(rf_clr), .en(rf_en), .wdata(to_rfword(adc[0])),
    .words(rf_words), .waddr(rf_waddr), .full(rf_full)
  );

  tap_reduction_mf u_mf (
    .clk, .rst_n, .load(rf_clr), .shift(rf_en && !rf_clr),
    .in_valid(mf_valid), .in_base(mf_base), .words(rf_words),
    .out_valid(mfo_valid), .out_base(mfo_base), .power(mfo_pow)
  );

  peak_sorter u_ps (
    .clk, .rst_n, .start(ps_start), .in_valid(mfo_valid), .in_base(mfo_base),
    .power(mfo_pow), .done(ps_done), .boundary(ps_boundary),
    .peak_idx(ps_peak), .precursor
  );

  fft_gate u_gate (
    .clk, .rst_n, .start(gate_start), .start_idx(gate_idx), .stop(gate_stop),
    .samp_idx, .lanes(adc),
    .out_valid(fft_valid), .out_lanes(fft_data), .out_mask(fft_mask),
    .out_first(fft_first), .out_type(fft_type), .sym_cnt(fft_sym_cnt)
  );

  assign state          = st;
  assign pkt_detect     = pd_hit && (st == ST_PD);
  assign boundary_valid = ps_done;
  assign fft_boundary   = ps_boundary;
  assign frame_sync     = ptd_fs && (st == ST_PTD);

  // Multi-band receiver front: the dynamic searching window finds the
  // sub-band burst, and its energy drives the VGA gain loop.
  band_detect u_band (
    .clk, .rst_n, .clr(mb_clr), .samp_idx, .lanes(mb_adc),
    .det_valid(mb_band_valid), .det_idx(mb_band_idx), .det_pow(mb_band_pow)
  );

  training_agc #(.PW(2*ADC_W+$clog2(SEQ_LEN))) u_agc (
    .clk, .rst_n, .meas_valid(mb_band_valid), .meas_pow(mb_band_pow),
    .train_sel(mb_train_sel), .train_save(mb_train_save), .train_load(mb_train_load),
    .gain(mb_gain), .est(mb_gain_est), .coarse(mb_gain_coarse)
  );

  // 802.11a receiver: packet detection and FFT window detection.
  wlan_frame_sync u_wlan (
    .clk, .rst_n, .in_valid(w_valid), .in_re(w_re), .in_im(w_im),
    .thr(w_thr), .rearm(w_rearm),
    .pkt_detect(w_pkt_detect), .pkt_idx(w_pkt_idx),
    .pkt_cand(w_pkt_cand), .pkt_cancel(w_pkt_cancel),
    .boundary_valid(w_boundary_valid), .boundary(w_boundary), .precursor(w_precursor)
  );

endmodule
