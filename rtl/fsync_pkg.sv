// fsync_pkg: types, sizes and the sync sequence shared by the frame
// synchronizer blocks.
//
// The receiver runs at 132 MHz and takes four complex ADC samples per cycle
// (a 528 MS/s stream split into four paths).  Sample n of the stream sits in
// lane n mod 4 of cycle n / 4.  Every block indexes samples with a wrapping
// IDX_W-bit counter; only differences of indices are ever compared.
//
// The numbers below follow the text: 5-bit ADC, 4 paths, reduction factor 4,
// 128-point sync sequence with a 32-point cyclic prefix, 312.5 ns symbols
// (165 samples at 528 MS/s), 4-bit register-file words, TOP-5 peak search.
// The sync sequence itself is not printed in the text; this design uses a
// 127-chip maximal-length sequence (LFSR x^7 + x^6 + 1, all-ones seed)
// followed by one -1 chip.  Bit value 1 stands for +1 and 0 for -1.
package fsync_pkg;

  localparam int unsigned ADC_W    = 5;    // ADC sample width (I and Q each)
  localparam int unsigned RF_W     = 4;    // register-file word width (I and Q each)
  localparam int unsigned LANES    = 4;    // parallel paths = reduction factor omega
  localparam int unsigned SEQ_LEN  = 128;  // sync sequence length (matched-filter taps before reduction)
  localparam int unsigned NTAPS    = SEQ_LEN / LANES;  // 32 taps per sub matched filter
  localparam int unsigned CP_LEN   = 32;   // pre guard interval
  localparam int unsigned SYM_LEN  = 165;  // samples per OFDM symbol (312.5 ns at 528 MS/s)
  localparam int unsigned IDX_W    = 16;   // wrapping sample index width

  localparam int unsigned MF_PW    = 2 * (RF_W + $clog2(NTAPS) + 1);  // matched-filter power width

  typedef logic [IDX_W-1:0] idx_t;
  typedef logic [MF_PW-1:0] mfpow_t;

  // Auto-correlator use: packet detection (3-symbol lag) or preamble timing
  // detection (1-symbol lag).
  typedef enum logic {AC_PD = 1'b0, AC_PTD = 1'b1} ac_mode_e;

  // Phases of the frame synchronizer.
  typedef enum logic [2:0] {
    ST_PD    = 3'd0,   // packet detection (auto-correlator, 3-symbol lag)
    ST_FWD   = 3'd1,   // FFT window detection (matched filter + peak sorter)
    ST_ALIGN = 3'd2,   // move the boundary to the next symbol still to come
    ST_PTD   = 3'd3,   // preamble timing detection (auto-correlator, 1-symbol lag)
    ST_GATE  = 3'd4    // FFT symbol gate runs until the frame ends
  } fs_state_e;

  typedef struct packed {
    logic signed [ADC_W-1:0] i;
    logic signed [ADC_W-1:0] q;
  } sample_t;

  typedef struct packed {
    logic signed [RF_W-1:0] i;
    logic signed [RF_W-1:0] q;
  } rfword_t;

  // Keep the RF_W most significant bits of an ADC sample.
  function automatic rfword_t to_rfword(sample_t s);
    rfword_t w;
    w.i = s.i[ADC_W-1 -: RF_W];
    w.q = s.q[ADC_W-1 -: RF_W];
    return w;
  endfunction

  // Sync sequence chips, bit n = chip n (1: +1, 0: -1).
  function automatic logic [SEQ_LEN-1:0] sync_seq();
    logic [6:0] lfsr;
    logic [SEQ_LEN-1:0] s;
    lfsr = 7'h7f;
    s = '0;
    for (int n = 0; n < 127; n++) begin
      s[n] = lfsr[0];
      lfsr = {lfsr[0] ^ lfsr[1], lfsr[6:1]};
    end
    s[127] = 1'b0;
    return s;
  endfunction

  localparam logic [SEQ_LEN-1:0] SYNC_SEQ = sync_seq();

endpackage
