// tap_reduction_mf: tap-reduction matched filter with register sharing.
//
// The full detector would correlate 128 received samples with the 128-chip
// sync sequence at every one of the 528 M sample offsets per second.  With
// reduction factor 4 only every fourth sample takes part, so one correlation
// uses 32 samples and one 32-chip group of the sequence.  Register sharing
// makes the four parallel sub filters use the same 32 stored samples: the
// register file holds r[b], r[b+4], ..., r[b+124] (every fourth sample, one
// path only), and sub filter j correlates them with chips s[j], s[j+4], ...,
// s[j+124].  That is exactly the reduced correlation for the offset m = b - j:
//
//     power_j = | sum_{k=0..31} r[m + 4k + j] * s[4k + j] |^2
//
// so one cycle yields the four consecutive offsets b-3 .. b and the detector
// keeps the full 528 MS/s timing resolution with a 132 MHz clock.
//
// Because the register file is written at a wrapping address instead of
// shifting, word a holds sample k = (a - waddr) mod 32 of the window.  The
// tap bits therefore rotate by one place on every write (`shift`), so the
// data never moves; `load` puts the taps back to the order for waddr = 0 and
// must coincide with the register file's clear.  The tap store is 32 x 4 bits.
//
// Timing: words and `in_base` (index of the oldest word, b) of cycle t give
// `power[j]` for offset `out_base - j` in cycle t+2.
module tap_reduction_mf
  import fsync_pkg::*;
#(
  parameter logic [SEQ_LEN-1:0] SEQ = SYNC_SEQ
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    load,
  input  logic    shift,
  input  logic    in_valid,
  input  idx_t    in_base,
  input  rfword_t words [NTAPS],
  output logic    out_valid,
  output idx_t    out_base,
  output mfpow_t  power [LANES]
);

  // tap_reg[a][j] = chip s[4k + j] for the window sample k held in word a
  logic [LANES-1:0] tap_reg [NTAPS];
  idx_t             base_d1;
  logic [LANES-1:0] sub_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int a = 0; a < NTAPS; a++)
        for (int j = 0; j < LANES; j++)
          tap_reg[a][j] <= SEQ[LANES*a + j];
    end else if (load) begin
      for (int a = 0; a < NTAPS; a++)
        for (int j = 0; j < LANES; j++)
          tap_reg[a][j] <= SEQ[LANES*a + j];
    end else if (shift) begin
      for (int a = 0; a < NTAPS; a++)
        tap_reg[a] <= tap_reg[(a + NTAPS - 1) % NTAPS];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      base_d1  <= '0;
      out_base <= '0;
    end else begin
      base_d1  <= in_base;
      out_base <= base_d1;
    end
  end

  for (genvar j = 0; j < LANES; j++) begin : g_sub
    logic [NTAPS-1:0] taps_j;
    always_comb
      for (int a = 0; a < NTAPS; a++) taps_j[a] = tap_reg[a][j];

    sub_matched_filter #(.N(NTAPS)) u_sub (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (in_valid),
      .words    (words),
      .taps     (taps_j),
      .out_valid(sub_valid[j]),
      .power    (power[j])
    );
  end

  assign out_valid = &sub_valid;

endmodule
