// training_agc: VGA gain control of the multi-band (MB-OFDM) receiver, with a
// lookup table for fine steps and a binary search for coarse ones.
//
// Each power measurement (the energy of one 128-sample window, from the band
// detector) is turned into a gain error in whole dB by a lookup table that
// covers -10..+10 dB around the target energy P_TARGET.  Then the gain moves:
//     |est| <= 10 :  gain = gain + est                (clamped to MIN..MAX)
//     est  >  10 :  gain = gain + (MAX - gain) / 2    (too weak: halve the gap up)
//     est  < -10 :  gain = gain - (gain - MIN) / 2    (too strong: halve the gap down)
// The lookup table is a bank of 22 comparators against the energies
// P_TARGET * 10^((i - 10.5) / 10), i = 0..21, the dB boundaries halfway between
// whole-dB steps.  c = number of boundaries the measurement reaches, and
// est = 11 - c; c = 0 or 22 mean the measurement lies outside the table,
// which drives the binary search.  The boundaries are computed at
// elaboration with integer arithmetic: P_TARGET * 891 / 10000 for -10.5 dB,
// then repeated multiplication by 12589 / 10000 (10^0.1).
//
// Training: while the transmitter sends its training packet the loop settles
// on the gain for the noise floor and for the signal; `train_save` stores
// the current gain in slot `train_sel` (0 noise, 1 signal).  On a later packet
// `train_load` restores a stored gain, so only fine lookup steps remain.
//
// Interface: `meas_valid`/`meas_pow` present one measurement; `gain` is the VGA
// gain in dB, `est` the table's gain error of the last measurement (+-11 for
// out of range) and `coarse` tells that the last step was a binary search
// step.  Timing: the gain of a measurement in cycle t is on `gain` in cycle
// t+1; `train_load` has priority over a measurement in the same cycle.
// The update rule, the 0..70 dB range and the +-10 dB table follow the
// text.  The target energy, the whole-dB table steps, the reset gain and the
// save/load handshake are this design's own.
module training_agc #(
  parameter int unsigned PW        = 17,     // measurement width
  parameter int unsigned P_TARGET  = 8192,   // target 128-sample window energy
  parameter int unsigned GAIN_MIN  = 0,      // dB
  parameter int unsigned GAIN_MAX  = 70,     // dB
  parameter int unsigned GAIN_INIT = 35,     // dB after reset
  parameter int unsigned LUT_DB    = 10      // table range, +- dB
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                meas_valid,
  input  logic [PW-1:0]       meas_pow,
  input  logic                train_sel,
  input  logic                train_save,
  input  logic                train_load,
  output logic [6:0]          gain,
  output logic signed [5:0]   est,
  output logic                coarse
);

  localparam int unsigned NB = 2 * LUT_DB + 2;   // boundaries: 22

  if (GAIN_MAX > 127 || GAIN_MIN > GAIN_MAX || GAIN_INIT > GAIN_MAX ||
      GAIN_INIT < GAIN_MIN || LUT_DB != 10) begin : g_param_check
    $error("training_agc: gains must fit 7 bits in order; the table is built for +-10 dB");
  end

  typedef logic [PW:0] bnd_t;   // one bit more than the measurement

  function automatic bnd_t boundary(input int unsigned i);
    longint unsigned b;
    b = longint'(P_TARGET) * 891 / 10000;          // -10.5 dB
    for (int unsigned n = 0; n < i; n++) b = b * 12589 / 10000;
    return bnd_t'(b);
  endfunction

  // gain error from the table
  logic [$clog2(NB+1)-1:0] cnt;
  logic signed [5:0]       est_c;
  always_comb begin
    cnt = '0;
    for (int unsigned i = 0; i < NB; i++) begin
      if (bnd_t'(meas_pow) >= boundary(i)) cnt = cnt + 1'b1;
    end
    est_c = 6'sd11 - $signed({1'b0, 5'(cnt)});
  end

  // next gain, Eq. rule
  logic [6:0] g_next;
  logic       coarse_c;
  always_comb begin
    int g;
    g        = int'(gain);
    coarse_c = 1'b0;
    if (est_c > 6'sd10) begin
      g        = g + (int'(GAIN_MAX) - g) / 2;
      coarse_c = 1'b1;
    end else if (est_c < -6'sd10) begin
      g        = g - (g - int'(GAIN_MIN)) / 2;
      coarse_c = 1'b1;
    end else begin
      g = g + int'(est_c);
      if (g > int'(GAIN_MAX)) g = int'(GAIN_MAX);
      if (g < int'(GAIN_MIN)) g = int'(GAIN_MIN);
    end
    g_next = 7'(g);
  end

  logic [6:0] train_gain [2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gain          <= 7'(GAIN_INIT);
      est           <= '0;
      coarse        <= 1'b0;
      train_gain[0] <= 7'(GAIN_INIT);
      train_gain[1] <= 7'(GAIN_INIT);
    end else begin
      if (train_save) train_gain[train_sel] <= gain;
      if (train_load) begin
        gain   <= train_gain[train_sel];
        coarse <= 1'b0;
      end else if (meas_valid) begin
        gain   <= g_next;
        est    <= est_c;
        coarse <= coarse_c;
      end
    end
  end

endmodule
