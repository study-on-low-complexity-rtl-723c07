// sub_matched_filter: one of the four 32-tap sub matched filters of the FFT
// window detector.
//
// The sync sequence has chips of +1 or -1, so each complex tap multiplier
// reduces to an adder/subtractor: a word is added when its tap bit is 1 and
// subtracted when it is 0, separately for I and Q.  The 32 terms are summed,
// registered, and a squarer forms the correlation power I^2 + Q^2.
//
// Interface: `words` are the register-file words, `taps` the tap bit that
// belongs to each word (bit a for word a).  Timing: two-stage pipeline, the
// power for the words and taps of cycle t appears in cycle t+2 with
// `out_valid` echoing `in_valid`.  The add/subtract structure follows the
// text; the pipeline split is this design's own.
module sub_matched_filter
  import fsync_pkg::*;
#(
  parameter int unsigned N = NTAPS
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  rfword_t       words [N],
  input  logic [N-1:0]  taps,
  output logic          out_valid,
  output logic [2*(RF_W+$clog2(N)+1)-1:0] power
);

  localparam int unsigned SW = RF_W + $clog2(N) + 1;  // signed sum width
  localparam int unsigned PW = 2 * SW;             // power width

  logic signed [SW-1:0] sum_i, sum_q;
  logic signed [SW-1:0] sum_i_r, sum_q_r;
  logic                 v1;

  always_comb begin
    sum_i = '0;
    sum_q = '0;
    for (int a = 0; a < N; a++) begin
      if (taps[a]) begin
        sum_i = sum_i + SW'(words[a].i);
        sum_q = sum_q + SW'(words[a].q);
      end else begin
        sum_i = sum_i - SW'(words[a].i);
        sum_q = sum_q - SW'(words[a].q);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      out_valid <= 1'b0;
      sum_i_r   <= '0;
      sum_q_r   <= '0;
      power     <= '0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
      sum_i_r   <= sum_i;
      sum_q_r   <= sum_q;
      power     <= PW'(sum_i_r * sum_i_r) + PW'(sum_q_r * sum_q_r);
    end
  end

endmodule
