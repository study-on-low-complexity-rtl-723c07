// peak_sorter: 4-input peak sorter with TOP-M pre-cursor search for the FFT
// window boundary.
//
// Each cycle the four sub matched filters deliver the correlation powers of
// four consecutive offsets (in_base - j for input j).  The sorter keeps the M
// largest powers seen since `start`, with their sample indices, in a sorted
// list; the four inputs are inserted one after the other, earliest offset
// first, and a new entry displaces an old one only when strictly larger, so
// ties keep the earlier offset.  Exactly SEARCH_LEN offsets (one symbol) are
// examined.  Then the largest entry is the peak, and among the listed
// candidates that lie at most PRE samples before the peak the earliest one is
// taken as the boundary; with none there the peak itself is.  Early arriving
// paths that are weaker than a later echo are caught this way.
//
// Interface: pulse `start` once, then present candidates with `in_valid`.
// Timing: `done` pulses two cycles after the cycle that holds the last of the
// SEARCH_LEN offsets, with `boundary`, `peak_idx` and `precursor` (boundary
// earlier than peak) valid from then until the next `start`.
// M = 5 and the four inputs follow the text; PRE = 5 is the pre-cursor window
// the text uses for its 64-point design and is taken over here.
module peak_sorter
  import fsync_pkg::*;
#(
  parameter int unsigned M          = 5,
  parameter int unsigned PRE        = 5,
  parameter int unsigned SEARCH_LEN = SYM_LEN
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  logic   in_valid,
  input  idx_t   in_base,
  input  mfpow_t power [LANES],
  output logic   done,
  output idx_t   boundary,
  output idx_t   peak_idx,
  output logic   precursor
);

  typedef struct packed {
    logic   valid;
    mfpow_t pow;
    idx_t   idx;
  } cand_t;

  localparam int unsigned NCYC = (SEARCH_LEN + LANES - 1) / LANES;
  localparam int unsigned CW   = $clog2(NCYC + 1);

  cand_t          list_q [M];
  cand_t          list_d [M];
  logic [CW-1:0]  cyc;
  logic           busy;

  // Insert the four candidates of this cycle, earliest offset first.
  always_comb begin
    cand_t nc;
    int unsigned off;
    list_d = list_q;
    for (int n = 0; n < LANES; n++) begin
      int unsigned j;
      j      = LANES - 1 - n;
      off    = LANES * int'(cyc) + n;
      nc.valid = 1'b1;
      nc.pow   = power[j];
      nc.idx   = in_base - idx_t'(j);
      if (off < SEARCH_LEN) begin
        for (int i = M - 1; i >= 0; i--) begin
          if (!list_d[i].valid || nc.pow > list_d[i].pow) begin
            if (i == 0 || (list_d[i-1].valid && !(nc.pow > list_d[i-1].pow))) begin
              // insert at i, entries i.. move down one place
              for (int k = M - 1; k > i; k--) list_d[k] = list_d[k-1];
              list_d[i] = nc;
            end
          end
        end
      end
    end
  end

  // Pre-cursor decision on the final list.
  idx_t bnd_d;
  always_comb begin
    idx_t best_gap;
    bnd_d     = list_q[0].idx;
    best_gap = '0;
    for (int i = 1; i < M; i++) begin
      idx_t gap;
      gap = list_q[0].idx - list_q[i].idx;
      if (list_q[i].valid && gap <= idx_t'(PRE) && gap > best_gap) begin
        best_gap = gap;
        bnd_d     = list_q[i].idx;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < M; i++) list_q[i] <= '0;
      cyc       <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
      boundary  <= '0;
      peak_idx  <= '0;
      precursor <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        for (int i = 0; i < M; i++) list_q[i] <= '0;
        cyc  <= '0;
        busy <= 1'b1;
      end else if (busy && in_valid) begin
        list_q <= list_d;
        cyc    <= cyc + 1'b1;
        if (cyc == CW'(NCYC - 1)) busy <= 1'b0;
      end else if (!busy && cyc == CW'(NCYC)) begin
        // list complete: decide once
        done      <= 1'b1;
        boundary  <= bnd_d;
        peak_idx  <= list_q[0].idx;
        precursor <= (bnd_d != list_q[0].idx);
        cyc       <= '0;
      end
    end
  end

endmodule
