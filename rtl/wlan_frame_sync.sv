// wlan_frame_sync: frame synchronizer for an IEEE 802.11a receiver, one
// sample per clock: packet detection, then FFT window detection with a
// most-significant-taps matched filter and a TOP-M pre-cursor search.
//
// Both detectors watch the same sample stream.  When the packet detector
// announces a packet at sample d, the block examines the matched-filter
// outputs for window starts d .. d+SEARCH-1, which cover the start of the
// first long training symbol (it begins 192 samples after the start of
// the short preamble, and d lies inside the short preamble).  It keeps the
// M largest correlation powers with their indices, sorted; ties keep the
// earlier index.  The largest one is the peak.  Among the kept candidates
// that lie at most PRE samples before the peak, the earliest is the FFT
// window boundary, so a weak first arrival path is preferred to a stronger
// later echo.  When the boundary is chosen, `boundary_valid` pulses with
// `boundary` (the sample index where a long training symbol starts) and
// `precursor` (boundary earlier than the peak).  `rearm` ends the frame:
// the packet detector searches again.
//
// Interface: `in_valid`/`in_re`/`in_im` one sample per cycle; `thr` the
// packet threshold (1/256 units); `pkt_detect` pulses with the packet
// announcement, `pkt_cand`/`pkt_cancel` show its decision window.  Sample indices count accepted samples from 0 after reset.
// Timing: `boundary_valid` follows three cycles after the matched-filter
// output for the last window start in the search.
// M = 5 and PRE = 5 are the values the text uses for this receiver; the
// search length and the rearm handshake are this design's own choices.
module wlan_frame_sync #(
  parameter int unsigned DW     = 8,
  parameter int unsigned N_TAPS = 16,
  parameter int unsigned M      = 5,
  parameter int unsigned PRE    = 5,
  parameter int unsigned SEARCH = 160
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_re,
  input  logic signed [DW-1:0] in_im,
  input  logic [7:0]           thr,
  input  logic                 rearm,
  output logic                 pkt_detect,
  output logic [15:0]          pkt_idx,
  output logic                 pkt_cand,
  output logic                 pkt_cancel,
  output logic                 boundary_valid,
  output logic [15:0]          boundary,
  output logic                 precursor
);

  localparam int unsigned PWW = 2 * (DW + ((N_TAPS <= 20) ? 8 : 10));

  logic             mf_valid;
  logic [15:0]      mf_idx;
  logic [PWW-1:0]   mf_pow;

  wlan_packet_detect #(.DW(DW)) u_pd (
    .clk, .rst_n, .in_valid, .in_re, .in_im, .thr, .rearm,
    .detect(pkt_detect), .det_idx(pkt_idx), .cand(pkt_cand), .cancel(pkt_cancel)
  );

  mst_matched_filter #(.DW(DW), .N_TAPS(N_TAPS)) u_mf (
    .clk, .rst_n, .in_valid, .in_re, .in_im,
    .out_valid(mf_valid), .out_idx(mf_idx), .power(mf_pow)
  );

  typedef struct packed {
    logic           valid;
    logic [PWW-1:0] pow;
    logic [15:0]    idx;
  } cand_t;

  typedef enum logic [1:0] {WS_IDLE, WS_SEARCH, WS_PICK, WS_DONE} ws_state_e;
  ws_state_e   st;
  cand_t       top [M];
  cand_t       top_next [M];
  logic [15:0] win0;
  logic        in_win, last_in_win;

  // window position of this output; indices wrap, so compare differences
  logic [15:0] rel;
  assign rel         = mf_idx - win0;
  assign in_win      = (st == WS_SEARCH) && mf_valid && (rel < 16'(SEARCH));
  assign last_in_win = in_win && (rel == 16'(SEARCH - 1));

  // insertion of one candidate into the sorted list
  always_comb begin
    int pos;
    pos = M;
    for (int j = M - 1; j >= 0; j--) begin
      if (!top[j].valid || mf_pow > top[j].pow) pos = j;
    end
    for (int j = 0; j < M; j++) begin
      if (j < pos)       top_next[j] = top[j];
      else if (j == pos) top_next[j] = '{valid: 1'b1, pow: mf_pow, idx: mf_idx};
      else               top_next[j] = top[j-1];
    end
  end

  // pre-cursor pick from the final list
  logic [15:0] pick;
  always_comb begin
    pick = top[0].idx;
    for (int j = 1; j < M; j++) begin
      logic [15:0] gap;
      gap = top[0].idx - top[j].idx;
      if (top[j].valid && gap <= 16'(PRE) && (top[j].idx - win0) < (pick - win0)) pick = top[j].idx;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st             <= WS_IDLE;
      win0           <= '0;
      boundary_valid <= 1'b0;
      boundary       <= '0;
      precursor      <= 1'b0;
      for (int j = 0; j < M; j++) top[j] <= '0;
    end else begin
      boundary_valid <= 1'b0;
      case (st)
        WS_IDLE: if (pkt_detect) begin
          st   <= WS_SEARCH;
          win0 <= pkt_idx;
          for (int j = 0; j < M; j++) top[j] <= '0;
        end
        WS_SEARCH: if (in_win) begin
          top <= top_next;
          if (last_in_win) st <= WS_PICK;
        end
        WS_PICK: begin
          boundary_valid <= 1'b1;
          boundary       <= pick;
          precursor      <= (pick != top[0].idx);
          st             <= WS_DONE;
        end
        default: ;
      endcase
      if (rearm) st <= WS_IDLE;
    end
  end

endmodule
