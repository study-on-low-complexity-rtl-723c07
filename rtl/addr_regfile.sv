// addr_regfile: address-based register files that replace a shift-register
// FIFO in front of the matched filter.
//
// While `en` is high a wrapping counter steps the write address 0..DEPTH-1
// and exactly one word is loaded per cycle; every other word holds its value,
// so only one of DEPTH registers toggles per cycle instead of all of them.
// All words are visible in parallel on `words`, as the correlators need.
// `waddr` is the address the next write goes to; once DEPTH words have been
// written it is also the address of the oldest word.  `clr` restarts the
// counter at 0 (the stored words are kept; they are overwritten as new
// samples arrive) and `full` rises after DEPTH writes since the last clear.
//
// Timing: a word presented with `en` in cycle t is visible on `words` from
// cycle t+1.  Depth (32) and word width (4-bit I and Q) follow the text; the
// clear input and the `full` flag are this design's own additions.
module addr_regfile
  import fsync_pkg::*;
#(
  parameter int unsigned DEPTH = NTAPS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clr,
  input  logic                     en,
  input  rfword_t                  wdata,
  output rfword_t                  words [DEPTH],
  output logic [$clog2(DEPTH)-1:0] waddr,
  output logic                     full
);

  localparam int unsigned AW = $clog2(DEPTH);

  rfword_t mem [DEPTH];
  logic [$clog2(DEPTH+1)-1:0] count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      waddr <= '0;
      count <= '0;
    end else if (clr) begin
      waddr <= '0;
      count <= '0;
    end else if (en) begin
      waddr <= (waddr == AW'(DEPTH - 1)) ? '0 : waddr + 1'b1;
      if (count != DEPTH[$clog2(DEPTH+1)-1:0]) count <= count + 1'b1;
    end
  end

  // One word per cycle: only the addressed register loads.
  always_ff @(posedge clk) begin
    if (en && !clr) mem[waddr] <= wdata;
  end

  assign words = mem;
  assign full  = (count == DEPTH[$clog2(DEPTH+1)-1:0]);

endmodule
