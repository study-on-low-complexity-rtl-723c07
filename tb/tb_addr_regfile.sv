// tb_addr_regfile: writes random words with a randomly gated enable and a
// few clears, and compares every word, the write address and the full flag
// with a model after each cycle.  It also checks that a write changes only
// the addressed word.
module tb_addr_regfile;
  timeunit 1ns;
  timeprecision 100ps;
  import fsync_pkg::*;

  localparam int DEPTH = 32;

  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  always #1 clk = ~clk;
  rfword_t wdata;
  rfword_t words [DEPTH];
  logic [4:0] waddr;
  logic full;

  addr_regfile #(.DEPTH(DEPTH)) dut (.*);

  rfword_t model [DEPTH];
  int maddr = 0, mcount = 0;
  int checks = 0, failures = 0;
  bit known [DEPTH];

  initial begin
    for (int a = 0; a < DEPTH; a++) known[a] = 0;
    wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 400; c++) begin
      @(negedge clk);
      clr   = ($urandom_range(99) < 3);
      en    = ($urandom_range(99) < 80);
      wdata = rfword_t'($urandom);
      @(posedge clk);
      #0.1;
      if (clr) begin
        maddr = 0; mcount = 0;
      end else if (en) begin
        model[maddr] = wdata;
        known[maddr] = 1;
        maddr  = (maddr + 1) % DEPTH;
        if (mcount < DEPTH) mcount++;
      end
      checks++;
      if (waddr != 5'(maddr) || full != (mcount == DEPTH)) begin
        failures++;
        $display("FAIL cycle %0d: waddr %0d/%0d full %0b/%0b", c, waddr, maddr, full, mcount == DEPTH);
      end
      for (int a = 0; a < DEPTH; a++) if (known[a]) begin
        checks++;
        if (words[a] != model[a]) begin
          failures++;
          $display("FAIL cycle %0d: word %0d = %h, expected %h", c, a, words[a], model[a]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
