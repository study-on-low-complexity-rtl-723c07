// tb_sub_matched_filter: random words and tap bits; the expected power
// (sum of +-word over the taps, squared, I and Q added) is computed in
// integers and compared two cycles later, which also checks the latency.
module tb_sub_matched_filter;
  import fsync_pkg::*;

  localparam int N = 32;

  logic clk = 0, rst_n = 0, in_valid = 0;
  always #1 clk = ~clk;
  rfword_t words [N];
  logic [N-1:0] taps;
  logic out_valid;
  logic [2*(RF_W+$clog2(N)+1)-1:0] power;

  sub_matched_filter #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  longint exp_q [$];
  bit     val_q [$];

  initial begin
    taps = '0;
    for (int a = 0; a < N; a++) words[a] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 300; c++) begin
      int si, sq;
      @(negedge clk);
      in_valid = $urandom_range(1);
      // include extreme cases: all words at the negative limit
      if (c % 50 == 7) begin
        for (int a = 0; a < N; a++) words[a] = '{i: -8, q: -8};
        taps = (c % 100 == 7) ? '1 : '0;
      end else begin
        for (int a = 0; a < N; a++) words[a] = rfword_t'($urandom);
        taps = {$urandom, $urandom};
      end
      si = 0; sq = 0;
      for (int a = 0; a < N; a++) begin
        si += taps[a] ? int'(words[a].i) : -int'(words[a].i);
        sq += taps[a] ? int'(words[a].q) : -int'(words[a].q);
      end
      exp_q.push_back(longint'(si) * si + longint'(sq) * sq);
      val_q.push_back(in_valid);
      if (exp_q.size() > 2) begin
        longint e; bit v;
        e = exp_q.pop_front();
        v = val_q.pop_front();
        checks++;
        if (longint'(power) != e || out_valid != v) begin
          failures++;
          $display("FAIL cycle %0d: power %0d expected %0d valid %0b/%0b", c, power, e, out_valid, v);
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
