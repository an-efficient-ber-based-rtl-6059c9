// frame_validator_tb: self-checking test of the masked frame comparison.
//
// Random golden frames and flip-flop masks are generated; the read-back
// frame is the golden one with random changes in masked cells (which must
// be accepted) and, in half of the frames, changes in unmasked cells (which
// must be reported, with the right count of differing bits and the index of
// the first differing word). done must come one cycle after the last word.
module frame_validator_tb;
  import ber_pkg::*;

  logic clk = 0, rst_n = 0;
  logic start = 0, word_valid = 0;
  word_t rd_word = '0, golden_word = '0, ff_mask = '0;
  logic done, mismatch;
  logic [10:0] diff_bits;
  logic [WIDX_W-1:0] bad_word;

  int checks = 0, failures = 0;

  frame_validator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    word_t g [41], m [41], r [41];
    int exp_bits, exp_first;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      exp_bits = 0;
      exp_first = -1;
      for (int w = 0; w < 41; w++) begin
        g[w] = $urandom;
        m[w] = ($urandom_range(0, 3) == 0) ? word_t'(1) << $urandom_range(0, 31) : '0;
        r[w] = g[w] ^ (m[w] & $urandom);          // masked cells may differ
      end
      if (t % 2 == 1) begin
        int nflip;
        nflip = $urandom_range(1, 3);
        for (int i = 0; i < nflip; i++) begin
          int w, b;
          do begin w = $urandom_range(0, 40); b = $urandom_range(0, 31); end
          while (m[w][b] || (r[w][b] != g[w][b]));
          r[w][b] = ~r[w][b];
        end
      end
      for (int w = 0; w < 41; w++) begin
        int c;
        c = $countones((r[w] ^ g[w]) & ~m[w]);
        exp_bits += c;
        if (c != 0 && exp_first < 0) exp_first = w;
      end
      @(posedge clk); start <= 1;
      @(posedge clk); start <= 0;
      for (int w = 0; w < 41; w++) begin
        while ($urandom_range(0, 2) == 0) begin word_valid <= 0; @(posedge clk); end
        word_valid <= 1; rd_word <= r[w]; golden_word <= g[w]; ff_mask <= m[w];
        @(posedge clk);
        check(done === 1'b0, "early done");
      end
      word_valid <= 0;
      #1;
      check(done === 1'b1, "done one cycle after the last word");
      check(mismatch == (exp_bits != 0), $sformatf("frame %0d: mismatch=%0b exp_bits=%0d", t, mismatch, exp_bits));
      check(int'(diff_bits) == exp_bits, $sformatf("frame %0d: diff_bits=%0d exp=%0d", t, diff_bits, exp_bits));
      if (exp_first >= 0) check(int'(bad_word) == exp_first, "first bad word");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
