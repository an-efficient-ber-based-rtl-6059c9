// frame_ecc_tb: self-checking test of the word-serial frame ECC checker.
//
// The bench builds its own table of code words (identity, with the
// power-of-two positions swapped against the ECC bits 640..650 and bit 0
// against the parity bit 651), encodes random frames with it, and streams
// them into the checker with random gaps between words. It checks: clean
// frames pass; a single flip gives odd parity and the flipped bit's code as
// syndrome; two flips give even parity and a non-zero syndrome; flips in
// ignored (flip-flop) cells are not reported; done comes exactly one cycle
// after the last word.
module frame_ecc_tb;
  import ber_pkg::*;

  logic clk = 0, rst_n = 0;
  logic start = 0, word_valid = 0;
  word_t word = '0, word_ignore = '0;
  logic done, parity, frame_error, single_err, double_err;
  syn_t syndrome;

  int checks = 0, failures = 0;

  frame_ecc dut (.*);

  always #5 clk = ~clk;

  int unsigned code [1312];
  logic [1311:0] frame, ign;

  initial begin
    repeat (200000) @(posedge clk);
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

  function automatic void build_codes();
    for (int p = 0; p < 1312; p++) code[p] = p;
    for (int k = 0; k < 11; k++) begin
      code[1 << k]  = 640 + k;
      code[640 + k] = 1 << k;
    end
    code[0]   = 651;
    code[651] = 0;
  endfunction

  // random frame with a correct ECC field; bits in ign are zero for the ECC
  function automatic void make_frame();
    int unsigned s = 0;
    bit par = 0;
    for (int p = 0; p < 1312; p++) frame[p] = 1'($urandom);
    for (int p = 640; p < 652; p++) frame[p] = 0;
    for (int p = 0; p < 1312; p++) if (frame[p] && !ign[p]) s ^= code[p];
    for (int k = 0; k < 11; k++) frame[640 + k] = s[k];
    for (int p = 0; p < 1312; p++) if (!ign[p]) par ^= frame[p];
    frame[651] = par;
  endfunction

  task automatic send_frame(input logic [1311:0] f);
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    for (int w = 0; w < 41; w++) begin
      while ($urandom_range(0, 3) == 0) begin
        word_valid <= 0;
        @(posedge clk);
      end
      word_valid  <= 1;
      word        <= f[w*32 +: 32];
      word_ignore <= ign[w*32 +: 32];
      @(posedge clk);
      if (w == 40) begin
        word_valid <= 0;
        check(done === 1'b0, "done before the last word was taken");
        #1;
        check(done === 1'b1, "done one cycle after the last word");
      end else begin
        check(done === 1'b0, "early done");
      end
    end
    word_valid <= 0;
  endtask

  initial begin
    logic [1311:0] bad;
    int a, b;
    build_codes();
    // the table is a permutation of 0..1311
    begin
      bit seen [1312];
      bit ok = 1;
      foreach (code[p]) begin
        if (code[p] >= 1312 || seen[code[p]]) ok = 0;
        else seen[code[p]] = 1;
      end
      check(ok, "code table is a permutation");
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    for (int t = 0; t < 40; t++) begin
      ign = '0;
      if (t >= 20) for (int i = 0; i < 36; i++) ign[$urandom_range(0, 639)] = 1;
      make_frame();
      // clean frame
      send_frame(frame);
      check(!frame_error && syndrome == 0 && !parity, $sformatf("clean frame %0d flagged", t));
      // single flip (not in an ignored cell)
      do a = $urandom_range(0, 1311); while (ign[a]);
      bad = frame; bad[a] = ~bad[a];
      send_frame(bad);
      check(frame_error && parity && single_err && syndrome == syn_t'(code[a]),
            $sformatf("single flip at %0d: syn=%0d exp=%0d par=%0b", a, syndrome, code[a], parity));
      // double flip
      do b = $urandom_range(0, 1311); while (ign[b] || b == a);
      bad[b] = ~bad[b];
      send_frame(bad);
      check(frame_error && !parity && double_err && syndrome == syn_t'(code[a] ^ code[b]),
            $sformatf("double flip at %0d,%0d", a, b));
      // flip of an ignored cell is not reported
      if (t >= 20) begin
        for (int p = 0; p < 1312; p++) if (ign[p]) begin a = p; break; end
        bad = frame; bad[a] = ~bad[a];
        send_frame(bad);
        check(!frame_error, "flip in an ignored cell reported");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
