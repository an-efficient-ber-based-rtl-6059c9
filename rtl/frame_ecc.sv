// frame_ecc: word-serial extended Hamming checker for one configuration frame.
//
// It plays the part of the device's frame ECC logic: while a frame is read
// back, word by word, it accumulates the 11-bit syndrome and the overall
// parity of the frame, and when the last of the FRAME_WORDS words has been
// taken it reports whether the frame is faulty. The code is the one defined
// in ber_pkg (extended Hamming, 12 ECC bits in word 20). As in the design's
// detection strategy the result is used per frame: any non-zero syndrome or
// parity marks the whole frame faulty. single_err/double_err are also given
// (odd parity: one flip, or an odd number; even parity with a non-zero
// syndrome: two flips, or an even number).
//
// Bits set in word_ignore are treated as 0. The controller uses this to leave
// out the flip-flop capture cells, whose content changes at every checkpoint;
// the ECC bits of the initial bitstream are computed with those cells at 0.
// Ignoring them is this design's choice.
//
// Interface / timing: pulse start for one cycle before the first word (it
// clears the accumulators; a word may not arrive in the same cycle). Words
// are taken when word_valid is high, in frame order. done pulses one cycle
// after the last word was taken; syndrome, parity and the flags hold their
// value until the next start.
module frame_ecc
  import ber_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  logic  word_valid,
  input  word_t word,
  input  word_t word_ignore,
  output logic  done,
  output syn_t  syndrome,
  output logic  parity,
  output logic  frame_error,
  output logic  single_err,
  output logic  double_err
);

  logic [WIDX_W-1:0] widx_q;
  syn_t              syn_q;
  logic              par_q;
  syn_t              word_syn;
  logic              word_par;
  word_t             w_eff;

  // Contribution of the current word.
  always_comb begin
    w_eff    = word & ~word_ignore;
    word_syn = '0;
    for (int unsigned b = 0; b < WORD_W; b++)
      if (w_eff[b]) word_syn ^= ecc_code(int'(widx_q) * WORD_W + b);
    word_par = ^w_eff;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      widx_q <= '0;
      syn_q  <= '0;
      par_q  <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        widx_q <= '0;
        syn_q  <= '0;
        par_q  <= 1'b0;
      end else if (word_valid) begin
        syn_q <= syn_q ^ word_syn;
        par_q <= par_q ^ word_par;
        if (widx_q == WIDX_W'(FRAME_WORDS - 1)) begin
          widx_q <= '0;
          done   <= 1'b1;
        end else begin
          widx_q <= widx_q + 1'b1;
        end
      end
    end
  end

  assign syndrome    = syn_q;
  assign parity      = par_q;
  assign frame_error = (syn_q != '0) || par_q;
  assign single_err  = par_q;
  assign double_err  = !par_q && (syn_q != '0);

  // The checker counts words itself; a start in the middle of a frame is a
  // controller error.
  a_no_start_with_word: assert property (@(posedge clk) disable iff (!rst_n)
    !(start && word_valid));

endmodule
