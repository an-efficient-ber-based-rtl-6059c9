// frame_validator: masked comparison of a read-back frame with the initial
// bitstream, used to validate a checkpoint.
//
// A bit flip can hit the region between the capture order and the end of the
// checkpoint readback, and would then be saved into the checkpoint. The
// design guards against it by comparing every frame read back during a
// checkpoint with the same frame of the initial bitstream, with the
// flip-flop cells masked out (they necessarily differ). This block does that
// comparison word by word.
//
// Interface / timing: pulse start before the first word (not together with a
// word). Each cycle with word_valid high compares rd_word with golden_word
// on the bits where ff_mask is 0. done pulses one cycle after the last of the
// FRAME_WORDS words; mismatch then tells whether any unmasked bit differed,
// diff_bits how many, and bad_word the index of the first differing word.
// They hold until the next start. Counting the differing bits is this
// design's addition (for diagnosis).
module frame_validator
  import ber_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              word_valid,
  input  word_t             rd_word,
  input  word_t             golden_word,
  input  word_t             ff_mask,
  output logic              done,
  output logic              mismatch,
  output logic [10:0]       diff_bits,
  output logic [WIDX_W-1:0] bad_word
);

  logic [WIDX_W-1:0] widx_q;
  word_t             diff;

  assign diff = (rd_word ^ golden_word) & ~ff_mask;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      widx_q    <= '0;
      mismatch  <= 1'b0;
      diff_bits <= '0;
      bad_word  <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        widx_q    <= '0;
        mismatch  <= 1'b0;
        diff_bits <= '0;
        bad_word  <= '0;
      end else if (word_valid) begin
        if (diff != '0) begin
          if (!mismatch) bad_word <= widx_q;
          mismatch <= 1'b1;
        end
        diff_bits <= diff_bits + 11'($countones(diff));
        if (widx_q == WIDX_W'(FRAME_WORDS - 1)) begin
          widx_q <= '0;
          done   <= 1'b1;
        end else begin
          widx_q <= widx_q + 1'b1;
        end
      end
    end
  end

endmodule
