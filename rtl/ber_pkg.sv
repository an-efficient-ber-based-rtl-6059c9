// ber_pkg: shared constants, types and the frame ECC code assignment of the
// backward-error-recovery (BER) reliability controller.
//
// Frame layout (follows the Virtex-5 CLB-column frame of the design): a frame
// is 1312 bits carried as 41 words of 32 bits. Bit p of the frame is bit
// (p % 32) of word (p / 32). Word 20 (bits 640..671) holds the 12 ECC bits
// (frame bits 640..651) followed by 20 clock-row (HCLK) bits (652..671).
// Words 0..19 configure the 10 CLBs above the clock row, words 21..40 the 10
// below it.
//
// ECC code (this design's own choice; the vendor's exact code is not public):
// an extended Hamming code. Every frame bit p owns an 11-bit code word
// ecc_code(p); the codes are a permutation of 0..1311, so they are distinct.
// ECC bit 640+k owns code 2^k (k = 0..10), so setting those bits to the
// syndrome of the other bits clears the syndrome. Bit 651 is the overall
// parity bit and owns code 0. To keep the permutation, the data bits at the
// power-of-two positions 2^k take code 640+k and data bit 0 takes code 651.
// Syndrome S = XOR of ecc_code(p) over all set bits, parity P = XOR of all
// bits. A clean frame gives S = 0, P = 0; any single or double bit flip gives
// a non-zero (S, P).
package ber_pkg;

  localparam int unsigned WORD_W       = 32;
  localparam int unsigned FRAME_WORDS  = 41;
  localparam int unsigned FRAME_BITS   = WORD_W * FRAME_WORDS;  // 1312
  localparam int unsigned ECC_WORD     = 20;                    // holds bits 640..671
  localparam int unsigned ECC_FIRST    = ECC_WORD * WORD_W;       // 640
  localparam int unsigned ECC_BITS     = 12;                    // 11 Hamming + 1 parity
  localparam int unsigned SYN_W        = 11;
  localparam int unsigned PARITY_POS   = ECC_FIRST + ECC_BITS - 1;  // 651
  localparam int unsigned WIDX_W       = $clog2(FRAME_WORDS);       // 6

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [SYN_W-1:0]  syn_t;

  // Commands towards the configuration access port.
  typedef enum logic [2:0] {
    CFG_READ    = 3'd0,  // read back one frame: FRAME_WORDS words on the read channel
    CFG_WRITE   = 3'd1,  // write one frame: FRAME_WORDS words on the write channel
    CFG_UNMASK  = 3'd2,  // unmask the region's frames for capture/restore
    CFG_MASK    = 3'd3,  // mask them again
    CFG_CAPTURE = 3'd4,  // copy every unmasked flip-flop into its configuration cell
    CFG_RESTORE = 3'd5   // load every unmasked flip-flop from its configuration cell
  } cfg_cmd_e;

  // Phase of the reliability controller, brought out for observation.
  typedef enum logic [1:0] {
    PH_IDLE       = 2'd0,
    PH_DETECT     = 2'd1,
    PH_CHECKPOINT = 2'd2,
    PH_RECOVERY   = 2'd3
  } phase_e;

  // Code word of frame bit p (see the header).
  function automatic syn_t ecc_code(input int unsigned p);
    if (p == PARITY_POS) return '0;
    if (p == 0) return syn_t'(PARITY_POS);
    if (p >= ECC_FIRST && p < PARITY_POS) return syn_t'(1) << (p - ECC_FIRST);
    for (int unsigned k = 0; k < SYN_W; k++)
      if (p == (1 << k)) return syn_t'(ECC_FIRST + k);
    return syn_t'(p);
  endfunction

endpackage
