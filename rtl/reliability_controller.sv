// reliability_controller: the BER (backward error recovery) master that
// protects the Enhanced Reliability Region (ERR) of an SRAM-based FPGA.
//
// What it does (following the design's flowchart): after a first checkpoint
// it keeps reading back the region's frames one after the other and has
// each one checked by the frame ECC checker. When a checkpoint is due
// (periodic timer, or an external request at any time) it takes one at the
// next frame boundary. When a frame is found faulty it rolls the region back
// to the last checkpoint.
//
//  * Checkpoint: unmask the region's frames, order the flip-flop capture
//    into the configuration cells, read every frame back and store it into
//    the spare checkpoint slot, mask the frames again. Each frame read is
//    also compared with the initial bitstream, flip-flop cells masked
//    (validation). If every frame matches, the spare slot becomes the active
//    checkpoint; otherwise the new checkpoint is dropped and, if an older one
//    exists, a recovery follows (the mismatch is an upset).
//  * Recovery: write the active checkpoint back frame by frame (this also
//    rewrites the faulty configuration bits), unmask, order the flip-flop
//    restore, mask again.
//  * Detection: read one frame, ECC-check it (flip-flop cells ignored), go on
//    with the next; after the last frame the scan starts again at frame 0.
//    Detection also restarts at frame 0 after a checkpoint or a recovery.
//
// The design runs this flowchart as software on an embedded processor;
// here it is a hardware state machine, which is this design's choice. So are
// the two checkpoint slots (so that a checkpoint failing validation never
// overwrites the good one), the frame-boundary granularity of checkpoint
// requests and the restart of the scan at frame 0.
//
// Interfaces:
//  * cfg_*: configuration access port (commands ber_pkg::cfg_cmd_e with a
//    frame address, valid/ready; read-back words arrive on cfg_r*, write
//    words leave on cfg_w*, both valid/ready). A READ or WRITE command is
//    followed by exactly FRAME_WORDS words.
//  * st_off: word offset f*FRAME_WORDS + w of the current word into the
//    golden and mask stores; gold_rdata/mask_rdata come one cycle later.
//    ck_*: port of the checkpoint store (two slots of N_FRAME_MAX frames).
//  * ecc_* / val_*: the frame ECC checker and the frame validator.
//  * Statistics: counts of checkpoints, recoveries, validation failures and
//    complete scans, and in clock cycles the last checkpoint latency L, the
//    last rollback time T_rollback and the last lost time T_lost (from the
//    end of the last good checkpoint to the detection).
//
// The data words pass straight through (config port <-> checkpoint store,
// ECC checker, validator); only addresses and handshakes are generated here.
//
// Timing: a word costs two cycles (store read latency), a frame costs
// 2*FRAME_WORDS cycles plus the configuration port's command and data
// latency; the whole-region times scale with n_frames as in
// Worst_MTD = T_f_scan * N_frame, L = T_f_read * N_frame and
// T_rollback = T_f_write * N_frame.
module reliability_controller
  import ber_pkg::*;
#(
  parameter int unsigned N_FRAME_MAX = 144,
  parameter int unsigned FAR_W       = $clog2(N_FRAME_MAX),
  parameter int unsigned OFF_W       = $clog2(N_FRAME_MAX * FRAME_WORDS),
  parameter int unsigned CK_W        = $clog2(2 * N_FRAME_MAX * FRAME_WORDS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic [FAR_W:0]   n_frames,      // frames of the region, 1..N_FRAME_MAX
  input  logic [31:0]      ckpt_period,   // cycles between checkpoints, 0: none
  input  logic             ckpt_req,      // request a checkpoint now (pulse)

  // configuration access port
  output logic             cfg_cmd_valid,
  input  logic             cfg_cmd_ready,
  output cfg_cmd_e         cfg_cmd,
  output logic [FAR_W-1:0] cfg_far,
  input  logic             cfg_rvalid,
  output logic             cfg_rready,
  input  word_t            cfg_rdata,
  output logic             cfg_wvalid,
  input  logic             cfg_wready,
  output word_t            cfg_wdata,

  // safe storage
  output logic [OFF_W-1:0] st_off,
  input  word_t            gold_rdata,
  input  word_t            mask_rdata,
  output logic             ck_we,
  output logic [CK_W-1:0]  ck_addr,
  output word_t            ck_wdata,
  input  word_t            ck_rdata,

  // frame ECC checker
  output logic             ecc_start,
  output logic             ecc_valid,
  output word_t            ecc_word,
  output word_t            ecc_ignore,
  input  logic             ecc_done,
  input  logic             ecc_error,

  // frame validator
  output logic             val_start,
  output logic             val_valid,
  output word_t            val_rd,
  output word_t            val_gold,
  output word_t            val_mask,
  input  logic             val_done,
  input  logic             val_mismatch,

  // status and statistics
  output phase_e           phase,
  output logic             ckpt_valid,
  output logic             active_slot,
  output logic [31:0]      n_checkpoints,
  output logic [31:0]      n_recoveries,
  output logic [31:0]      n_val_fail,
  output logic [31:0]      n_scans,
  output logic [FAR_W-1:0] fault_frame,
  output logic [31:0]      last_ckpt_cycles,
  output logic [31:0]      last_rollback_cycles,
  output logic [31:0]      last_lost_cycles
);

  typedef enum logic [4:0] {
    S_IDLE,
    S_MASTER,
    S_D_CMD,   S_D_WORDS, S_D_WAIT,
    S_C_UNMASK, S_C_CAPTURE, S_C_CMD, S_C_WORDS, S_C_WAIT, S_C_MASK, S_C_END,
    S_R_CMD,   S_R_WORDS, S_R_UNMASK, S_R_RESTORE, S_R_MASK, S_R_END
  } state_e;

  localparam int unsigned SLOT_WORDS = N_FRAME_MAX * FRAME_WORDS;

  state_e            state_q;
  logic [FAR_W-1:0]  frame_q;
  logic [WIDX_W-1:0] widx_q;
  logic [OFF_W-1:0]  off_q;
  logic              rd_ok_q;     // store read data matches off_q
  logic              bad_q;       // validation mismatch in this checkpoint
  logic              req_q;       // pending checkpoint request
  logic [31:0]       timer_q;     // cycles since last checkpoint/recovery end
  logic [31:0]       op_cyc_q;    // cycles of the current checkpoint/recovery
  logic [31:0]       since_ck_q;  // cycles since the last good checkpoint
  logic              ckpt_due;
  logic              last_frame;
  logic              last_word;
  logic              word_take;   // a word moves on the config port this cycle
  logic              cmd_fire;

  assign last_frame = ({1'b0, frame_q} == n_frames - 1'b1);
  assign last_word  = (widx_q == WIDX_W'(FRAME_WORDS - 1));
  assign cmd_fire   = cfg_cmd_valid && cfg_cmd_ready;
  assign ckpt_due   = !ckpt_valid || req_q ||
                      (ckpt_period != '0 && timer_q >= ckpt_period);

  // ---------------------------------------------------------------- outputs
  always_comb begin
    cfg_cmd_valid = 1'b0;
    cfg_cmd       = CFG_READ;
    unique case (state_q)
      S_D_CMD, S_C_CMD: begin cfg_cmd_valid = 1'b1; cfg_cmd = CFG_READ;    end
      S_R_CMD:          begin cfg_cmd_valid = 1'b1; cfg_cmd = CFG_WRITE;   end
      S_C_UNMASK,
      S_R_UNMASK:       begin cfg_cmd_valid = 1'b1; cfg_cmd = CFG_UNMASK;  end
      S_C_MASK,
      S_R_MASK:         begin cfg_cmd_valid = 1'b1; cfg_cmd = CFG_MASK;    end
      S_C_CAPTURE:      begin cfg_cmd_valid = 1'b1; cfg_cmd = CFG_CAPTURE; end
      S_R_RESTORE:      begin cfg_cmd_valid = 1'b1; cfg_cmd = CFG_RESTORE; end
      default: ;
    endcase
  end
  assign cfg_far = frame_q;

  assign cfg_rready = rd_ok_q && (state_q == S_D_WORDS || state_q == S_C_WORDS);
  assign cfg_wvalid = rd_ok_q && (state_q == S_R_WORDS);
  assign cfg_wdata  = ck_rdata;
  assign word_take  = (cfg_rvalid && cfg_rready) || (cfg_wvalid && cfg_wready);

  assign st_off   = off_q;
  // Checkpoints are written into the spare slot, recoveries read the active one.
  assign ck_addr  = CK_W'(off_q) +
                    (((state_q == S_C_WORDS) ? !active_slot : active_slot)
                       ? CK_W'(SLOT_WORDS) : CK_W'(0));
  assign ck_we    = (state_q == S_C_WORDS) && cfg_rvalid && cfg_rready;
  assign ck_wdata = cfg_rdata;

  assign ecc_start  = (state_q == S_D_CMD) && cmd_fire;
  assign ecc_valid  = (state_q == S_D_WORDS) && cfg_rvalid && cfg_rready;
  assign ecc_word   = cfg_rdata;
  assign ecc_ignore = mask_rdata;

  assign val_start = (state_q == S_C_CMD) && cmd_fire;
  assign val_valid = (state_q == S_C_WORDS) && cfg_rvalid && cfg_rready;
  assign val_rd    = cfg_rdata;
  assign val_gold  = gold_rdata;
  assign val_mask  = mask_rdata;

  always_comb begin
    unique case (state_q)
      S_IDLE:                                   phase = PH_IDLE;
      S_MASTER, S_D_CMD, S_D_WORDS, S_D_WAIT:   phase = PH_DETECT;
      S_R_CMD, S_R_WORDS, S_R_UNMASK,
      S_R_RESTORE, S_R_MASK, S_R_END:           phase = PH_RECOVERY;
      default:                                  phase = PH_CHECKPOINT;
    endcase
  end

  // ------------------------------------------------------------ state machine
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q              <= S_IDLE;
      frame_q              <= '0;
      widx_q               <= '0;
      off_q                <= '0;
      rd_ok_q              <= 1'b0;
      bad_q                <= 1'b0;
      req_q                <= 1'b0;
      timer_q              <= '0;
      op_cyc_q             <= '0;
      since_ck_q           <= '0;
      ckpt_valid           <= 1'b0;
      active_slot          <= 1'b0;
      n_checkpoints        <= '0;
      n_recoveries         <= '0;
      n_val_fail           <= '0;
      n_scans              <= '0;
      fault_frame          <= '0;
      last_ckpt_cycles     <= '0;
      last_rollback_cycles <= '0;
      last_lost_cycles     <= '0;
    end else begin
      if (ckpt_req) req_q <= 1'b1;
      if (timer_q != '1)    timer_q    <= timer_q + 1'b1;
      if (since_ck_q != '1) since_ck_q <= since_ck_q + 1'b1;
      op_cyc_q <= op_cyc_q + 1'b1;

      // word bookkeeping shared by the three frame loops
      if (word_take) begin
        rd_ok_q <= 1'b0;
        off_q   <= off_q + 1'b1;
        widx_q  <= last_word ? '0 : widx_q + 1'b1;
      end else begin
        rd_ok_q <= 1'b1;
      end

      unique case (state_q)
        S_IDLE:
          if (enable) state_q <= S_MASTER;

        S_MASTER: begin
          if (!enable)       state_q <= S_IDLE;
          else if (ckpt_due) begin
            state_q  <= S_C_UNMASK;
            req_q    <= 1'b0;
            op_cyc_q <= '0;
            bad_q    <= 1'b0;
          end else           state_q <= S_D_CMD;
        end

        // ---------------- detection: read back one frame and check its ECC
        S_D_CMD:   if (cmd_fire) begin state_q <= S_D_WORDS; rd_ok_q <= 1'b0; end
        S_D_WORDS: if (word_take && last_word) state_q <= S_D_WAIT;
        S_D_WAIT:
          if (ecc_done) begin
            if (ecc_error) begin
              fault_frame      <= frame_q;
              last_lost_cycles <= since_ck_q;
              frame_q          <= '0;
              off_q            <= '0;
              op_cyc_q         <= '0;
              state_q          <= S_R_CMD;
            end else begin
              if (last_frame) begin
                frame_q <= '0;
                off_q   <= '0;
                n_scans <= n_scans + 1'b1;
              end else begin
                frame_q <= frame_q + 1'b1;
              end
              state_q <= S_MASTER;
            end
          end

        // ---------------- checkpoint and validation
        S_C_UNMASK:  if (cmd_fire) state_q <= S_C_CAPTURE;
        S_C_CAPTURE: if (cmd_fire) begin
          state_q <= S_C_CMD;
          frame_q <= '0;
          off_q   <= '0;
          widx_q  <= '0;
        end
        S_C_CMD:   if (cmd_fire) begin state_q <= S_C_WORDS; rd_ok_q <= 1'b0; end
        S_C_WORDS: if (word_take && last_word) state_q <= S_C_WAIT;
        S_C_WAIT:
          if (val_done) begin
            if (val_mismatch) bad_q <= 1'b1;
            if (last_frame) state_q <= S_C_MASK;
            else begin
              frame_q <= frame_q + 1'b1;
              state_q <= S_C_CMD;
            end
          end
        S_C_MASK: if (cmd_fire) state_q <= S_C_END;
        S_C_END: begin
          frame_q <= '0;
          off_q   <= '0;
          widx_q  <= '0;
          if (!bad_q) begin
            active_slot      <= !active_slot;
            ckpt_valid       <= 1'b1;
            n_checkpoints    <= n_checkpoints + 1'b1;
            last_ckpt_cycles <= op_cyc_q;
            timer_q          <= '0;
            since_ck_q       <= '0;
            state_q          <= S_MASTER;
          end else begin
            n_val_fail <= n_val_fail + 1'b1;
            if (ckpt_valid) begin
              // an upset hit the region during the checkpoint: roll back
              last_lost_cycles <= since_ck_q;
              fault_frame      <= '0;
              op_cyc_q         <= '0;
              state_q          <= S_R_CMD;
            end else begin
              state_q <= S_MASTER;   // no checkpoint yet: try again
            end
          end
        end

        // ---------------- recovery: write back the active checkpoint
        S_R_CMD:   if (cmd_fire) begin state_q <= S_R_WORDS; rd_ok_q <= 1'b0; end
        S_R_WORDS:
          if (word_take && last_word) begin
            if (last_frame) state_q <= S_R_UNMASK;
            else begin
              frame_q <= frame_q + 1'b1;
              state_q <= S_R_CMD;
            end
          end
        S_R_UNMASK:  if (cmd_fire) state_q <= S_R_RESTORE;
        S_R_RESTORE: if (cmd_fire) state_q <= S_R_MASK;
        S_R_MASK:    if (cmd_fire) state_q <= S_R_END;
        S_R_END: begin
          frame_q              <= '0;
          off_q                <= '0;
          widx_q               <= '0;
          n_recoveries         <= n_recoveries + 1'b1;
          last_rollback_cycles <= op_cyc_q;
          timer_q              <= '0;
          state_q              <= S_MASTER;
        end

        default: state_q <= S_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------- assertions
  a_cmd_stable: assert property (@(posedge clk) disable iff (!rst_n)
    cfg_cmd_valid && !cfg_cmd_ready |=> cfg_cmd_valid && $stable(cfg_cmd) && $stable(cfg_far));
  a_wdata_stable: assert property (@(posedge clk) disable iff (!rst_n)
    cfg_wvalid && !cfg_wready |=> cfg_wvalid && $stable(cfg_wdata));
  a_frame_range: assert property (@(posedge clk) disable iff (!rst_n)
    cfg_cmd_valid |-> {1'b0, cfg_far} < n_frames);

endmodule
