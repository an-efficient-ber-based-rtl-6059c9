// config_layer_model: behavioural model of the FPGA's configuration layer
// and its configuration access logic, as seen from the reliability
// controller. Simulation only (behavioural model, not synthesizable logic).
//
// It holds N_FRAMES frames of FRAME_WORDS words and FF_N fabric flip-flops
// of the protected region. Flip-flop i has its configuration (capture) cell
// at frame i % N_FRAMES, word FF_WORD, bit i / N_FRAMES. While run is high
// the flip-flops behave like a binary counter (the user logic of the
// region). Only the first ff_count flip-flops take part in capture and
// restore (the flip-flops of the module placed in the region). Commands:
//   READ f    stream frame f on the read channel (first word RD_LAT cycles
//             after the command, then one word per accepted cycle);
//   WRITE f   take FRAME_WORDS words from the write channel into frame f;
//   UNMASK / MASK  enable / disable capture and restore for the region;
//   CAPTURE   (if unmasked) copy every flip-flop into its cell;
//   RESTORE   (if unmasked) load every flip-flop from its cell.
// The bench loads frames through load_* and flips single configuration
// bits through inj_* (upset injection). Counters record every operation.
module config_layer_model
  import ber_pkg::*;
#(
  parameter int unsigned N_FRAMES = 8,
  parameter int unsigned FAR_W    = $clog2(N_FRAMES),
  parameter int unsigned FF_N     = 16,
  parameter int unsigned FF_WORD  = 3,
  parameter int unsigned RD_LAT   = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             run,
  input  int               ff_count,      // flip-flops in use (<= FF_N)
  // access port
  input  logic             cmd_valid,
  output logic             cmd_ready,
  input  cfg_cmd_e         cmd,
  input  logic [FAR_W-1:0] far,
  output logic             rvalid,
  input  logic             rready,
  output word_t            rdata,
  input  logic             wvalid,
  output logic             wready,
  input  word_t            wdata,
  // bench side
  input  logic             load_valid,
  input  logic [FAR_W-1:0] load_far,
  input  logic [5:0]       load_widx,
  input  word_t            load_data,
  input  logic             inj_valid,
  input  logic [FAR_W-1:0] inj_far,
  input  logic [5:0]       inj_widx,
  input  logic [4:0]       inj_bit,
  input  logic [FAR_W-1:0] peek_far,
  input  logic [5:0]       peek_widx,
  output word_t            peek_data,
  output logic [FF_N-1:0]  ff_state,
  output logic             masked,
  output logic [FF_N-1:0]  last_captured,
  output logic [FF_N-1:0]  last_restored,
  output int               n_capture,
  output int               n_restore,
  output int               n_ignored,     // capture/restore while masked
  output int               n_unmask,
  output int               n_mask,
  output int               n_reads,
  output int               n_writes
);

  word_t frames [N_FRAMES][FRAME_WORDS];

  typedef enum logic [1:0] {M_IDLE, M_RD_WAIT, M_RD, M_WR} mstate_e;
  mstate_e          st;
  logic [FAR_W-1:0] cur_far;
  int               widx, lat;

  assign cmd_ready = (st == M_IDLE);
  assign rvalid    = (st == M_RD);
  assign rdata     = frames[cur_far][widx];
  assign wready    = (st == M_WR);
  assign peek_data = frames[peek_far][peek_widx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= M_IDLE;
      cur_far   <= '0;
      widx      <= 0;
      lat       <= 0;
      ff_state  <= '0;
      masked    <= 1'b1;
      last_captured <= '0;
      last_restored <= '0;
      n_capture <= 0; n_restore <= 0; n_ignored <= 0;
      n_unmask  <= 0; n_mask    <= 0; n_reads   <= 0; n_writes <= 0;
    end else begin
      if (run) ff_state <= (ff_state + 1'b1) & ((FF_N'(1) << ff_count) - 1'b1);
      if (load_valid) frames[load_far][load_widx] <= load_data;
      if (inj_valid)  frames[inj_far][inj_widx][inj_bit] <= ~frames[inj_far][inj_widx][inj_bit];
      unique case (st)
        M_IDLE:
          if (cmd_valid) begin
            cur_far <= far;
            widx    <= 0;
            unique case (cmd)
              CFG_READ:   begin st <= M_RD_WAIT; lat <= 1; n_reads <= n_reads + 1; end
              CFG_WRITE:  begin st <= M_WR; n_writes <= n_writes + 1; end
              CFG_UNMASK: begin masked <= 1'b0; n_unmask <= n_unmask + 1; end
              CFG_MASK:   begin masked <= 1'b1; n_mask <= n_mask + 1; end
              CFG_CAPTURE:
                if (masked) n_ignored <= n_ignored + 1;
                else begin
                  for (int i = 0; i < int'(FF_N); i++)
                    if (i < ff_count) frames[i % N_FRAMES][FF_WORD][i / N_FRAMES] <= ff_state[i];
                  last_captured <= ff_state;
                  n_capture <= n_capture + 1;
                end
              CFG_RESTORE:
                if (masked) n_ignored <= n_ignored + 1;
                else begin
                  for (int i = 0; i < int'(FF_N); i++)
                    if (i < ff_count) begin
                      ff_state[i]      <= frames[i % N_FRAMES][FF_WORD][i / N_FRAMES];
                      last_restored[i] <= frames[i % N_FRAMES][FF_WORD][i / N_FRAMES];
                    end
                  n_restore <= n_restore + 1;
                end
              default: ;
            endcase
          end
        M_RD_WAIT:
          if (lat >= int'(RD_LAT) - 1) st <= M_RD;
          else lat <= lat + 1;
        M_RD:
          if (rready) begin
            if (widx == int'(FRAME_WORDS) - 1) st <= M_IDLE;
            else widx <= widx + 1;
          end
        M_WR:
          if (wvalid) begin
            frames[cur_far][widx] <= wdata;
            if (widx == int'(FRAME_WORDS) - 1) st <= M_IDLE;
            else widx <= widx + 1;
          end
        default: st <= M_IDLE;
      endcase
    end
  end

endmodule
