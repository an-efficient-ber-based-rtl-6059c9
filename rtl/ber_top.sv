// ber_top: the reliability architecture of an SRAM-based FPGA protected by
// backward error recovery, and the user modules of its Enhanced Reliability
// Region (ERR).
//
// The reliability controller reads the region's configuration frames back
// through the configuration access port (cfg_*), checks each one with the
// frame ECC checker, takes validated checkpoints (frame validator against
// the initial bitstream) into the checkpoint store, and on a faulty frame
// writes the last checkpoint back and restores the flip-flops. The three
// safe-storage memories hold the initial bitstream of the region (golden),
// the flip-flop cell mask of every frame (mask) and two checkpoint slots.
// A host loads the first two and may read the checkpoints through the host_*
// port (host_sel: 0 golden, 1 mask, 2 checkpoint store).
//
// The ERR modules (the binary counter and the bubble sorter used to test the
// method) sit beside the controller with their own ports, because the
// method reaches them only through the configuration layer of the FPGA, not
// through wires. The configuration layer itself (frames, capture/restore
// of flip-flops, masking) is part of the FPGA and is outside this RTL: its
// access port is brought out as the cfg_* ports.
//
// Defaults: N_FRAME_MAX = 144 frames, the larger of the two test regions of
// the design (the counter needs 36 frames, the sorter 144). All timing is in
// clock cycles; see reliability_controller for the per-frame cost.
module ber_top
  import ber_pkg::*;
#(
  parameter int unsigned N_FRAME_MAX = 144,
  parameter int unsigned FAR_W       = $clog2(N_FRAME_MAX),
  parameter int unsigned OFF_W       = $clog2(N_FRAME_MAX * FRAME_WORDS),
  parameter int unsigned CK_W        = $clog2(2 * N_FRAME_MAX * FRAME_WORDS),
  parameter int unsigned CNT_W       = 36,
  parameter int unsigned LED_W       = 8,
  parameter int unsigned SORT_N      = 16,
  parameter int unsigned SORT_W      = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,

  // controller set-up
  input  logic                      enable,
  input  logic [FAR_W:0]            n_frames,
  input  logic [31:0]               ckpt_period,
  input  logic                      ckpt_req,

  // configuration access port (to the FPGA configuration logic)
  output logic                      cfg_cmd_valid,
  input  logic                      cfg_cmd_ready,
  output cfg_cmd_e                  cfg_cmd,
  output logic [FAR_W-1:0]          cfg_far,
  input  logic                      cfg_rvalid,
  output logic                      cfg_rready,
  input  word_t                     cfg_rdata,
  output logic                      cfg_wvalid,
  input  logic                      cfg_wready,
  output word_t                     cfg_wdata,

  // host access to the safe storage
  input  logic                      host_we,
  input  logic [1:0]                host_sel,
  input  logic [CK_W-1:0]           host_addr,
  input  word_t                     host_wdata,
  output word_t                     host_rdata,

  // status
  output phase_e                    phase,
  output logic                      ckpt_valid,
  output logic                      active_slot,
  output logic [31:0]               n_checkpoints,
  output logic [31:0]               n_recoveries,
  output logic [31:0]               n_val_fail,
  output logic [31:0]               n_scans,
  output logic [FAR_W-1:0]          fault_frame,
  output logic [31:0]               last_ckpt_cycles,
  output logic [31:0]               last_rollback_cycles,
  output logic [31:0]               last_lost_cycles,
  output syn_t                      last_syndrome,   // of the last frame checked
  output logic                      last_parity,
  output logic                      last_double_err,
  output logic [10:0]               last_val_diff_bits,  // of the last frame validated
  output logic [WIDX_W-1:0]         last_val_bad_word,

  // ERR: binary counter
  input  logic                      cnt_en,
  output logic [CNT_W-1:0]          cnt_count,
  output logic [LED_W-1:0]          gpio_leds,

  // ERR: bubble sorter
  input  logic                      sort_in_valid,
  input  logic [SORT_W-1:0]         sort_in_data,
  input  logic                      sort_start,
  output logic                      sort_busy,
  output logic                      sort_done,
  input  logic [$clog2(SORT_N)-1:0] sort_rd_idx,
  output logic [SORT_W-1:0]         sort_rd_data,
  output logic [31:0]               sort_n_swaps
);

  localparam int unsigned SLOT_WORDS = N_FRAME_MAX * FRAME_WORDS;

  logic [OFF_W-1:0] st_off;
  word_t            gold_rdata, mask_rdata, ck_rdata, ck_wdata;
  logic             ck_we;
  logic [CK_W-1:0]  ck_addr;
  word_t            hb_gold, hb_mask, hb_ck;

  logic  ecc_start, ecc_valid, ecc_done, ecc_error;
  word_t ecc_word, ecc_ignore;
  logic  val_start, val_valid, val_done, val_mismatch;
  word_t val_rd, val_gold, val_mask;

  reliability_controller #(
    .N_FRAME_MAX(N_FRAME_MAX), .FAR_W(FAR_W), .OFF_W(OFF_W), .CK_W(CK_W)
  ) u_ctrl (
    .clk, .rst_n, .enable, .n_frames, .ckpt_period, .ckpt_req,
    .cfg_cmd_valid, .cfg_cmd_ready, .cfg_cmd, .cfg_far,
    .cfg_rvalid, .cfg_rready, .cfg_rdata,
    .cfg_wvalid, .cfg_wready, .cfg_wdata,
    .st_off, .gold_rdata, .mask_rdata,
    .ck_we, .ck_addr, .ck_wdata, .ck_rdata,
    .ecc_start, .ecc_valid, .ecc_word, .ecc_ignore, .ecc_done, .ecc_error,
    .val_start, .val_valid, .val_rd, .val_gold, .val_mask, .val_done, .val_mismatch,
    .phase, .ckpt_valid, .active_slot,
    .n_checkpoints, .n_recoveries, .n_val_fail, .n_scans, .fault_frame,
    .last_ckpt_cycles, .last_rollback_cycles, .last_lost_cycles
  );

  frame_ecc u_ecc (
    .clk, .rst_n,
    .start(ecc_start), .word_valid(ecc_valid), .word(ecc_word), .word_ignore(ecc_ignore),
    .done(ecc_done), .syndrome(last_syndrome), .parity(last_parity), .frame_error(ecc_error),
    .single_err()  /* same as parity */, .double_err(last_double_err)
  );

  frame_validator u_val (
    .clk, .rst_n,
    .start(val_start), .word_valid(val_valid), .rd_word(val_rd),
    .golden_word(val_gold), .ff_mask(val_mask),
    .done(val_done), .mismatch(val_mismatch), .diff_bits(last_val_diff_bits),
    .bad_word(last_val_bad_word)
  );

  // golden (initial bitstream) frames of the region
  safe_storage #(.DEPTH(SLOT_WORDS), .ADDR_W(OFF_W)) u_golden (
    .clk,
    .a_we(1'b0), .a_addr(st_off), .a_wdata('0), .a_rdata(gold_rdata),
    .b_we(host_we && host_sel == 2'd0), .b_addr(host_addr[OFF_W-1:0]),
    .b_wdata(host_wdata), .b_rdata(hb_gold)
  );

  // flip-flop cell mask of every frame
  safe_storage #(.DEPTH(SLOT_WORDS), .ADDR_W(OFF_W)) u_mask (
    .clk,
    .a_we(1'b0), .a_addr(st_off), .a_wdata('0), .a_rdata(mask_rdata),
    .b_we(host_we && host_sel == 2'd1), .b_addr(host_addr[OFF_W-1:0]),
    .b_wdata(host_wdata), .b_rdata(hb_mask)
  );

  // two checkpoint slots
  safe_storage #(.DEPTH(2 * SLOT_WORDS), .ADDR_W(CK_W)) u_ckpt (
    .clk,
    .a_we(ck_we), .a_addr(ck_addr), .a_wdata(ck_wdata), .a_rdata(ck_rdata),
    .b_we(host_we && host_sel == 2'd2), .b_addr(host_addr),
    .b_wdata(host_wdata), .b_rdata(hb_ck)
  );

  logic [1:0] host_sel_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) host_sel_q <= '0;
    else        host_sel_q <= host_sel;

  always_comb begin
    unique case (host_sel_q)
      2'd0:    host_rdata = hb_gold;
      2'd1:    host_rdata = hb_mask;
      default: host_rdata = hb_ck;
    endcase
  end

  // ---------------------------------------------------------- ERR modules
  binary_counter #(.WIDTH(CNT_W), .LED_W(LED_W)) u_counter (
    .clk, .rst_n, .en(cnt_en), .count(cnt_count), .leds(gpio_leds)
  );

  bubble_sorter #(.N(SORT_N), .W(SORT_W)) u_sorter (
    .clk, .rst_n,
    .in_valid(sort_in_valid), .in_data(sort_in_data), .start(sort_start),
    .busy(sort_busy), .done(sort_done), .rd_idx(sort_rd_idx), .rd_data(sort_rd_data),
    .n_swaps(sort_n_swaps)
  );

endmodule
