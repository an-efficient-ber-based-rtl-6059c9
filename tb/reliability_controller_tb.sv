// reliability_controller_tb: self-checking test of the BER controller with
// the frame ECC checker, the frame validator, bench memories for the safe
// storage and the behavioural configuration layer.
//
// The bench builds a random initial bitstream for an 8-frame region (ECC
// bits encoded with its own copy of the code table, flip-flop cells left out
// of the ECC) and checks, in order:
//   1. the first checkpoint: the saved frames equal the bitstream with the
//      captured flip-flop values in their cells; capture happened unmasked
//      and the frames were masked again;
//   2. detection scans: every frame is read, a whole scan takes n_frames
//      times the time of one frame (Worst_MTD = T_f_scan * N_frame), and the
//      checkpoint latency is n_frames read times plus a fixed overhead;
//   3. recovery after a single and after a double upset: the faulty frame
//      is found, the configuration is rewritten to the bitstream, the
//      flip-flops get the checkpointed values, T_rollback scales with the
//      frames written;
//   4. a requested checkpoint and periodic checkpoints;
//   5. an upset during a checkpoint: validation rejects it and the region
//      is rolled back to the previous (good) checkpoint.
module reliability_controller_tb;
  import ber_pkg::*;

  localparam int unsigned NF    = 8;
  localparam int unsigned FAR_W = $clog2(NF);
  localparam int unsigned OFF_W = $clog2(NF * FRAME_WORDS);
  localparam int unsigned CK_W  = $clog2(2 * NF * FRAME_WORDS);
  localparam int unsigned FF_N  = 16;
  localparam int unsigned FF_WORD = 3;

  logic clk = 0, rst_n = 0;
  logic enable = 0, ckpt_req = 0, run = 0;
  logic [FAR_W:0] n_frames = (FAR_W + 1)'(NF);
  logic [31:0] ckpt_period = 0;

  logic cfg_cmd_valid, cfg_cmd_ready, cfg_rvalid, cfg_rready, cfg_wvalid, cfg_wready;
  cfg_cmd_e cfg_cmd;
  logic [FAR_W-1:0] cfg_far;
  word_t cfg_rdata, cfg_wdata;
  logic [OFF_W-1:0] st_off;
  word_t gold_rdata, mask_rdata, ck_wdata, ck_rdata;
  logic ck_we;
  logic [CK_W-1:0] ck_addr;
  logic ecc_start, ecc_valid, ecc_done, ecc_error;
  word_t ecc_word, ecc_ignore;
  logic val_start, val_valid, val_done, val_mismatch;
  word_t val_rd, val_gold, val_mask;
  phase_e phase;
  logic ckpt_valid, active_slot;
  logic [31:0] n_checkpoints, n_recoveries, n_val_fail, n_scans;
  logic [FAR_W-1:0] fault_frame;
  logic [31:0] last_ckpt_cycles, last_rollback_cycles, last_lost_cycles;

  reliability_controller #(.N_FRAME_MAX(NF)) dut (.*);

  frame_ecc u_ecc (
    .clk, .rst_n, .start(ecc_start), .word_valid(ecc_valid), .word(ecc_word),
    .word_ignore(ecc_ignore), .done(ecc_done), .syndrome(), .parity(),
    .frame_error(ecc_error), .single_err(), .double_err()
  );

  frame_validator u_val (
    .clk, .rst_n, .start(val_start), .word_valid(val_valid), .rd_word(val_rd),
    .golden_word(val_gold), .ff_mask(val_mask), .done(val_done),
    .mismatch(val_mismatch), .diff_bits(), .bad_word()
  );

  // bench memories standing for the safe storage
  word_t gold [NF * FRAME_WORDS];
  word_t mask [NF * FRAME_WORDS];
  word_t ck   [2 * NF * FRAME_WORDS];
  always_ff @(posedge clk) begin
    gold_rdata <= gold[st_off];
    mask_rdata <= mask[st_off];
    ck_rdata   <= ck[ck_addr];
    if (ck_we) ck[ck_addr] <= ck_wdata;
  end

  // configuration layer
  logic load_valid = 0, inj_valid = 0;
  logic [FAR_W-1:0] load_far = '0, inj_far = '0, peek_far = '0;
  logic [5:0] load_widx = '0, inj_widx = '0, peek_widx = '0;
  logic [4:0] inj_bit = '0;
  word_t load_data = '0, peek_data;
  logic [FF_N-1:0] ff_state, last_captured, last_restored;
  logic masked;
  int n_capture, n_restore, n_ignored, n_unmask, n_mask, n_reads, n_writes;

  config_layer_model #(.N_FRAMES(NF), .FF_N(FF_N), .FF_WORD(FF_WORD)) u_cfg (
    .clk, .rst_n, .run, .ff_count(FF_N),
    .cmd_valid(cfg_cmd_valid), .cmd_ready(cfg_cmd_ready), .cmd(cfg_cmd), .far(cfg_far),
    .rvalid(cfg_rvalid), .rready(cfg_rready), .rdata(cfg_rdata),
    .wvalid(cfg_wvalid), .wready(cfg_wready), .wdata(cfg_wdata),
    .load_valid, .load_far, .load_widx, .load_data,
    .inj_valid, .inj_far, .inj_widx, .inj_bit, .peek_far, .peek_widx, .peek_data,
    .ff_state, .masked, .last_captured, .last_restored,
    .n_capture, .n_restore, .n_ignored, .n_unmask, .n_mask, .n_reads, .n_writes
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (400000) @(posedge clk);
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

  // ---- reference ECC code and encoder (independent of the RTL package)
  int unsigned code [1312];
  function automatic void build_codes();
    for (int p = 0; p < 1312; p++) code[p] = p;
    for (int k = 0; k < 11; k++) begin
      code[1 << k]  = 640 + k;
      code[640 + k] = 1 << k;
    end
    code[0]   = 651;
    code[651] = 0;
  endfunction

  function automatic bit is_ff(int f, int w, int b);
    int i = b * NF + f;
    return (w == FF_WORD) && (i < FF_N);
  endfunction

  function automatic void make_bitstream();
    for (int f = 0; f < NF; f++) begin
      logic [1311:0] fr;
      int unsigned s;
      bit par;
      s = 0; par = 0;
      for (int p = 0; p < 1312; p++) fr[p] = 1'($urandom);
      for (int p = 640; p < 652; p++) fr[p] = 0;
      for (int p = 0; p < 1312; p++) if (is_ff(f, p / 32, p % 32)) fr[p] = 0;
      for (int p = 0; p < 1312; p++) if (fr[p]) s ^= code[p];
      for (int k = 0; k < 11; k++) fr[640 + k] = s[k];
      for (int p = 0; p < 1312; p++) par ^= fr[p];
      fr[651] = par;
      for (int w = 0; w < FRAME_WORDS; w++) begin
        gold[f * FRAME_WORDS + w] = fr[w*32 +: 32];
        mask[f * FRAME_WORDS + w] = '0;
        for (int b = 0; b < 32; b++) if (is_ff(f, w, b)) mask[f * FRAME_WORDS + w][b] = 1'b1;
      end
    end
  endfunction

  task automatic load_model();
    for (int f = 0; f < NF; f++)
      for (int w = 0; w < FRAME_WORDS; w++) begin
        @(negedge clk);
        load_valid = 1; load_far = FAR_W'(f); load_widx = 6'(w);
        load_data = gold[f * FRAME_WORDS + w];
      end
    @(negedge clk) load_valid = 0;
  endtask

  task automatic inject(input int f, input int w, input int b);
    @(negedge clk);
    inj_valid = 1; inj_far = FAR_W'(f); inj_widx = 6'(w); inj_bit = 5'(b);
    @(negedge clk) inj_valid = 0;
  endtask

  // random configuration bit outside the flip-flop cells
  task automatic pick_cfg_bit(output int f, output int w, output int b);
    do begin
      f = $urandom_range(0, NF - 1); w = $urandom_range(0, FRAME_WORDS - 1);
      b = $urandom_range(0, 31);
    end while (is_ff(f, w, b));
  endtask

  // model configuration equals the bitstream outside flip-flop cells
  task automatic check_config_clean(input string what);
    bit ok = 1;
    for (int f = 0; f < NF; f++)
      for (int w = 0; w < FRAME_WORDS; w++) begin
        @(negedge clk);
        peek_far = FAR_W'(f); peek_widx = 6'(w);
        #1;
        if (((peek_data ^ gold[f * FRAME_WORDS + w]) & ~mask[f * FRAME_WORDS + w]) != 0) ok = 0;
      end
    check(ok, what);
  endtask

  // the active checkpoint slot holds the bitstream with ffv in the flip-flop cells
  function automatic bit ckpt_holds(input logic [FF_N-1:0] ffv);
    int base = active_slot ? NF * FRAME_WORDS : 0;
    for (int f = 0; f < NF; f++)
      for (int w = 0; w < FRAME_WORDS; w++) begin
        word_t exp = gold[f * FRAME_WORDS + w];
        for (int b = 0; b < 32; b++) if (is_ff(f, w, b)) exp[b] = ffv[b * NF + f];
        if (ck[base + f * FRAME_WORDS + w] != exp) return 0;
      end
    return 1;
  endfunction

  task automatic wait_until_recoveries(input int n);
    while (n_recoveries < 32'(n)) @(posedge clk);
  endtask

  // detection frame start stamps
  longint d_stamp [$];
  longint c_stamp [$];
  always @(posedge clk)
    if (cfg_cmd_valid && cfg_cmd_ready && cfg_cmd == CFG_READ) begin
      if (phase == PH_DETECT) d_stamp.push_back(cyc);
      else c_stamp.push_back(cyc);
    end

  initial begin
    int f, w, b, f2, w2, b2;
    logic [FF_N-1:0] good_ff;
    longint t0, t1, tf;
    int scans0, ck0;

    build_codes();
    make_bitstream();
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_model();
    run = 1;
    ckpt_period = 0;
    @(negedge clk) enable = 1;

    // 1. first checkpoint
    c_stamp.delete();
    while (n_checkpoints < 1) @(posedge clk);
    @(negedge clk);
    check(n_capture == 1 && n_ignored == 0, "first checkpoint captured while unmasked");
    check(masked, "frames masked again after the checkpoint");
    check(ckpt_holds(last_captured), "checkpoint content = bitstream + captured flip-flops");
    check(c_stamp.size() == NF, "checkpoint read every frame once");
    tf = c_stamp[1] - c_stamp[0];
    begin
      bit eq = 1;
      for (int i = 1; i < c_stamp.size(); i++) if (c_stamp[i] - c_stamp[i-1] != tf) eq = 0;
      check(eq, "constant frame read time during the checkpoint");
    end
    check(longint'(last_ckpt_cycles) >= NF * tf && longint'(last_ckpt_cycles) <= NF * tf + 8,
          $sformatf("L=%0d cycles, frames*T_f_read=%0d", last_ckpt_cycles, NF * tf));
    good_ff = last_captured;

    // 2. detection scans
    d_stamp.delete();
    scans0 = n_scans;
    while (n_scans < 32'(scans0 + 3)) @(posedge clk);
    @(negedge clk);
    check(n_recoveries == 0 && n_val_fail == 0, "no false detection on a clean region");
    tf = d_stamp[1] - d_stamp[0];
    begin
      bit eq = 1;
      for (int i = 1; i < d_stamp.size(); i++) if (d_stamp[i] - d_stamp[i-1] != tf) eq = 0;
      check(eq, "constant frame scan time");
      check(d_stamp[NF] - d_stamp[0] == NF * tf, "one scan = N_frame * T_f_scan");
    end
    $display("T_f_scan=%0d cycles, scan=%0d cycles, L=%0d cycles", tf, NF * tf, last_ckpt_cycles);

    // 3a. single upset -> detection and recovery
    pick_cfg_bit(f, w, b);
    inject(f, w, b);
    wait_until_recoveries(1);
    @(negedge clk);
    check(fault_frame == FAR_W'(f), $sformatf("faulty frame %0d reported as %0d", f, fault_frame));
    check(last_restored == good_ff, "flip-flops restored to the checkpoint");
    check(n_writes == NF, "every frame written back");
    check(masked && n_restore == 1, "restore done unmasked, frames masked again");
    check(last_rollback_cycles >= 32'(NF * 2 * FRAME_WORDS), "T_rollback covers N_frame frame writes");
    check(last_lost_cycles > 0, "T_lost measured");
    check_config_clean("configuration rewritten after the single upset");

    // 3b. double upset in one frame
    pick_cfg_bit(f, w, b);
    do pick_cfg_bit(f2, w2, b2); while (f2 != f || (w2 == w && b2 == b));
    inject(f, w, b);
    inject(f2, w2, b2);
    wait_until_recoveries(2);
    @(negedge clk);
    check(fault_frame == FAR_W'(f), "double upset frame found");
    check(last_restored == good_ff, "flip-flops restored after the double upset");
    check_config_clean("configuration rewritten after the double upset");

    // 4a. requested checkpoint
    ck0 = n_checkpoints;
    @(negedge clk) ckpt_req = 1;
    @(negedge clk) ckpt_req = 0;
    t0 = cyc;
    while (n_checkpoints == ck0) @(posedge clk);
    @(negedge clk);
    check(cyc - t0 < 2 * (last_ckpt_cycles + 200), "requested checkpoint taken promptly");
    check(ckpt_holds(last_captured), "requested checkpoint content");
    good_ff = last_captured;

    // 4b. periodic checkpoints
    ckpt_period = 32'(3 * NF * tf);
    ck0 = n_checkpoints;
    t0 = cyc;
    while (n_checkpoints < 32'(ck0 + 3)) @(posedge clk);
    t1 = cyc;
    check(t1 - t0 <= 3 * (longint'(ckpt_period) + last_ckpt_cycles + tf + 20),
          "periodic checkpoints at the programmed period");
    ckpt_period = 0;
    @(negedge clk);
    good_ff = last_captured;

    // 5. upset during the checkpoint readback -> validation failure
    @(negedge clk) ckpt_req = 1;
    @(negedge clk) ckpt_req = 0;
    while (!(phase == PH_CHECKPOINT && cfg_cmd_valid && cfg_cmd == CFG_READ && cfg_far == 1)) @(posedge clk);
    pick_cfg_bit(f, w, b);
    inject(NF - 1, w, b);
    wait_until_recoveries(3);
    @(negedge clk);
    check(n_val_fail == 1, "validation rejected the corrupted checkpoint");
    check(last_restored == good_ff, "rolled back to the previous good checkpoint");
    check(ckpt_holds(good_ff), "good checkpoint slot kept");
    check_config_clean("configuration clean after the rejected checkpoint");
    check(n_ignored == 0, "no capture/restore while masked");

    $display("checkpoints=%0d recoveries=%0d val_fail=%0d scans=%0d",
             n_checkpoints, n_recoveries, n_val_fail, n_scans);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
