// ber_top_tb: end-to-end test of the whole reliability architecture at its
// default size (N_FRAME_MAX = 144), with the behavioural configuration
// layer attached to the configuration access port.
//
// Two regions are protected in turn, the sizes of the two test modules of
// the design: the bubble sorter (144 frames, 198 flip-flops) and the binary
// counter (36 frames, 36 flip-flops). For each, the bench loads a random
// initial bitstream with its ECC bits and the flip-flop masks through the
// host port, starts the controller and drives it through every mechanism:
// first checkpoint (checked through the host port against the bitstream
// and the captured flip-flops), full detection scans, recovery from a
// single and from a double upset, a requested checkpoint, periodic
// checkpoints, a recovery that cancels the next planned checkpoint, and an upset during a checkpoint that validation must
// reject. The ERR modules of the top are exercised as well (the counter
// drives the LEDs, the sorter sorts a block). Each mechanism is counted and
// a mechanism that never happened counts as a failure.
module ber_top_tb;
  import ber_pkg::*;

  localparam int unsigned NMAX  = 144;
  localparam int unsigned FAR_W = $clog2(NMAX);
  localparam int unsigned CK_W  = $clog2(2 * NMAX * FRAME_WORDS);
  localparam int unsigned SLOT  = NMAX * FRAME_WORDS;
  localparam int unsigned FF_N  = 198;
  localparam int unsigned FF_WORD = 3;

  logic clk = 0, rst_n = 0;
  logic enable = 0, ckpt_req = 0, run = 0;
  logic [FAR_W:0] n_frames = '0;
  logic [31:0] ckpt_period = 0;
  int ff_count = 0;

  logic cfg_cmd_valid, cfg_cmd_ready, cfg_rvalid, cfg_rready, cfg_wvalid, cfg_wready;
  cfg_cmd_e cfg_cmd;
  logic [FAR_W-1:0] cfg_far;
  word_t cfg_rdata, cfg_wdata;
  logic host_we = 0;
  logic [1:0] host_sel = '0;
  logic [CK_W-1:0] host_addr = '0;
  word_t host_wdata = '0, host_rdata;
  phase_e phase;
  logic ckpt_valid, active_slot;
  logic [31:0] n_checkpoints, n_recoveries, n_val_fail, n_scans;
  logic [FAR_W-1:0] fault_frame;
  logic [31:0] last_ckpt_cycles, last_rollback_cycles, last_lost_cycles;
  syn_t last_syndrome;
  logic last_parity, last_double_err;
  logic [10:0] last_val_diff_bits;
  logic [WIDX_W-1:0] last_val_bad_word;
  logic cnt_en = 0;
  logic [35:0] cnt_count;
  logic [7:0] gpio_leds;
  logic sort_in_valid = 0, sort_start = 0;
  logic [7:0] sort_in_data = '0;
  logic sort_busy, sort_done;
  logic [3:0] sort_rd_idx = '0;
  logic [7:0] sort_rd_data;
  logic [31:0] sort_n_swaps;

  ber_top dut (.*);

  logic load_valid = 0, inj_valid = 0;
  logic [FAR_W-1:0] load_far = '0, inj_far = '0, peek_far = '0;
  logic [5:0] load_widx = '0, inj_widx = '0, peek_widx = '0;
  logic [4:0] inj_bit = '0;
  word_t load_data = '0, peek_data;
  logic [FF_N-1:0] ff_state, last_captured, last_restored;
  logic masked;
  int n_capture, n_restore, n_ignored, n_unmask, n_mask, n_reads, n_writes;

  config_layer_model #(.N_FRAMES(NMAX), .FF_N(FF_N), .FF_WORD(FF_WORD)) u_cfg (
    .clk, .rst_n, .run, .ff_count,
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

  // mechanism counters
  int m_first_ckpt = 0, m_scan = 0, m_single = 0, m_double = 0, m_req_ckpt = 0;
  int m_periodic = 0, m_val_reject = 0, m_count = 0, m_sort = 0, m_cancel = 0;

  initial begin
    repeat (3000000) @(posedge clk);
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

  // ---- reference ECC code (independent copy of the code assignment)
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

  int nf;   // frames of the current region
  word_t gold [SLOT];
  word_t mask [SLOT];

  function automatic bit is_ff(int f, int w, int b);
    int i = b * NMAX + f;
    return (w == FF_WORD) && (i < ff_count);
  endfunction

  function automatic void make_bitstream();
    for (int f = 0; f < nf; f++) begin
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

  task automatic load_all();
    for (int i = 0; i < nf * FRAME_WORDS; i++) begin
      @(negedge clk);
      host_we = 1; host_sel = 2'd0; host_addr = CK_W'(i); host_wdata = gold[i];
      load_valid = 1; load_far = FAR_W'(i / FRAME_WORDS); load_widx = 6'(i % FRAME_WORDS);
      load_data = gold[i];
      @(negedge clk);
      host_sel = 2'd1; host_wdata = mask[i];
      load_valid = 0;
    end
    @(negedge clk) host_we = 0;
  endtask

  task automatic inject(input int f, input int w, input int b);
    @(negedge clk);
    inj_valid = 1; inj_far = FAR_W'(f); inj_widx = 6'(w); inj_bit = 5'(b);
    @(negedge clk) inj_valid = 0;
  endtask

  task automatic pick_cfg_bit(output int f, output int w, output int b);
    do begin
      f = $urandom_range(0, nf - 1); w = $urandom_range(0, FRAME_WORDS - 1);
      b = $urandom_range(0, 31);
    end while (is_ff(f, w, b));
  endtask

  task automatic check_config_clean(input string what);
    bit ok = 1;
    for (int f = 0; f < nf; f++)
      for (int w = 0; w < FRAME_WORDS; w++) begin
        @(negedge clk);
        peek_far = FAR_W'(f); peek_widx = 6'(w);
        #1;
        if (((peek_data ^ gold[f * FRAME_WORDS + w]) & ~mask[f * FRAME_WORDS + w]) != 0) ok = 0;
      end
    check(ok, what);
  endtask

  // read the active checkpoint through the host port and compare
  task automatic check_ckpt(input logic [FF_N-1:0] ffv, input string what);
    bit ok = 1;
    int base = active_slot ? SLOT : 0;
    for (int f = 0; f < nf; f++)
      for (int w = 0; w < FRAME_WORDS; w++) begin
        word_t exp = gold[f * FRAME_WORDS + w];
        for (int b = 0; b < 32; b++) if (is_ff(f, w, b)) exp[b] = ffv[b * NMAX + f];
        @(negedge clk);
        host_sel = 2'd2; host_addr = CK_W'(base + f * FRAME_WORDS + w);
        @(negedge clk);
        if (host_rdata != exp) ok = 0;
      end
    check(ok, what);
  endtask

  function automatic bit ff_eq(input logic [FF_N-1:0] a, input logic [FF_N-1:0] b);
    for (int i = 0; i < ff_count; i++) if (a[i] != b[i]) return 0;
    return 1;
  endfunction

  longint d_stamp [$];
  always @(posedge clk)
    if (cfg_cmd_valid && cfg_cmd_ready && cfg_cmd == CFG_READ && phase == PH_DETECT)
      d_stamp.push_back(cyc);

  task automatic run_region(input int frames, input int ffs);
    int f, w, b, f2, w2, b2, ck0, rec0, vf0, sc0;
    logic [FF_N-1:0] good_ff;
    longint t0, tf;

    nf = frames;
    ff_count = ffs;
    $display("--- region of %0d frames, %0d flip-flops", nf, ffs);
    rst_n = 0;
    enable = 0;
    run = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    make_bitstream();
    load_all();
    n_frames = (FAR_W + 1)'(nf);
    ckpt_period = 0;
    run = 1;
    @(negedge clk) enable = 1;

    // first checkpoint
    while (n_checkpoints < 1) @(posedge clk);
    @(negedge clk);
    check(n_capture == 1 && masked, "first checkpoint: capture unmasked, masked again");
    check_ckpt(last_captured, "first checkpoint content");
    good_ff = last_captured;
    m_first_ckpt++;
    $display("L = %0d cycles for %0d frames", last_ckpt_cycles, nf);

    // detection scans
    d_stamp.delete();
    sc0 = n_scans;
    while (n_scans < 32'(sc0 + 2)) @(posedge clk);
    @(negedge clk);
    check(n_recoveries == 0, "clean region: no recovery");
    tf = d_stamp[1] - d_stamp[0];
    check(d_stamp[nf] - d_stamp[0] == nf * tf, "Worst_MTD = N_frame * T_f_scan");
    m_scan += n_scans - sc0;
    $display("T_f_scan = %0d cycles, Worst_MTD = %0d cycles", tf, nf * tf);

    // single upset
    rec0 = n_recoveries;
    pick_cfg_bit(f, w, b);
    inject(f, w, b);
    while (n_recoveries == rec0) @(posedge clk);
    @(negedge clk);
    check(fault_frame == FAR_W'(f), "single upset: frame located");
    check(last_parity, "single upset: odd parity");
    check(ff_eq(last_restored, good_ff), "single upset: flip-flops rolled back");
    check_config_clean("single upset: configuration rewritten");
    m_single++;
    $display("T_rollback = %0d cycles, T_lost = %0d cycles", last_rollback_cycles, last_lost_cycles);

    // double upset
    rec0 = n_recoveries;
    pick_cfg_bit(f, w, b);
    do pick_cfg_bit(f2, w2, b2); while (f2 != f || (w2 == w && b2 == b));
    inject(f, w, b);
    inject(f2, w2, b2);
    while (n_recoveries == rec0) @(posedge clk);
    @(negedge clk);
    check(fault_frame == FAR_W'(f) && last_double_err, "double upset: frame located, even parity");
    check(ff_eq(last_restored, good_ff), "double upset: flip-flops rolled back");
    check_config_clean("double upset: configuration rewritten");
    m_double++;

    // requested checkpoint
    ck0 = n_checkpoints;
    @(negedge clk) ckpt_req = 1;
    @(negedge clk) ckpt_req = 0;
    while (n_checkpoints == ck0) @(posedge clk);
    @(negedge clk);
    check_ckpt(last_captured, "requested checkpoint content");
    good_ff = last_captured;
    m_req_ckpt++;

    // periodic checkpoints
    ckpt_period = 32'(nf * tf);
    ck0 = n_checkpoints;
    t0 = cyc;
    while (n_checkpoints < 32'(ck0 + 2)) @(posedge clk);
    check(cyc - t0 <= 2 * (longint'(ckpt_period) + last_ckpt_cycles + tf + 20), "periodic checkpoint period");
    m_periodic += n_checkpoints - ck0;

    // recovery just before a planned checkpoint: the planned one is
    // cancelled and the period restarts from the end of the recovery
    while (phase != PH_DETECT) @(posedge clk);
    ck0 = n_checkpoints;
    rec0 = n_recoveries;
    good_ff = last_captured;
    pick_cfg_bit(f, w, b);
    inject(nf / 2, w, b);
    t0 = cyc;
    while (n_recoveries == rec0) @(posedge clk);
    check(last_lost_cycles < ckpt_period, "fault found before the planned checkpoint was due");
    t0 = cyc;
    while (cyc - t0 < longint'(ckpt_period) - 2) begin
      @(posedge clk);
      if (n_checkpoints != ck0) break;
    end
    check(n_checkpoints == ck0, "planned checkpoint cancelled by the recovery");
    check(ff_eq(last_restored, good_ff), "rollback to the last checkpoint before the cancelled one");
    while (n_checkpoints == ck0) @(posedge clk);
    check(ckpt_valid, "next checkpoint after a full period");
    m_cancel++;
    ckpt_period = 0;
    @(negedge clk);
    good_ff = last_captured;

    // upset during a checkpoint
    vf0 = n_val_fail;
    rec0 = n_recoveries;
    @(negedge clk) ckpt_req = 1;
    @(negedge clk) ckpt_req = 0;
    while (!(phase == PH_CHECKPOINT && cfg_cmd_valid && cfg_cmd == CFG_READ && cfg_far == 1)) @(posedge clk);
    pick_cfg_bit(f, w, b);
    inject(nf - 1, w, b);
    while (n_recoveries == rec0) @(posedge clk);
    @(negedge clk);
    check(n_val_fail == vf0 + 1 && last_val_diff_bits == 1, "validation rejected the checkpoint");
    check(ff_eq(last_restored, good_ff), "rolled back to the previous good checkpoint");
    check_config_clean("configuration clean after the rejected checkpoint");
    check(n_ignored == 0, "no capture/restore while masked");
    m_val_reject++;
  endtask

  initial begin
    build_codes();
    repeat (3) @(negedge clk);

    // ERR modules of the top
    rst_n = 1;
    @(negedge clk) cnt_en = 1;
    repeat (100) @(negedge clk);
    cnt_en = 0;
    @(negedge clk);
    check(cnt_count == 36'd100 && gpio_leds == cnt_count[35:28], "counter counted 100");
    m_count++;
    begin
      int v [16];
      for (int i = 0; i < 16; i++) begin
        v[i] = $urandom_range(0, 255);
        @(negedge clk) sort_in_valid = 1; sort_in_data = 8'(v[i]);
      end
      @(negedge clk) sort_in_valid = 0; sort_start = 1;
      @(negedge clk) sort_start = 0;
      while (!sort_done) @(negedge clk);
      v.sort();
      for (int i = 0; i < 16; i++) begin
        sort_rd_idx = 4'(i);
        #1 check(int'(sort_rd_data) == v[i], "sorter output");
      end
      m_sort++;
    end

    run_region(144, 198);   // bubble sorter region
    run_region(36, 36);     // binary counter region

    $display("mechanisms: first_ckpt=%0d scans=%0d single=%0d double=%0d req_ckpt=%0d periodic=%0d cancelled=%0d val_reject=%0d count=%0d sort=%0d",
             m_first_ckpt, m_scan, m_single, m_double, m_req_ckpt, m_periodic, m_cancel, m_val_reject, m_count, m_sort);
    check(m_first_ckpt > 0, "first checkpoint happened");
    check(m_scan > 0, "detection scan happened");
    check(m_single > 0, "single-upset recovery happened");
    check(m_double > 0, "double-upset recovery happened");
    check(m_req_ckpt > 0, "requested checkpoint happened");
    check(m_periodic > 0, "periodic checkpoint happened");
    check(m_val_reject > 0, "validation rejection happened");
    check(m_cancel > 0, "planned checkpoint cancellation happened");
    check(m_count > 0 && m_sort > 0, "ERR modules ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
