// safe_storage_tb: self-checking test of the two-port safe-storage RAM.
//
// Random writes and reads on both ports are checked against a reference
// array: read data appears one cycle after the address, a port reads the old
// word when it writes the same address, and each port sees the other's
// writes.
module safe_storage_tb;
  import ber_pkg::*;

  localparam int unsigned DEPTH = 300;
  localparam int unsigned AW = $clog2(DEPTH);

  logic clk = 0;
  logic a_we = 0, b_we = 0;
  logic [AW-1:0] a_addr = '0, b_addr = '0;
  word_t a_wdata = '0, b_wdata = '0, a_rdata, b_rdata;

  int checks = 0, failures = 0;
  word_t ref_mem [DEPTH];

  safe_storage #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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
    word_t exp_a, exp_b;
    bit    have = 0;
    // fill through port B
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      b_we = 1; b_addr = AW'(i); b_wdata = $urandom; ref_mem[i] = b_wdata;
    end
    @(negedge clk) b_we = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (have) begin
        check(a_rdata == exp_a, $sformatf("port A read, t=%0d", t));
        check(b_rdata == exp_b, $sformatf("port B read, t=%0d", t));
      end
      a_addr = AW'($urandom_range(0, DEPTH - 1));
      do b_addr = AW'($urandom_range(0, DEPTH - 1)); while (b_addr == a_addr);
      a_we = 1'($urandom); b_we = 1'($urandom);
      a_wdata = $urandom; b_wdata = $urandom;
      exp_a = ref_mem[a_addr];
      exp_b = ref_mem[b_addr];
      if (a_we) ref_mem[a_addr] = a_wdata;
      if (b_we) ref_mem[b_addr] = b_wdata;
      have = 1;
    end
    @(negedge clk);
    check(a_rdata == exp_a && b_rdata == exp_b, "last read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
