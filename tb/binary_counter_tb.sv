// binary_counter_tb: self-checking test of the ERR binary counter.
//
// The counter is enabled on random cycles and compared each cycle with a
// reference count; the LED bits must be the top bits of the count. A small
// width is used so that the wrap-around is reached.
module binary_counter_tb;
  localparam int unsigned WIDTH = 10;
  localparam int unsigned LED_W = 4;

  logic clk = 0, rst_n = 0, en = 0;
  logic [WIDTH-1:0] count;
  logic [LED_W-1:0] leds;

  int checks = 0, failures = 0, wraps = 0;

  binary_counter #(.WIDTH(WIDTH), .LED_W(LED_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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
    logic [WIDTH-1:0] exp = '0;
    repeat (2) @(negedge clk);
    check(count == 0, "count after reset");
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      @(negedge clk);
      if (en) begin
        if (exp == '1) wraps++;
        exp = exp + 1'b1;
      end
      en = 0;
      check(count == exp, $sformatf("count %0d exp %0d", count, exp));
      check(leds == exp[WIDTH-1 -: LED_W], "leds");
    end
    check(wraps > 0, "wrap-around reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
