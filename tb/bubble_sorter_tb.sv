// bubble_sorter_tb: self-checking test of the ERR bubble sorter.
//
// Random, already sorted, reverse-sorted and constant blocks are loaded and
// sorted; the result is compared with a reference sort, the number of swaps
// with the number of inversions of the input, and the sort time with the
// bubble-sort bound N*(N-1)/2 compares plus one cycle per pass.
module bubble_sorter_tb;
  localparam int unsigned N = 16;
  localparam int unsigned W = 8;
  localparam int unsigned IDX_W = $clog2(N);

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, start = 0;
  logic [W-1:0] in_data = '0;
  logic busy, done;
  logic [IDX_W-1:0] rd_idx = '0;
  logic [W-1:0] rd_data;
  logic [31:0] n_swaps;

  int checks = 0, failures = 0;

  bubble_sorter #(.N(N), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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
    int v [N];
    int s [N];
    int inv, cyc, sw0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      for (int i = 0; i < N; i++) begin
        case (t % 4)
          0, 1: v[i] = $urandom_range(0, 255);
          2:    v[i] = i * 7;
          3:    v[i] = 255 - i * 9;
        endcase
        if (t == 5) v[i] = 42;
      end
      inv = 0;
      for (int i = 0; i < N; i++) for (int j = i + 1; j < N; j++) if (v[i] > v[j]) inv++;
      s = v;
      s.sort();
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        in_valid = 1; in_data = W'(v[i]);
      end
      @(negedge clk);
      in_valid = 0;
      sw0 = n_swaps;
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 0;
      while (!done) begin
        check(busy, "busy while sorting");
        @(negedge clk);
        cyc++;
      end
      check(cyc <= N * (N - 1) / 2 + N, $sformatf("sort took %0d cycles", cyc));
      check(int'(n_swaps) - sw0 == inv, $sformatf("swaps %0d exp %0d", int'(n_swaps) - sw0, inv));
      for (int i = 0; i < N; i++) begin
        rd_idx = IDX_W'(i);
        #1;
        check(int'(rd_data) == s[i], $sformatf("t=%0d element %0d = %0d exp %0d", t, i, rd_data, s[i]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
