// bubble_sorter: second test module placed in the Enhanced Reliability
// Region, a hardware bubble sort.
//
// N values of W bits are loaded one per cycle, then sorted in ascending
// order with the bubble sort algorithm: one compare-and-swap of neighbours
// j and j+1 per cycle, passes of decreasing length, and an early stop after
// a pass without a swap. The sorted values can then be read through a
// read-index port. Like the counter, it has no checkpoint port: its state is
// saved and restored through the configuration layer.
//
// Only the algorithm is given by the design; N = 16, W = 8, the load/read
// interface and the early stop are this design's choices.
//
// Interface / timing:
//  * in_valid/in_data: while not busy, each cycle with in_valid high writes
//    in_data to element load_idx and advances load_idx (wraps after N).
//  * start (not busy): begins sorting the N elements; busy is high from the
//    next cycle until the sort ends, then done pulses for one cycle.
//    Sorting takes at most N*(N-1)/2 compare cycles plus one per pass.
//  * rd_idx/rd_data: combinational read of an element.
module bubble_sorter #(
  parameter int unsigned N = 16,
  parameter int unsigned W = 8,
  parameter int unsigned IDX_W = $clog2(N)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [W-1:0]     in_data,
  input  logic             start,
  output logic             busy,
  output logic             done,
  input  logic [IDX_W-1:0] rd_idx,
  output logic [W-1:0]     rd_data,
  output logic [31:0]      n_swaps
);

  logic [W-1:0]     data_q [N];
  logic [IDX_W-1:0] load_idx;
  logic [IDX_W-1:0] j_q;        // compare position
  logic [IDX_W-1:0] last_q;     // last compare position of this pass
  logic             swapped_q;  // a swap happened in this pass
  logic             do_swap;

  assign do_swap = data_q[j_q] > data_q[j_q + 1'b1];
  assign rd_data = data_q[rd_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N); i++) data_q[i] <= '0;
      load_idx  <= '0;
      j_q       <= '0;
      last_q    <= '0;
      swapped_q <= 1'b0;
      busy      <= 1'b0;
      done      <= 1'b0;
      n_swaps   <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (in_valid) begin
          data_q[load_idx] <= in_data;
          load_idx         <= (load_idx == IDX_W'(N - 1)) ? '0 : load_idx + 1'b1;
        end
        if (start) begin
          busy      <= 1'b1;
          j_q       <= '0;
          last_q    <= IDX_W'(N - 2);
          swapped_q <= 1'b0;
          load_idx  <= '0;
        end
      end else begin
        if (do_swap) begin
          data_q[j_q]        <= data_q[j_q + 1'b1];
          data_q[j_q + 1'b1] <= data_q[j_q];
          n_swaps            <= n_swaps + 1'b1;
        end
        if (j_q == last_q) begin
          // end of a pass
          if ((!swapped_q && !do_swap) || last_q == '0) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            last_q <= last_q - 1'b1;
          end
          j_q       <= '0;
          swapped_q <= 1'b0;
        end else begin
          j_q <= j_q + 1'b1;
          if (do_swap) swapped_q <= 1'b1;
        end
      end
    end
  end

endmodule
