// binary_counter: first test module placed in the Enhanced Reliability
// Region. A free-running binary counter whose upper bits drive GPIO LEDs, so
// that a rollback is visible on the board.
//
// The module is deliberately plain: the reliability method is non-intrusive,
// so the counter has no checkpoint or restore port; its state is saved and
// restored through the configuration layer by the reliability controller.
// The width of 36 bits is taken from the 36 flip-flops the design reports
// for this module; the enable input and the LED width of 8 are this design's
// choices.
//
// Timing: count increments by one on every clock edge with en high;
// leds shows count[WIDTH-1 -: LED_W] of the same cycle.
module binary_counter #(
  parameter int unsigned WIDTH = 36,
  parameter int unsigned LED_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [WIDTH-1:0] count,
  output logic [LED_W-1:0] leds
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  count <= '0;
    else if (en) count <= count + 1'b1;
  end

  assign leds = count[WIDTH-1 -: LED_W];

endmodule
