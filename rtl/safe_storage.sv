// safe_storage: on-chip word memory standing for the fault-free "safe
// storage" of the design, where the initial bitstream, the flip-flop masks
// and the checkpoints are kept.
//
// In the reference platform this storage is an external Compact Flash card
// reached through a SystemACE controller; here it is a plain two-port RAM
// (this design's choice), assumed not to be exposed to upsets. Port A serves
// the reliability controller, port B a host that loads the initial bitstream
// and can read out saved checkpoints.
//
// Interface / timing: both ports are synchronous. A write (we high) stores
// wdata at addr at the clock edge. The read data of a port is the word at the
// address presented in the previous cycle (one-cycle latency; read-before-
// write when the same port writes). Writes of both ports to the same address
// in the same cycle are not allowed (port B then wins).
module safe_storage
  import ber_pkg::*;
#(
  parameter int unsigned DEPTH  = 4096,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              a_we,
  input  logic [ADDR_W-1:0] a_addr,
  input  word_t             a_wdata,
  output word_t             a_rdata,
  input  logic              b_we,
  input  logic [ADDR_W-1:0] b_addr,
  input  word_t             b_wdata,
  output word_t             b_rdata
);

  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    if (b_we) mem[b_addr] <= b_wdata;
    a_rdata <= mem[a_addr];
    b_rdata <= mem[b_addr];
  end

endmodule
