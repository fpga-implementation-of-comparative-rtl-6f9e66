// Fibonacci LFSR, 64 bits.
//
// The register shifts one place toward bit 0 on every enabled clock. The bit
// entering bit 63 is the XOR of the state bits selected by TAPS (an external
// XOR tree on the register, the Fibonacci form), and bit 0 is the serial bit
// that leaves the register. With the default taps (bits 0, 1, 3 and 4, the
// polynomial x^64 + x^63 + x^61 + x^60 + 1) the sequence is maximal: every
// nonzero seed cycles through all 2^64 - 1 nonzero states.
//
// Interface: initial_seed is loaded while reset is high or start is low; while
// start is high (and reset low) the register steps once per rising clock edge.
// lfsr_output is the register itself, so a new word is available every cycle
// with no latency beyond the register. An all-zero seed stays all zero.
//
// The 64-bit length, the seed/start/clk ports, the per-bit seed-or-shift
// multiplexer, the shift direction and the single XOR tree follow the
// reference design; the tap positions and the synchronous reset that reloads
// the seed are this design's choices.
module fibonacci_lfsr
  import lfsr_pkg::*;
#(
  parameter int unsigned         WIDTH = LFSR_W,
  parameter logic [WIDTH-1:0]    TAPS  = FIB_TAPS[WIDTH-1:0]
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             start,
  input  logic [WIDTH-1:0] initial_seed,
  output logic [WIDTH-1:0] lfsr_output
);

  logic [WIDTH-1:0] state_q;
  logic             fb;
  lfsr_op_e         op;

  assign op = decode_op(reset, start);
  assign fb = ^(state_q & TAPS);

  always_ff @(posedge clk) begin
    if (op == OP_LOAD) state_q <= initial_seed;
    else               state_q <= {fb, state_q[WIDTH-1:1]};
  end

  assign lfsr_output = state_q;

  // A load cycle leaves the seed in the register.
  a_load : assert property (@(posedge clk) op == OP_LOAD |=> state_q == $past(initial_seed));
  // A nonzero state never steps into the all-zero lock-up state.
  a_nonzero : assert property (@(posedge clk)
    (op == OP_STEP && state_q != '0) |=> state_q != '0);

endmodule
