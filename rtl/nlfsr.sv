// Non-linear feedback shift register (NLFSR), 64 bits.
//
// The register shifts one place toward bit 0 on every enabled clock, like the
// Fibonacci LFSR, but the bit entering bit 63 is a non-linear function of the
// state: the XOR of one state bit and of two AND products of state-bit pairs,
//
//   fb = s[LIN_TAP] ^ (s[X1_A] & s[X1_B]) ^ (s[X2_A] & s[X2_B]).
//
// The AND terms make the next state a non-linear function of the present one,
// so the sequence cannot be reproduced by a short linear recurrence. Its period
// depends on the seed and is not guaranteed to be maximal; the all-zero state
// is a fixed point.
//
// Interface: initial_seed is loaded while reset is high or start is low; the
// register steps once per rising edge while start is high and reset low.
//
// Following the reference design: 64 bits, the seed/start/clk ports,
// the seed-or-shift multiplexer per bit, the shift direction and a feedback
// built from two 2-input AND gates and a 3-input XOR. Which state bits feed
// those gates (the parameters below) and the synchronous reset are this
// design's choices.
module nlfsr
  import lfsr_pkg::*;
#(
  parameter int unsigned WIDTH   = LFSR_W,
  parameter int unsigned LIN_TAP = 0,
  parameter int unsigned X1_A    = 2,
  parameter int unsigned X1_B    = 7,
  parameter int unsigned X2_A    = 13,
  parameter int unsigned X2_B    = 41
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             start,
  input  logic [WIDTH-1:0] initial_seed,
  output logic [WIDTH-1:0] lfsr_output
);

  logic [WIDTH-1:0] state_q;
  logic             x1, x2, fb;
  lfsr_op_e         op;

  assign op = decode_op(reset, start);
  assign x1 = state_q[X1_A] & state_q[X1_B];
  assign x2 = state_q[X2_A] & state_q[X2_B];
  assign fb = ^{x2, x1, state_q[LIN_TAP]};

  always_ff @(posedge clk) begin
    if (op == OP_LOAD) state_q <= initial_seed;
    else               state_q <= {fb, state_q[WIDTH-1:1]};
  end

  assign lfsr_output = state_q;

  a_load : assert property (@(posedge clk) op == OP_LOAD |=> state_q == $past(initial_seed));

endmodule
