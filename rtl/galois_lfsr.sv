// Galois LFSR, 64 bits, with a registered serial output.
//
// The register shifts one place toward bit 0 on every enabled clock. The bit
// leaving bit 0 re-enters at bit 63 and is also XORed, through one two-input
// XOR each, into the next-state bits selected by TAPS (the Galois form: the
// feedback is spread along the register, so no path has more than one XOR).
// The default taps, bits 62, 60 and 59, realise x^64 + x^63 + x^61 + x^60 + 1
// and give a maximal sequence of 2^64 - 1 states.
//
// Besides the parallel word, a one-bit register, fb_out, captures the bit
// shifted out of bit 0 on every step and is cleared while the generator is
// loading. It is the serial output, delayed by one clock with respect to
// lfsr_output[0].
//
// Interface: initial_seed is loaded while reset is high or start is low; the
// register steps once per rising edge while start is high and reset low.
//
// Following the reference design: 64 bits, the seed/start/clk ports,
// the per-bit seed-or-shift multiplexer, the XOR gates in front of bits 62, 60
// and 59, and a feedback flip-flop with clock enable and clear. That flip-flop's
// exact wiring (enable on start, clear while loading) and the synchronous reset
// are this design's choices.
module galois_lfsr
  import lfsr_pkg::*;
#(
  parameter int unsigned         WIDTH = LFSR_W,
  parameter logic [WIDTH-1:0]    TAPS  = GAL_TAPS[WIDTH-1:0]
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             start,
  input  logic [WIDTH-1:0] initial_seed,
  output logic [WIDTH-1:0] lfsr_output,
  output logic             fb_out
);

  logic [WIDTH-1:0] state_q;
  logic [WIDTH-1:0] state_d;
  logic             fb;
  lfsr_op_e         op;

  assign op = decode_op(reset, start);
  assign fb = state_q[0];

  always_comb begin
    state_d = {fb, state_q[WIDTH-1:1]};
    state_d = state_d ^ (TAPS & {WIDTH{fb}});
  end

  always_ff @(posedge clk) begin
    if (op == OP_LOAD) begin
      state_q <= initial_seed;
      fb_out  <= 1'b0;
    end else begin
      state_q <= state_d;
      fb_out  <= fb;
    end
  end

  assign lfsr_output = state_q;

  a_load : assert property (@(posedge clk) op == OP_LOAD |=> state_q == $past(initial_seed));
  a_nonzero : assert property (@(posedge clk)
    (op == OP_STEP && state_q != '0) |=> state_q != '0);
  a_serial : assert property (@(posedge clk) op == OP_STEP |=> fb_out == $past(state_q[0]));

endmodule
