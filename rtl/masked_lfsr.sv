// Masked LFSR, 64 bits.
//
// A Fibonacci LFSR whose state is never stored in the clear: the register
// holds m = s ^ MASK, the true state s XORed with a constant Boolean mask.
// The feedback XOR tree works on the masked bits and corrects for the mask,
// fb = ^(m & TAPS) ^ ^(MASK & TAPS), and the shifted word is re-masked before
// it is written back, so the register and the output only ever carry masked
// values. The underlying sequence is that of the Fibonacci LFSR with the same
// taps (maximal for the defaults); the output is that sequence XOR MASK.
//
// Interface: initial_seed is the true starting state; while reset is high or
// start is low the register loads initial_seed ^ MASK. While start is high
// and reset low it steps once per rising edge. lfsr_output is the masked
// register, one word per cycle.
//
// Following the reference design: 64 bits, the seed/start/clk/reset
// ports, the per-bit seed-or-shift multiplexer, the shift direction, a 4-input
// feedback XOR, masking inside the feedback path and masked outputs. The mask
// value, the tap positions and the synchronous reset are this design's
// choices; a fixed mask hides the state from the output word but is not a
// side-channel countermeasure on its own, for which the mask would have to be
// refreshed from a random source.
module masked_lfsr
  import lfsr_pkg::*;
#(
  parameter int unsigned      WIDTH = LFSR_W,
  parameter logic [WIDTH-1:0] TAPS  = FIB_TAPS[WIDTH-1:0],
  parameter logic [WIDTH-1:0] MASK  = MASK_DEFAULT[WIDTH-1:0]
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             start,
  input  logic [WIDTH-1:0] initial_seed,
  output logic [WIDTH-1:0] lfsr_output
);

  localparam logic MASK_PARITY = ^(MASK & TAPS);

  logic [WIDTH-1:0] masked_q;
  logic [WIDTH-1:0] unmasked_shift;
  logic             fb;
  lfsr_op_e         op;

  assign op = decode_op(reset, start);
  assign fb = (^(masked_q & TAPS)) ^ MASK_PARITY;

  // Shift of the unmasked state, expressed on masked bits: the mask is taken
  // off the shifted bits, the feedback bit is already unmasked.
  assign unmasked_shift = {fb, masked_q[WIDTH-1:1] ^ MASK[WIDTH-1:1]};

  always_ff @(posedge clk) begin
    if (op == OP_LOAD) masked_q <= initial_seed ^ MASK;
    else               masked_q <= unmasked_shift ^ MASK;
  end

  assign lfsr_output = masked_q;

  a_load : assert property (@(posedge clk)
    op == OP_LOAD |=> masked_q == ($past(initial_seed) ^ MASK));
  // The true state never steps from nonzero into the all-zero lock-up state.
  a_nonzero : assert property (@(posedge clk)
    (op == OP_STEP && masked_q != MASK) |=> masked_q != MASK);

endmodule
