// Modular LFSR, 64 bits.
//
// The register shifts one place toward bit 63 on every enabled clock. A
// separate modular arithmetic unit (mod_2bit) forms the feedback bit
// f = (s[63] + s[62]) mod 2 from the two top stages; f enters bit 0 and is
// XORed into each next-state bit selected by TAPS (default bits 16 and 59),
// a Galois-style distributed feedback driven by the modular unit. Because the
// feedback function lives in its own unit, it can be replaced without touching
// the shift register. The default configuration has a primitive minimal
// polynomial and gives a maximal sequence of 2^64 - 1 states.
//
// Interface: initial_seed is loaded while reset is high or start is low; the
// register steps once per rising edge while start is high and reset low.
//
// Following the reference design: 64 bits, the seed/start/clk/reset
// ports, the seed-or-shift multiplexer per bit, the shift toward bit 63, a
// 2-bit modular unit with inputs a and b, and an XOR gate in front of bit 59.
// The unit's operands (bits 63 and 62), the second XOR at bit 16 and the
// synchronous reset are this design's choices, made so that the sequence is
// maximal.
module modular_lfsr
  import lfsr_pkg::*;
#(
  parameter int unsigned      WIDTH  = LFSR_W,
  parameter int unsigned      MOD_A  = WIDTH - 1,
  parameter int unsigned      MOD_B  = WIDTH - 2,
  parameter logic [WIDTH-1:0] TAPS   = 64'h0800_0000_0001_0000
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             start,
  input  logic [WIDTH-1:0] initial_seed,
  output logic [WIDTH-1:0] lfsr_output
);

  logic [WIDTH-1:0] state_q;
  logic [WIDTH-1:0] state_d;
  logic             fb;
  lfsr_op_e         op;

  assign op = decode_op(reset, start);

  mod_2bit u_mod (
    .a     (state_q[MOD_A]),
    .b     (state_q[MOD_B]),
    .mod_x (fb)
  );

  always_comb begin
    state_d = {state_q[WIDTH-2:0], fb};
    state_d = state_d ^ (TAPS & {WIDTH{fb}});
  end

  always_ff @(posedge clk) begin
    if (op == OP_LOAD) state_q <= initial_seed;
    else               state_q <= state_d;
  end

  assign lfsr_output = state_q;

  a_load : assert property (@(posedge clk) op == OP_LOAD |=> state_q == $past(initial_seed));
  a_nonzero : assert property (@(posedge clk)
    (op == OP_STEP && state_q != '0) |=> state_q != '0);

endmodule
