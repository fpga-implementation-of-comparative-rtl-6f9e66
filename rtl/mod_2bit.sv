// Modular feedback unit of the modular LFSR.
//
// Adds two one-bit operands as integers and returns the sum modulo 2: the
// two-bit sum a + b is formed and its low bit is the residue mod_x. Over GF(2)
// this is the feedback combination of two register stages. Purely
// combinational, no latency.
//
// The unit's name, its two inputs a and b and its single output follow the
// reference design, which does not spell out its arithmetic; the
// modulus 2 is this design's choice.
module mod_2bit (
  input  logic a,
  input  logic b,
  output logic mod_x
);

  logic [1:0] sum;

  assign sum   = {1'b0, a} + {1'b0, b};
  assign mod_x = (sum % 2'd2) == 2'd1;

endmodule
