// Comparison platform for five 64-bit shift-register generators.
//
// Fibonacci, Galois, non-linear (NLFSR), modular and masked generators run
// side by side from one clock, one reset, one start and one seed, so their
// sequences and their hardware cost can be compared on the same device. Each
// generator's 64-bit word is brought out on its own port, and the Galois
// generator's registered serial bit as well.
//
// Timing: while reset is high or start is low, every generator loads the seed
// (the masked one stores it XORed with its mask); from the first rising edge
// with start high and reset low, every generator produces one new word per
// clock. All outputs come straight from the generators' registers.
//
// Sharing the control and seed ports among the five generators is this
// design's choice; the generators themselves and their common interface
// follow the reference design.
module lfsr_compare_top
  import lfsr_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic       start,
  input  lfsr_word_t initial_seed,
  output lfsr_word_t fib_output,
  output lfsr_word_t galois_output,
  output logic       galois_serial,
  output lfsr_word_t nlfsr_output,
  output lfsr_word_t modular_output,
  output lfsr_word_t masked_output
);

  fibonacci_lfsr u_fib (
    .clk, .reset, .start, .initial_seed,
    .lfsr_output (fib_output)
  );

  galois_lfsr u_galois (
    .clk, .reset, .start, .initial_seed,
    .lfsr_output (galois_output),
    .fb_out      (galois_serial)
  );

  nlfsr u_nlfsr (
    .clk, .reset, .start, .initial_seed,
    .lfsr_output (nlfsr_output)
  );

  modular_lfsr u_modular (
    .clk, .reset, .start, .initial_seed,
    .lfsr_output (modular_output)
  );

  masked_lfsr u_masked (
    .clk, .reset, .start, .initial_seed,
    .lfsr_output (masked_output)
  );

endmodule
