// Self-checking testbench for masked_lfsr.
//
// Checks the masked LFSR: the output is the Fibonacci sequence (taps 0, 1, 3, 4) XOR the mask A5C35A3C96E169F0.
// The reference model below is written bit by bit from the generator's
// definition and does not reuse the RTL's vector expressions. The test loads
// seeds (reset and start low), steps the generator, checks every word against
// the model, checks that the first new word appears one clock after start
// rises, that start low reloads the seed, and that reset reloads it mid-run.
module tb_masked_lfsr;

  logic        clk = 1'b0;
  logic        reset, start;
  logic [63:0] seed, dut_out;

  int unsigned checks = 0, failures = 0;
  logic [63:0] model;

  masked_lfsr dut (
    .clk, .reset, .start, .initial_seed(seed), .lfsr_output(dut_out)
  );

  always #5 clk = ~clk;

  // One step of the reference generator on the true state.
  function automatic logic [63:0] ref_step(input logic [63:0] s);
    logic [63:0] n;
    n = s >> 1;
    n[63] = s[0] ^ s[1] ^ s[3] ^ s[4];
    return n;
  endfunction

  task automatic expect_out(input logic [63:0] want, input string what);
    checks++;
    if (dut_out !== want) begin
      failures++;
      $display("FAIL %s: got %h want %h", what, dut_out, want);
    end
  endtask

  // Drive on the falling edge, sample after the rising edge.
  task automatic cycle();
    @(posedge clk); #1;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] seeds [4];
    seeds[0] = 64'h0000_0000_0000_0001;
    seeds[1] = 64'hDEAD_BEEF_CAFE_F00D;
    seeds[2] = 64'h8000_0000_0000_0000;
    seeds[3] = {$urandom, $urandom} | 64'h1;
    reset = 1'b1; start = 1'b0; seed = seeds[0];
    repeat (2) cycle();
    foreach (seeds[k]) begin
      // Load phase: reset low, start low still loads the seed.
      reset = 1'b0; start = 1'b0; seed = seeds[k];
      cycle();
      model = seeds[k];
      expect_out((model ^ 64'hA5C3_5A3C_96E1_69F0), "seed load");
      cycle();
      expect_out((model ^ 64'hA5C3_5A3C_96E1_69F0), "start low holds seed");
      // Run phase: one new word per clock from the first edge with start high.
      start = 1'b1;
      for (int i = 0; i < 1000; i++) begin
        cycle();
        model = ref_step(model);
        expect_out((model ^ 64'hA5C3_5A3C_96E1_69F0), $sformatf("step %0d", i + 1));

      end
      // Reset while running reloads the seed at once.
      reset = 1'b1;
      cycle();
      model = seeds[k];
      expect_out((model ^ 64'hA5C3_5A3C_96E1_69F0), "reset reload");
      reset = 1'b0;
      cycle();
      model = ref_step(model);
      expect_out((model ^ 64'hA5C3_5A3C_96E1_69F0), "step after reset");
      start = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
