// Sequence-length workload: the linear generators reach maximal period.
//
// A 64-bit maximal sequence (2^64 - 1 states) cannot be simulated, so the
// four linear generators are instantiated here at 8 bits with primitive
// feedback (the register length and taps are parameters of every generator):
//   fibonacci_lfsr  TAPS = 8'h1D            (x^8 + x^6 + x^5 + x^4 + 1)
//   galois_lfsr     TAPS = 8'h0E
//   modular_lfsr    MOD_A = 7, MOD_B = 6, TAPS = 8'h0A
//   masked_lfsr     TAPS = 8'h1D, MASK = 8'h5A
// Each is loaded with seed 1 and run until its output word returns to the
// value after the load. The period must be 255, and every one of the 255
// nonzero words (for the masked generator: every word except the mask) must
// occur exactly once per period.
module tb_period_workload;

  localparam int W = 8;
  localparam int N = 4;

  logic             clk;
  logic             reset, start;
  logic [W-1:0]     seed;
  logic [W-1:0]     q [N];
  logic             gal_serial;
  int unsigned      checks = 0, failures = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  fibonacci_lfsr #(.WIDTH(W), .TAPS(8'h1D)) u_fib (
    .clk, .reset, .start, .initial_seed(seed), .lfsr_output(q[0]));
  galois_lfsr #(.WIDTH(W), .TAPS(8'h0E)) u_gal (
    .clk, .reset, .start, .initial_seed(seed), .lfsr_output(q[1]), .fb_out(gal_serial));
  modular_lfsr #(.WIDTH(W), .MOD_A(7), .MOD_B(6), .TAPS(8'h0A)) u_mod (
    .clk, .reset, .start, .initial_seed(seed), .lfsr_output(q[2]));
  masked_lfsr #(.WIDTH(W), .TAPS(8'h1D), .MASK(8'h5A)) u_msk (
    .clk, .reset, .start, .initial_seed(seed), .lfsr_output(q[3]));

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string       name [N] = '{"fibonacci", "galois", "modular", "masked"};
    logic [W-1:0] first [N];
    int          period [N];
    int          seen [N][256];
    logic [W-1:0] forbidden [N];

    forbidden = '{8'h00, 8'h00, 8'h00, 8'h5A};
    for (int g = 0; g < N; g++) begin
      period[g] = 0;
      for (int v = 0; v < 256; v++) seen[g][v] = 0;
    end

    reset = 1'b1; start = 1'b0; seed = 8'h01;
    @(posedge clk); #1;
    reset = 1'b0;
    for (int g = 0; g < N; g++) first[g] = q[g];
    start = 1'b1;
    for (int step = 1; step <= 300; step++) begin
      @(posedge clk); #1;
      for (int g = 0; g < N; g++) begin
        if (period[g] == 0) begin
          seen[g][q[g]]++;
          if (q[g] == first[g]) period[g] = step;
        end
      end
    end

    for (int g = 0; g < N; g++) begin
      int missing;
      missing = 0;
      checks++;
      if (period[g] != 255) begin
        failures++;
        $display("FAIL %s period %0d, expected 255", name[g], period[g]);
      end
      for (int v = 0; v < 256; v++)
        if (v != int'(forbidden[g]) && seen[g][v] != 1) missing++;
      checks++;
      if (missing != 0) begin
        failures++;
        $display("FAIL %s: %0d words not seen exactly once", name[g], missing);
      end
      $display("  %-10s period %0d", name[g], period[g]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
