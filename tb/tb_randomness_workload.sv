// Randomness workload for lfsr_compare_top: statistical tests on the bit
// streams of all five generators, at the top's default parameters.
//
// After loading a fixed seed, the top runs for N_BITS clocks and bit 0 of each
// generator's output word is collected as its serial stream. Each stream then
// goes through tests from the NIST SP 800-22 family, computed here in
// SystemVerilog:
//   - frequency (monobit): |#ones - #zeros| / sqrt(n)            < Z_NORMAL
//   - runs: |V - 2n pi(1-pi)| / (2 sqrt(2n) pi(1-pi))            < Z_RUNS,
//     after the frequency prerequisite |pi - 1/2| < 2/sqrt(n)
//   - autocorrelation at shifts 1, 2 and 8:
//     |2 A(d) - (n-d)| / sqrt(n-d)                               < Z_NORMAL,
//     A(d) being the number of positions where x(i) != x(i+d)
//   - linear complexity of the first N_LC bits (Berlekamp-Massey): exactly
//     64 for the four linear generators, above 64 for the NLFSR.
// The thresholds correspond to a significance level of 0.001 (two-sided normal
// quantile 3.2905; erfc(x) = 0.001 at x = 2.3268). Seeds are fixed, so the
// outcome is reproducible.
module tb_randomness_workload;

  localparam int          N_BITS   = 100000;
  localparam int          N_LC     = 512;
  localparam real         Z_NORMAL = 3.2905;
  localparam real         Z_RUNS   = 2.3268;
  localparam int          N_GEN    = 5;
  localparam int          SHIFTS [3] = '{1, 2, 8};

  logic        clk;
  logic        reset, start;
  logic [63:0] seed;
  logic [63:0] fib_o, gal_o, nl_o, mod_o, msk_o;
  logic        gal_ser;

  lfsr_compare_top dut (
    .clk, .reset, .start, .initial_seed(seed),
    .fib_output(fib_o), .galois_output(gal_o), .galois_serial(gal_ser),
    .nlfsr_output(nl_o), .modular_output(mod_o), .masked_output(msk_o)
  );

  initial clk = 1'b0;
  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  bit          stream [N_GEN][N_BITS];
  string       gen_name [N_GEN] = '{"fibonacci", "galois", "nlfsr", "modular", "masked"};

  task automatic verdict(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Linear complexity of the first n bits of stream g (Berlekamp-Massey).
  function automatic int linear_complexity(input int g, input int n);
    bit c [N_LC+1];
    bit b [N_LC+1];
    bit t [N_LC+1];
    int L = 0, m = -1;
    for (int j = 0; j <= N_LC; j++) begin c[j] = 0; b[j] = 0; end
    c[0] = 1; b[0] = 1;
    for (int i = 0; i < n; i++) begin
      bit d = stream[g][i];
      for (int j = 1; j <= L; j++) d ^= c[j] & stream[g][i-j];
      if (d) begin
        t = c;
        for (int j = 0; j + i - m <= N_LC; j++) if (b[j]) c[j+i-m] ^= 1'b1;
        if (2 * L <= i) begin
          L = i + 1 - L;
          m = i;
          b = t;
        end
      end
    end
    return L;
  endfunction

  initial begin : watchdog
    repeat (N_BITS + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; start = 1'b0; seed = 64'h5EED_0FC0_FFEE_4217;
    @(posedge clk); #1;
    reset = 1'b0; start = 1'b1;
    for (int i = 0; i < N_BITS; i++) begin
      @(posedge clk); #1;
      stream[0][i] = fib_o[0];
      stream[1][i] = gal_o[0];
      stream[2][i] = nl_o[0];
      stream[3][i] = mod_o[0];
      stream[4][i] = msk_o[0];
    end
    start = 1'b0;

    for (int g = 0; g < N_GEN; g++) begin
      int  ones, runs, lc;
      real n, pi, s_obs, z;
      ones = 0;
      runs = 1;
      n    = real'(N_BITS);
      for (int i = 0; i < N_BITS; i++) begin
        ones += int'(stream[g][i]);
        if (i > 0 && stream[g][i] != stream[g][i-1]) runs++;
      end
      // Frequency (monobit).
      s_obs = ((2.0 * ones - n) < 0 ? -(2.0 * ones - n) : (2.0 * ones - n)) / $sqrt(n);
      verdict(s_obs < Z_NORMAL, $sformatf("%s monobit statistic %f", gen_name[g], s_obs));
      // Runs, with its frequency prerequisite.
      pi = ones / n;
      verdict((pi - 0.5 < 0 ? 0.5 - pi : pi - 0.5) < 2.0 / $sqrt(n),
              $sformatf("%s runs prerequisite pi=%f", gen_name[g], pi));
      z = (runs - 2.0 * n * pi * (1.0 - pi));
      z = (z < 0 ? -z : z) / (2.0 * $sqrt(2.0 * n) * pi * (1.0 - pi));
      verdict(z < Z_RUNS, $sformatf("%s runs statistic %f", gen_name[g], z));
      // Autocorrelation at a few shifts.
      foreach (SHIFTS[k]) begin
        int d, a;
        d = SHIFTS[k];
        a = 0;
        for (int i = 0; i + d < N_BITS; i++) a += int'(stream[g][i] != stream[g][i+d]);
        z = 2.0 * a - (n - d);
        z = (z < 0 ? -z : z) / $sqrt(n - d);
        verdict(z < Z_NORMAL, $sformatf("%s autocorrelation d=%0d statistic %f", gen_name[g], d, z));
      end
      // Linear complexity.
      lc = linear_complexity(g, N_LC);
      if (g == 2) verdict(lc > 64, $sformatf("%s linear complexity %0d not above 64", gen_name[g], lc));
      else        verdict(lc == 64, $sformatf("%s linear complexity %0d, expected 64", gen_name[g], lc));
      $display("  %-10s ones=%0d runs=%0d monobit=%f linear_complexity=%0d",
               gen_name[g], ones, runs, s_obs, lc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
