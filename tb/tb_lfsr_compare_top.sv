// End-to-end testbench for lfsr_compare_top, at the top's default parameters.
//
// Drives the shared clock, reset, start and seed of the five generators and
// checks every output word of every generator, and the Galois serial bit,
// against reference models kept in the testbench. A run goes through several
// seeds; for each it loads the seed with start low, runs with start high,
// reloads it with reset in the middle of a run, pauses with start low and
// restarts.
//
// Each mechanism of the design is counted and must occur at least once:
// seed loads by start low, seed reloads by reset, steps, the Galois serial
// bit carrying a one, the non-linear AND terms of the NLFSR evaluating to one,
// the modular unit's carry case (both operands one), and the masked output
// differing from the unmasked sequence. The first new word must appear one
// clock after start rises (checked on the first step of every run).
module tb_lfsr_compare_top;

  localparam logic [63:0] MASK  = 64'hA5C3_5A3C_96E1_69F0;
  localparam int          STEPS = 4000;

  logic        clk = 1'b0;
  logic        reset, start;
  logic [63:0] seed;
  logic [63:0] fib_o, gal_o, nl_o, mod_o, msk_o;
  logic        gal_ser;

  lfsr_compare_top dut (
    .clk, .reset, .start, .initial_seed(seed),
    .fib_output(fib_o), .galois_output(gal_o), .galois_serial(gal_ser),
    .nlfsr_output(nl_o), .modular_output(mod_o), .masked_output(msk_o)
  );

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  int unsigned n_load = 0, n_reset = 0, n_step = 0, n_serial_one = 0;
  int unsigned n_and_one = 0, n_mod_carry = 0, n_masked_diff = 0;

  // Reference state of each generator (true, unmasked states).
  logic [63:0] r_fib, r_gal, r_nl, r_mod, r_msk;
  logic        r_ser;

  function automatic logic [63:0] fib_step(input logic [63:0] s);
    logic [63:0] n;
    for (int i = 0; i < 63; i++) n[i] = s[i+1];
    n[63] = s[0] ^ s[1] ^ s[3] ^ s[4];
    return n;
  endfunction

  function automatic logic [63:0] gal_step(input logic [63:0] s);
    logic [63:0] n;
    for (int i = 0; i < 63; i++) n[i] = s[i+1];
    n[63] = s[0];
    n[62] ^= s[0];
    n[60] ^= s[0];
    n[59] ^= s[0];
    return n;
  endfunction

  function automatic logic [63:0] nl_step(input logic [63:0] s);
    logic [63:0] n;
    for (int i = 0; i < 63; i++) n[i] = s[i+1];
    n[63] = s[0] ^ (s[2] & s[7]) ^ (s[13] & s[41]);
    return n;
  endfunction

  function automatic logic [63:0] mod_step(input logic [63:0] s);
    logic [63:0] n;
    logic        f;
    f = 1'((int'(s[63]) + int'(s[62])) % 2);
    for (int i = 1; i < 64; i++) n[i] = s[i-1];
    n[0] = f;
    n[16] ^= f;
    n[59] ^= f;
    return n;
  endfunction

  task automatic check_word(input logic [63:0] got, input logic [63:0] want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %h want %h", what, got, want);
    end
  endtask

  task automatic check_all(input string what, input logic check_serial);
    check_word(fib_o, r_fib, {what, " fibonacci"});
    check_word(gal_o, r_gal, {what, " galois"});
    check_word(nl_o,  r_nl,  {what, " nlfsr"});
    check_word(mod_o, r_mod, {what, " modular"});
    check_word(msk_o, r_msk ^ MASK, {what, " masked"});
    if (check_serial) begin
      checks++;
      if (gal_ser !== r_ser) begin
        failures++;
        $display("FAIL %s galois serial: got %b want %b", what, gal_ser, r_ser);
      end
    end
  endtask

  task automatic load_models(input logic [63:0] s);
    r_fib = s; r_gal = s; r_nl = s; r_mod = s; r_msk = s; r_ser = 1'b0;
  endtask

  task automatic step_models();
    if (r_nl[2] & r_nl[7] || r_nl[13] & r_nl[41]) n_and_one++;
    if (r_mod[63] & r_mod[62]) n_mod_carry++;
    r_ser = r_gal[0];
    r_fib = fib_step(r_fib);
    r_gal = gal_step(r_gal);
    r_nl  = nl_step(r_nl);
    r_mod = mod_step(r_mod);
    r_msk = fib_step(r_msk);
    n_step++;
  endtask

  task automatic cycle();
    @(posedge clk); #1;
  endtask

  task automatic run(input int steps);
    for (int i = 0; i < steps; i++) begin
      cycle();
      step_models();
      check_all($sformatf("step %0d", i + 1), 1'b1);
      if (r_ser) n_serial_one++;
      if (msk_o != r_msk) n_masked_diff++;
    end
  endtask

  task automatic require(input int unsigned count, input string what);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else begin
      $display("  %-28s %0d", what, count);
    end
  endtask

  initial begin : watchdog
    repeat (40 * STEPS) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] seeds [3];
    seeds[0] = 64'h0123_4567_89AB_CDEF;
    seeds[1] = 64'h0000_0000_0000_0001;
    seeds[2] = {$urandom, $urandom} | 64'h1;
    reset = 1'b1; start = 1'b0; seed = seeds[0];
    cycle();
    load_models(seed);
    n_reset++;
    check_all("power-up reset", 1'b1);
    foreach (seeds[k]) begin
      // Start low loads the seed.
      reset = 1'b0; start = 1'b0; seed = seeds[k];
      cycle();
      load_models(seed);
      n_load++;
      check_all("seed load", 1'b1);
      // Run: the first new word appears one clock after start rises.
      start = 1'b1;
      run(STEPS / 2);
      // Reset in the middle of a run reloads the seed.
      reset = 1'b1;
      cycle();
      load_models(seed);
      n_reset++;
      check_all("reset reload", 1'b1);
      reset = 1'b0;
      run(STEPS / 2);
      // Pause: start low reloads the seed again, then a short restart.
      start = 1'b0;
      cycle();
      load_models(seed);
      n_load++;
      check_all("stop", 1'b1);
      start = 1'b1;
      run(16);
      start = 1'b0;
    end
    $display("mechanisms exercised:");
    require(n_load, "seed load (start low)");
    require(n_reset, "seed reload (reset)");
    require(n_step, "generator steps");
    require(n_serial_one, "galois serial bit one");
    require(n_and_one, "nlfsr AND term one");
    require(n_mod_carry, "modular unit carry case");
    require(n_masked_diff, "masked word differs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
