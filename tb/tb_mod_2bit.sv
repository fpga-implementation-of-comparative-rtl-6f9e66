// Self-checking testbench for mod_2bit.
//
// Applies all four operand pairs, several times each in random order, and
// compares mod_x with the residue of the integer sum a + b modulo 2 worked out
// in the testbench. The unit is combinational, so each result is sampled one
// time step after the inputs change.
module tb_mod_2bit;

  logic a, b, mod_x;
  int unsigned checks = 0, failures = 0;

  mod_2bit dut (.a, .b, .mod_x);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned sum;
    for (int i = 0; i < 64; i++) begin
      a = (i < 4) ? i[0] : 1'($urandom);
      b = (i < 4) ? i[1] : 1'($urandom);
      #1;
      sum = int'(a) + int'(b);
      checks++;
      if (mod_x !== 1'(sum % 2)) begin
        failures++;
        $display("FAIL a=%0b b=%0b got %0b", a, b, mod_x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
