// Self-checking testbench for half_adder: all four input pairs, with the
// expected two-bit result taken from an integer addition.
module tb_half_adder;

  logic a, b, sum, carry;
  int   checks   = 0;
  int   failures = 0;

  half_adder dut (.a(a), .b(b), .sum(sum), .carry(carry));

  initial begin : watchdog
    #10us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      int expected;
      {a, b} = 2'(v);
      expected = int'(a) + int'(b);
      #1;
      checks++;
      if ({carry, sum} !== 2'(expected)) begin
        failures++;
        $display("FAIL a=%0b b=%0b -> carry=%0b sum=%0b, expected %0d",
                 a, b, carry, sum, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
