// Self-checking testbench for mux_full_adder: all eight input combinations,
// compared with the integer sum a + b + c. It also counts both cases of the
// internal select (b == c, where sum = a and carry = b, and b != c, where
// sum = ~a and carry = a) and fails if either never occurs.
module tb_mux_full_adder;

  logic a, b, c, sum, carry;
  int   checks   = 0;
  int   failures = 0;
  int   n_equal  = 0;
  int   n_differ = 0;

  mux_full_adder dut (.a(a), .b(b), .c(c), .sum(sum), .carry(carry));

  initial begin : watchdog
    #10us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int expected;
      {a, b, c} = 3'(v);
      expected = int'(a) + int'(b) + int'(c);
      if (b == c) n_equal++;
      else        n_differ++;
      #1;
      checks++;
      if ({carry, sum} !== 2'(expected)) begin
        failures++;
        $display("FAIL a=%0b b=%0b c=%0b -> carry=%0b sum=%0b, expected %0d",
                 a, b, c, carry, sum, expected);
      end
    end
    checks++;
    if (n_equal == 0 || n_differ == 0) begin
      failures++;
      $display("FAIL select cases not both exercised: equal=%0d differ=%0d",
               n_equal, n_differ);
    end
    $display("select b==c: %0d cases, b!=c: %0d cases", n_equal, n_differ);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
