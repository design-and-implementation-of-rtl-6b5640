// Self-checking testbench for four_bit_adder: all sixteen input combinations,
// with {c0, s1, s0} compared with the number of inputs that are 1. Fails if
// the carry output c0 (all four inputs 1) is never exercised.
module tb_four_bit_adder;

  logic a, b, c, d, s0, s1, c0;
  int   checks   = 0;
  int   failures = 0;
  int   n_c0     = 0;

  four_bit_adder dut (.a(a), .b(b), .c(c), .d(d), .s0(s0), .s1(s1), .c0(c0));

  initial begin : watchdog
    #10us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int expected;
      {a, b, c, d} = 4'(v);
      expected = $countones(4'(v));
      #1;
      checks++;
      if ({c0, s1, s0} !== 3'(expected)) begin
        failures++;
        $display("FAIL a=%0b b=%0b c=%0b d=%0b -> %0b%0b%0b, expected %0d",
                 a, b, c, d, c0, s1, s0, expected);
      end
      if (c0) n_c0++;
    end
    checks++;
    if (n_c0 == 0) begin
      failures++;
      $display("FAIL carry output c0 never set");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
