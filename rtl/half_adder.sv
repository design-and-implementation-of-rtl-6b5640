// Half adder: adds two bits. sum = a xor b, carry = a and b.
// Used for the two-bit columns of the multiplier and, twice, inside the
// four-input adder. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);

  always_comb begin
    sum   = a ^ b;
    carry = a & b;
  end

endmodule
