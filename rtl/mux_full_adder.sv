// Full adder built from one XOR gate and two 2:1 multiplexers.
//
// sel = b xor c drives the select input of both multiplexers:
//   sum mux   : chooses a  when sel = 0, ~a when sel = 1  -> sum = a ^ b ^ c
//   carry mux : chooses b  when sel = 0,  a when sel = 1  -> carry = maj(a,b,c)
// When b and c are equal, the carry is simply their common value (b); when
// they differ, one of them is 1 and the carry is decided by a. The structure
// (one XOR, two muxes, a and ~a on the sum mux, b and a on the carry mux)
// follows the published circuit; which data input sits on which select value
// is derived from the truth table, as the drawing does not label it.
// Ports: three 1-bit addends a, b, c; outputs sum and carry. Combinational.
module mux_full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);

  logic sel;
  logic a_n;

  always_comb begin
    sel = b ^ c;
    a_n = ~a;
  end

  mux2 u_sum_mux (
    .d0 (a),
    .d1 (a_n),
    .sel(sel),
    .y  (sum)
  );

  mux2 u_carry_mux (
    .d0 (b),
    .d1 (a),
    .sel(sel),
    .y  (carry)
  );

endmodule
