// Four-input one-bit adder ("4-bit adder"): counts how many of the four
// input bits a, b, c, d are 1 and returns the count as {c0, s1, s0}
// (0 to 4). It replaces a chain of two full adders for the four-bit column of
// the 4x4 multiplier.
//
// Structure, as published: a full adder sums a, b, c; a first half adder
// adds its sum to d and gives s0; a second half adder adds the full adder's
// carry to the first half adder's carry and gives s1 and c0. The count never
// exceeds 4, so three outputs suffice. The full adder used here is the MUX-based one, as in the rest of
// the proposed multiplier (this choice is the design's own; the published
// block diagram shows only "FA").
// Combinational; the longest path is FA -> HA -> HA.
module four_bit_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic s0,
  output logic s1,
  output logic c0
);

  logic fa_sum, fa_carry, ha_carry;

  mux_full_adder u_fa (
    .a    (a),
    .b    (b),
    .c    (c),
    .sum  (fa_sum),
    .carry(fa_carry)
  );

  half_adder u_ha_lo (
    .a    (fa_sum),
    .b    (d),
    .sum  (s0),
    .carry(ha_carry)
  );

  half_adder u_ha_hi (
    .a    (fa_carry),
    .b    (ha_carry),
    .sum  (s1),
    .carry(c0)
  );

endmodule
