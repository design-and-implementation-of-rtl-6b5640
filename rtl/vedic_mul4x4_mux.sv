// Unsigned 4x4 multiplier after the Urdhva Tiryagbhyam ("vertically and
// crosswise") scheme, with MUX-based full adders.
//
// All sixteen partial products pp[i][j] = a[i] & b[j] are formed at once by
// an AND array. Column k (weight 2**k) holds the products with i + j = k:
// 1, 2, 3, 4, 3, 2, 1 bits for k = 0..6. Each column is first reduced on its
// own (top row), then a bottom row of adders adds the column results to the
// carries coming from the column to the right, which gives one product bit
// per column:
//
//   col 0 : pp00                                   -> p[0]
//   col 1 : HA(pp01, pp10)            sum          -> p[1]
//   col 2 : FA(pp02, pp11, pp20)      sum + HA carry of col 1, in a bottom HA
//                                                  -> p[2]
//   col 3 : 4-input adder(pp03, pp12, pp21, pp30) gives s0, s1, c0;
//           bottom FA(s0, col-2 FA carry, col-2 bottom-HA carry) -> p[3]
//   col 4 : FA(pp13, pp22, pp31); bottom FA(its sum, s1, col-3 carry) -> p[4]
//   col 5 : FA(pp23, pp32, col-4 top FA carry);
//           bottom FA(its sum, c0, col-4 bottom carry) -> p[5]
//   col 6 : bottom FA(pp33, col-5 top FA carry, col-5 bottom carry) -> p[6],
//           its carry -> p[7]
//
// The adder placement follows the published block diagram of the proposed
// multiplier; the order in which bits are tied to the a/b/c inputs of each
// full adder is this design's own (the full adder is symmetric in its
// result). Every full adder is the MUX-based one.
//
// Interface: a, b are unsigned 4-bit operands, p = a * b. Purely
// combinational, no clock: the product is valid one combinational delay
// after the operands change. The longest path runs through the col-2 top FA
// and the bottom ripple chain from col 3 to col 6.
module vedic_mul4x4_mux
  import vedic_pkg::*;
(
  input  operand_t a,
  input  operand_t b,
  output product_t p
);

  // Partial products, pp[i][j] = a[i] & b[j].
  pp_matrix_t pp;

  always_comb begin
    for (int i = 0; i < OPERAND_W; i++) begin
      for (int j = 0; j < OPERAND_W; j++) begin
        pp[i][j] = a[i] & b[j];
      end
    end
  end

  // ---------------- top row: per-column reduction ----------------
  logic c1_carry;                   // col 1 HA carry      (weight 4)
  logic c2_sum, c2_carry;           // col 2 FA            (4, 8)
  logic c3_s0, c3_s1, c3_c0;        // col 3 4-input adder (8, 16, 32)
  logic c4_sum, c4_carry;           // col 4 FA            (16, 32)
  logic c5_sum, c5_carry;           // col 5 FA            (32, 64)

  always_comb p[0] = pp[0][0];

  half_adder u_col1_ha (
    .a    (pp[0][1]),
    .b    (pp[1][0]),
    .sum  (p[1]),
    .carry(c1_carry)
  );

  mux_full_adder u_col2_fa (
    .a    (pp[0][2]),
    .b    (pp[1][1]),
    .c    (pp[2][0]),
    .sum  (c2_sum),
    .carry(c2_carry)
  );

  four_bit_adder u_col3_add4 (
    .a (pp[0][3]),
    .b (pp[1][2]),
    .c (pp[2][1]),
    .d (pp[3][0]),
    .s0(c3_s0),
    .s1(c3_s1),
    .c0(c3_c0)
  );

  mux_full_adder u_col4_fa (
    .a    (pp[1][3]),
    .b    (pp[2][2]),
    .c    (pp[3][1]),
    .sum  (c4_sum),
    .carry(c4_carry)
  );

  mux_full_adder u_col5_fa (
    .a    (pp[2][3]),
    .b    (pp[3][2]),
    .c    (c4_carry),
    .sum  (c5_sum),
    .carry(c5_carry)
  );

  // ---------------- bottom row: column results plus ripple carries --------
  logic r2_carry;                   // into col 3
  logic r3_carry;                   // into col 4
  logic r4_carry;                   // into col 5
  logic r5_carry;                   // into col 6

  half_adder u_row_col2_ha (
    .a    (c2_sum),
    .b    (c1_carry),
    .sum  (p[2]),
    .carry(r2_carry)
  );

  mux_full_adder u_row_col3_fa (
    .a    (c3_s0),
    .b    (c2_carry),
    .c    (r2_carry),
    .sum  (p[3]),
    .carry(r3_carry)
  );

  mux_full_adder u_row_col4_fa (
    .a    (c4_sum),
    .b    (c3_s1),
    .c    (r3_carry),
    .sum  (p[4]),
    .carry(r4_carry)
  );

  mux_full_adder u_row_col5_fa (
    .a    (c5_sum),
    .b    (c3_c0),
    .c    (r4_carry),
    .sum  (p[5]),
    .carry(r5_carry)
  );

  mux_full_adder u_row_col6_fa (
    .a    (pp[3][3]),
    .b    (c5_carry),
    .c    (r5_carry),
    .sum  (p[6]),
    .carry(p[7])
  );

endmodule
