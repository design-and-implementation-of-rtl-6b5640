// End-to-end, self-checking testbench for the 4x4 multiplier at its only
// size (4-bit operands, 8-bit product).
//
// Every one of the 256 operand pairs is applied. Each product is checked
// twice: against the integer product a * b, and against a step-by-step
// model of the vertically-and-crosswise method (per column: add the crosswise
// AND terms to the carry of the previous step, keep the LSB as the result
// bit, pass the rest on as the next carry). The two worked examples are
// checked by name as well: 12 x 13 = 156 and 1111 x 1111 = 11100001.
//
// Coverage counters (each must be hit at least once, or a failure is
// counted): a nonzero carry out of each of the column steps 1..5, a
// four-bit column summing to 4 (the carry output of the four-input adder),
// and a product with its MSB set.
module tb_vedic_mul4x4_mux;
  import vedic_pkg::*;

  operand_t a, b;
  product_t p;

  int checks   = 0;
  int failures = 0;

  int n_step_carry [OPERAND_W*2-1];
  int n_col3_full  = 0;
  int n_msb        = 0;

  vedic_mul4x4_mux dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Column-by-column reference. Also reports the carry leaving each step.
  function automatic product_t urdhva_ref(operand_t x, operand_t y,
                                          output int carry_out [OPERAND_W*2-1]);
    product_t r = '0;
    int       carry = 0;
    for (int k = 0; k < 2*OPERAND_W - 1; k++) begin
      int col = carry;
      for (int i = 0; i < OPERAND_W; i++) begin
        int j = k - i;
        if (j >= 0 && j < OPERAND_W) col += (x[i] & y[j]) ? 1 : 0;
      end
      r[k]         = col[0];
      carry        = col >> 1;
      carry_out[k] = carry;
    end
    r[PRODUCT_W-1] = carry[0];
    return r;
  endfunction

  task automatic apply(operand_t x, operand_t y);
    int       cout [OPERAND_W*2-1];
    product_t model;
    a = x;
    b = y;
    #1;
    model = urdhva_ref(x, y, cout);
    checks++;
    if (p !== product_t'(int'(x) * int'(y))) begin
      failures++;
      $display("FAIL %0d x %0d = %0d, expected %0d", x, y, p, int'(x) * int'(y));
    end
    checks++;
    if (p !== model) begin
      failures++;
      $display("FAIL %0d x %0d = %b, column model gives %b", x, y, p, model);
    end
    for (int k = 0; k < 2*OPERAND_W - 1; k++) if (cout[k] != 0) n_step_carry[k]++;
    if (x[0] & y[3] & x[1] & y[2] & x[2] & y[1] & x[3] & y[0]) n_col3_full++;
    if (model[PRODUCT_W-1]) n_msb++;
  endtask

  initial begin
    foreach (n_step_carry[k]) n_step_carry[k] = 0;

    // Worked examples.
    apply(4'd12, 4'd13);
    checks++;
    if (p !== 8'd156) begin
      failures++;
      $display("FAIL waveform example 12 x 13 gave %0d", p);
    end
    apply(4'b1111, 4'b1111);
    checks++;
    if (p !== 8'b1110_0001) begin
      failures++;
      $display("FAIL 1111 x 1111 gave %b", p);
    end

    // Exhaustive sweep.
    for (int x = 0; x < 16; x++) begin
      for (int y = 0; y < 16; y++) begin
        apply(operand_t'(x), operand_t'(y));
      end
    end

    // Coverage of the carry paths.
    for (int k = 1; k <= 5; k++) begin
      checks++;
      if (n_step_carry[k] == 0) begin
        failures++;
        $display("FAIL no carry ever left column step %0d", k);
      end
      $display("carry out of column %0d: %0d cases", k, n_step_carry[k]);
    end
    checks++;
    if (n_col3_full == 0) begin
      failures++;
      $display("FAIL four-input adder carry never exercised");
    end
    checks++;
    if (n_msb == 0) begin
      failures++;
      $display("FAIL product MSB never set");
    end
    $display("four-input column full: %0d cases, product MSB set: %0d cases",
             n_col3_full, n_msb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
