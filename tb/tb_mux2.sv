// Self-checking testbench for mux2: applies all eight input combinations and
// compares y with the selected data input, worked out in the testbench.
module tb_mux2;

  logic d0, d1, sel, y;
  int   checks   = 0;
  int   failures = 0;

  mux2 dut (.d0(d0), .d1(d1), .sel(sel), .y(y));

  initial begin : watchdog
    #10us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {sel, d1, d0} = 3'(v);
      #1;
      checks++;
      if (y !== (v >= 4 ? d1 : d0)) begin
        failures++;
        $display("FAIL sel=%0b d1=%0b d0=%0b y=%0b", sel, d1, d0, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
