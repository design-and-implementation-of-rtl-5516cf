// tb_spst_detect: exhaustive self-checking test of the SPST detection
// logic. For all 65536 multipliers, msb_zero must be set exactly when the
// signed value lies in [0, 127] and msb_ones exactly when it lies in
// [-128, -1]: the ranges in which the upper four Booth digits are zero.
module tb_spst_detect;

  int checks = 0, failures = 0;

  logic [15:0] b;
  logic        msb_zero, msb_ones;

  spst_detect dut (.b(b), .msb_zero(msb_zero), .msb_ones(msb_ones));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      int v;
      b = 16'(i);
      #1;
      v = int'(signed'(b));
      checks += 2;
      if (msb_zero !== (v >= 0 && v <= 127)) begin
        failures++;
        $display("FAIL msb_zero b=%h", b);
      end
      if (msb_ones !== (v >= -128 && v <= -1)) begin
        failures++;
        $display("FAIL msb_ones b=%h", b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
