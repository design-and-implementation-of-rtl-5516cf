// tb_pp_generator: exhaustive self-checking test of the multiple
// generator. For every 16-bit multiplicand the four outputs must equal
// A, 2A, -A and -2A as signed 18-bit numbers.
module tb_pp_generator;
  import mac_pkg::*;

  int checks = 0, failures = 0;

  logic [15:0] a;
  pp_mult_t    mult;

  pp_generator dut (.a(a), .mult(mult));

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
      a = 16'(i);
      v = int'(signed'(a));
      #1;
      checks += 4;
      if (int'(mult.pos1) != v)      begin failures++; $display("FAIL +A  a=%h", a); end
      if (int'(mult.pos2) != 2 * v)  begin failures++; $display("FAIL +2A a=%h", a); end
      if (int'(mult.neg1) != -v)     begin failures++; $display("FAIL -A  a=%h", a); end
      if (int'(mult.neg2) != -2 * v) begin failures++; $display("FAIL -2A a=%h", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
