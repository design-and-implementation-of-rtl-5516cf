// tb_carry_select_adder: exhaustive self-checking test of the 4-bit
// carry-select pair. For every operand pair both precomputed results must
// equal a + b and a + b + 1. A watchdog ends the run.
module tb_carry_select_adder;

  int checks = 0, failures = 0;

  logic [3:0] a, b, s0, s1;
  logic       c0, c1;

  carry_select_adder dut (.a(a), .b(b), .s0(s0), .s1(s1), .c0(c0), .c1(c1));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j);
        #1;
        checks += 2;
        if ({c0, s0} !== 5'(i + j)) begin
          failures++;
          $display("FAIL cin0 %h+%h = %h", a, b, {c0, s0});
        end
        if ({c1, s1} !== 5'(i + j + 1)) begin
          failures++;
          $display("FAIL cin1 %h+%h = %h", a, b, {c1, s1});
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
