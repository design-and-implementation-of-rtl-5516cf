// tb_carry_lookahead_adder: self-checking test of carry_lookahead_adder.
//
// The default 28-bit adder is driven with directed carry chains and random
// operands, with both values of cin; a 10-bit instance checks a width that
// is not a multiple of the 4-bit group. Expected results come from the `+`
// operator. A watchdog ends the run.
module tb_carry_lookahead_adder;

  int checks = 0, failures = 0;

  logic [27:0] a, b, s;
  logic        cin, cout;
  logic [9:0]  a10, b10, s10;
  logic        cin10, cout10;

  carry_lookahead_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));
  carry_lookahead_adder #(.WIDTH(10)) dut10 (.a(a10), .b(b10), .cin(cin10), .s(s10), .cout(cout10));

  task automatic check(input logic [27:0] x, input logic [27:0] z, input logic ci);
    logic [28:0] exp;
    a = x; b = z; cin = ci;
    #1;
    exp = {1'b0, x} + {1'b0, z} + 29'(ci);
    checks++;
    if ({cout, s} !== exp) begin
      failures++;
      $display("FAIL %h + %h + %0b = %h c%0b, expected %h", x, z, ci, s, cout, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(28'hFFFFFFF, 28'h0, 1'b1);
    check(28'hFFFFFFF, 28'h1, 1'b0);
    check(28'h9999999, 28'h0000000, 1'b0);
    check(28'hBCDEF00, 28'h1234567, 1'b1);
    for (int i = 0; i < 28; i++) check(28'hFFFFFFF >> i, 28'h1, 1'b0);
    for (int i = 0; i < 4000; i++) check(28'($urandom), 28'($urandom), 1'($urandom));
    for (int i = 0; i < 2048; i++) begin
      logic [10:0] exp;
      a10 = 10'($urandom); b10 = 10'($urandom); cin10 = 1'($urandom);
      #1;
      exp = {1'b0, a10} + {1'b0, b10} + 11'(cin10);
      checks++;
      if ({cout10, s10} !== exp) begin
        failures++;
        $display("FAIL10 %h + %h + %0b = %h", a10, b10, cin10, s10);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
