// tb_hybrid_adder: self-checking test of hybrid_adder.
//
// Two instances are tested: the default 32-bit adder (4-bit carry-select
// over a 28-bit CLA) and the 16-bit variant (2-bit carry-select over a
// 14-bit CLA). Directed vectors include the three additions of the
// reference simulation (12345678+87654321, FFFFFFFF+00000001,
// ABCDEF01+12345678) and cases that make the low-part carry select each
// precomputed upper sum; then random operands. Expected values come from
// the `+` operator on wider vectors. A watchdog ends the run.
module tb_hybrid_adder;

  int checks = 0, failures = 0;

  logic [31:0] a32, b32, y32;
  logic        co32;
  logic [15:0] a16, b16, y16;
  logic        co16;

  hybrid_adder dut32 (.a(a32), .b(b32), .y(y32), .cout(co32));
  hybrid_adder #(.WIDTH(16), .CSEL_W(2)) dut16 (.a(a16), .b(b16), .y(y16), .cout(co16));

  int sel_hi = 0;   // times the CLA carry selected the carry-in-1 sum

  task automatic check32(input logic [31:0] x, input logic [31:0] z);
    logic [32:0] exp;
    a32 = x; b32 = z;
    #1;
    exp = {1'b0, x} + {1'b0, z};
    checks++;
    if ({co32, y32} !== exp) begin
      failures++;
      $display("FAIL32 %h + %h = %h c%0b, expected %h", x, z, y32, co32, exp);
    end
    if ((29'(x[27:0]) + 29'(z[27:0])) >= 29'h10000000) sel_hi++;
  endtask

  task automatic check16(input logic [15:0] x, input logic [15:0] z);
    logic [16:0] exp;
    a16 = x; b16 = z;
    #1;
    exp = {1'b0, x} + {1'b0, z};
    checks++;
    if ({co16, y16} !== exp) begin
      failures++;
      $display("FAIL16 %h + %h = %h c%0b, expected %h", x, z, y16, co16, exp);
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
    check32(32'h12345678, 32'h87654321);
    if (y32 !== 32'h99999999) begin failures++; $display("FAIL fig vector 1"); end
    check32(32'hFFFFFFFF, 32'h00000001);
    if (y32 !== 32'h00000000 || co32 !== 1'b1) begin failures++; $display("FAIL fig vector 2"); end
    check32(32'hABCDEF01, 32'h12345678);
    if (y32 !== 32'hBE024579) begin failures++; $display("FAIL fig vector 3"); end
    checks += 3;
    check32(32'h0FFFFFFF, 32'h00000001);   // carry out of the CLA into the top nibble
    check32(32'hF0000000, 32'h10000000);   // carry out of the carry-select part only
    check32(32'h7FFFFFFF, 32'h7FFFFFFF);
    check32(32'h0, 32'h0);
    check16(16'h3FFF, 16'h0001);
    check16(16'hFFFF, 16'h0001);
    check16(16'h1234, 16'h8765);
    for (int i = 0; i < 3000; i++) begin
      check32($urandom, $urandom);
      check16(16'($urandom), 16'($urandom));
    end
    // exhaustive walk of carries across the CLA groups
    for (int i = 0; i < 32; i++) check32(32'hFFFFFFFF >> i, 32'h1);
    checks++;
    if (sel_hi == 0) begin failures++; $display("carry-select upper sum never chosen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
