// tb_conditional_gating: self-checking test of the pipeline load enables.
// A random stream of valid/bubble cycles, some with a zero operand, is
// applied. A reference model in the testbench keeps, per operation, its
// valid and zero flags in a 4-entry shift list and predicts every ld bit,
// clr_out, out_valid and out_zero each cycle.
module tb_conditional_gating;

  int checks = 0, failures = 0;

  logic       clk = 1'b0, rst, in_valid, a_zero, b_zero;
  logic [3:0] ld;
  logic       clr_out, out_valid, out_zero;
  logic [3:0] mv, mz;   // model: valid / zero flags of stages 0..3
  int         n_skip = 0, n_bubble = 0;

  conditional_gating dut (.clk(clk), .rst(rst), .in_valid(in_valid),
                          .a_zero(a_zero), .b_zero(b_zero), .ld(ld),
                          .clr_out(clr_out), .out_valid(out_valid), .out_zero(out_zero));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; in_valid = 1'b0; a_zero = 1'b0; b_zero = 1'b0;
    mv = '0; mz = '0;
    repeat (2) @(posedge clk);
    #1;
    rst = 1'b0;
    for (int n = 0; n < 5000; n++) begin
      logic [3:0] eld;
      in_valid = ($urandom_range(3) != 0);
      a_zero   = ($urandom_range(5) == 0);
      b_zero   = ($urandom_range(5) == 0);
      #1;
      eld[0] = in_valid && !(a_zero || b_zero);
      eld[1] = mv[0] && !mz[0];
      eld[2] = mv[1] && !mz[1];
      eld[3] = mv[2] && !mz[2];
      checks++;
      if (ld !== eld || clr_out !== (mv[2] && mz[2]) || out_valid !== mv[3] || out_zero !== mz[3]) begin
        failures++;
        $display("FAIL n=%0d ld=%b exp %b clr=%b v=%b z=%b", n, ld, eld, clr_out, out_valid, out_zero);
      end
      if (in_valid && (a_zero || b_zero)) n_skip++;
      if (!in_valid) n_bubble++;
      @(posedge clk);
      mv = {mv[2:0], in_valid};
      mz = {mz[2:0], in_valid && (a_zero || b_zero)};
      #1;
    end
    checks++;
    if (n_skip == 0 || n_bubble == 0) begin failures++; $display("FAIL stimulus coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
