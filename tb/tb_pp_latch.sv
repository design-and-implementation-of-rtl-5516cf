// tb_pp_latch: self-checking test of the freeze latch. With freeze low the
// output must follow every input change; with freeze high it must keep the
// value present when freeze rose, whatever the input does.
module tb_pp_latch;

  int checks = 0, failures = 0;

  logic        freeze;
  logic [71:0] d, q, held;

  pp_latch dut (.freeze(freeze), .d(d), .q(q));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    freeze = 1'b0;
    for (int r = 0; r < 200; r++) begin
      for (int i = 0; i < 5; i++) begin
        d = {$urandom, $urandom, 8'($urandom)};
        #1;
        checks++;
        if (q !== d) begin failures++; $display("FAIL transparent"); end
      end
      held   = d;
      freeze = 1'b1;
      #1;
      for (int i = 0; i < 5; i++) begin
        d = {$urandom, $urandom, 8'($urandom)};
        #1;
        checks++;
        if (q !== held) begin failures++; $display("FAIL hold"); end
      end
      freeze = 1'b0;
      #1;
      checks++;
      if (q !== d) begin failures++; $display("FAIL reopen"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
