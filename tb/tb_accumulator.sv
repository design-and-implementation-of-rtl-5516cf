// tb_accumulator: self-checking test of the accumulator register: reset to
// zero, load on load=1, hold on load=0, against a model register.
module tb_accumulator;

  int checks = 0, failures = 0;

  logic        clk = 1'b0, rst, load;
  logic [31:0] d, q, model;

  accumulator dut (.clk(clk), .rst(rst), .load(load), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; load = 1'b1; d = 32'hDEADBEEF; model = '0;
    @(posedge clk);
    #1;
    checks++;
    if (q !== 32'h0) begin failures++; $display("FAIL reset"); end
    rst = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      load = 1'($urandom);
      d    = $urandom;
      if (n == 1000) rst = 1'b1;
      @(posedge clk);
      if (rst) model = '0;
      else if (load) model = d;
      #1;
      rst = 1'b0;
      checks++;
      if (q !== model) begin failures++; $display("FAIL n=%0d q=%h exp %h", n, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
