// tb_ppr_tree: self-checking test of the pipelined carry-save reduction.
// Random rows are streamed with ld2/ld3 high; two edges later sum + carry
// must equal the sum of the rows modulo 2^32. A hold phase with both loads
// low checks that the registers keep their contents.
module tb_ppr_tree;
  import mac_pkg::*;

  int checks = 0, failures = 0;

  logic        clk = 1'b0, rst, ld2, ld3;
  logic [31:0] rows [NUM_PP];
  logic [31:0] sum, carry;
  logic [31:0] expq [$];

  ppr_tree dut (.clk(clk), .rst(rst), .ld2(ld2), .ld3(ld3), .rows(rows),
                .sum(sum), .carry(carry));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; ld2 = 1'b0; ld3 = 1'b0;
    for (int k = 0; k < NUM_PP; k++) rows[k] = '0;
    repeat (2) @(posedge clk);
    #1;
    rst = 1'b0;
    checks++;
    if (sum !== 0 || carry !== 0) begin failures++; $display("FAIL reset"); end
    ld2 = 1'b1; ld3 = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      logic [31:0] e;
      e = '0;
      for (int k = 0; k < NUM_PP; k++) begin
        rows[k] = $urandom;
        e += rows[k];
      end
      expq.push_back(e);
      @(posedge clk);
      #1;
      if (n >= 1) begin
        logic [31:0] want;
        want = expq.pop_front();
        checks++;
        if (sum + carry !== want) begin
          failures++;
          $display("FAIL n=%0d got %h expected %h", n, sum + carry, want);
        end
      end
    end
    // hold: loads low, registers must not move
    begin
      logic [31:0] s_h, c_h;
      ld2 = 1'b0; ld3 = 1'b0;
      s_h = sum; c_h = carry;
      repeat (5) begin
        for (int k = 0; k < NUM_PP; k++) rows[k] = $urandom;
        @(posedge clk);
        #1;
        checks++;
        if (sum !== s_h || carry !== c_h) begin failures++; $display("FAIL hold"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
