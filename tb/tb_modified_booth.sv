// tb_modified_booth: self-checking test of the pipelined Booth multiplier.
//
// Operands are streamed one per cycle with random bubbles. The stream
// starts with the products of the reference simulation (0004 x 0003,
// FFFC x 0003, 0004 x FFFD, FFFC x FFFD, 1234 x 5678), the corner cases
// 8000 x 8000 and 8000 x 7FFF, then random pairs biased towards small
// multipliers (which freeze the upper partial products) and zero operands
// (which take the gated path). Every product is compared with the signed
// product computed here, and must be loaded by the 4th rising edge,
// counting the edge that sampled its operands as the 1st. Each mechanism (N1 freeze, N2 freeze, zero-operand
// gating, bubble) must occur at least once.
module tb_modified_booth;
  import mac_pkg::*;

  int checks = 0, failures = 0;

  logic        clk = 1'b0, rst, in_valid;
  logic [15:0] a, b;
  logic [31:0] y;
  logic        y_valid, gated_zero;

  modified_booth dut (.clk(clk), .rst(rst), .in_valid(in_valid), .a(a), .b(b),
                      .y(y), .y_valid(y_valid), .gated_zero(gated_zero));

  always #5 clk = ~clk;

  typedef struct { logic [31:0] p; int t; logic z; } exp_t;
  exp_t q [$];
  int   cycle = 0;
  int   n_n1 = 0, n_n2 = 0, n_skip = 0, n_bubble = 0, n_out = 0;

  logic [15:0] fa [7] = '{16'h0004, 16'hFFFC, 16'h0004, 16'hFFFC, 16'h1234, 16'h8000, 16'h8000};
  logic [15:0] fb [7] = '{16'h0003, 16'h0003, 16'hFFFD, 16'hFFFD, 16'h5678, 16'h8000, 16'h7FFF};
  logic [31:0] fy [7] = '{32'h0000000C, 32'hFFFFFFF4, 32'hFFFFFFF4, 32'h0000000C, 32'h06260060,
                          32'h40000000, 32'hC0008000};

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard
  always @(posedge clk) cycle <= cycle + 1;

  initial forever begin
    @(posedge clk);
    #1;
    if (!rst && y_valid) begin
      exp_t e;
      n_out++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output %h", y);
      end else begin
        e = q.pop_front();
        checks += 3;
        if (y !== e.p) begin
          failures++;
          $display("FAIL product %h expected %h", y, e.p);
        end
        if (cycle - e.t != 4) begin
          failures++;
          $display("FAIL latency %0d", cycle - e.t);
        end
        if (gated_zero !== e.z) begin
          failures++;
          $display("FAIL gated_zero flag");
        end
      end
    end
  end

  task automatic issue(input logic [15:0] x, input logic [15:0] z);
    exp_t e;
    a = x; b = z; in_valid = 1'b1;
    e.p = 32'(int'(signed'(x)) * int'(signed'(z)));
    e.t = cycle;
    e.z = (x == 0 || z == 0);
    q.push_back(e);
    #1;
    if (int'(signed'(z)) >= 0 && int'(signed'(z)) <= 127) n_n1++;
    if (int'(signed'(z)) < 0 && int'(signed'(z)) >= -128) n_n2++;
    if (e.z) n_skip++;
    @(posedge clk);
    #1;
    in_valid = 1'b0;
  endtask

  initial begin
    rst = 1'b1; in_valid = 1'b0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    #1;
    rst = 1'b0;
    for (int i = 0; i < 7; i++) begin
      checks++;
      if (32'(int'(signed'(fa[i])) * int'(signed'(fb[i]))) !== fy[i]) begin
        failures++;
        $display("FAIL reference vector %0d", i);
      end
      issue(fa[i], fb[i]);
    end
    for (int n = 0; n < 20000; n++) begin
      logic [15:0] x, z;
      if ($urandom_range(4) == 0) begin
        n_bubble++;
        @(posedge clk);
        #1;
      end
      x = 16'($urandom);
      case ($urandom_range(5))
        0: z = 16'($urandom_range(127));                 // N1: small positive
        1: z = 16'(-int'($urandom_range(128, 1)));       // N2: small negative
        2: z = ($urandom_range(3) == 0) ? 16'h0 : 16'($urandom);
        default: z = 16'($urandom);
      endcase
      if ($urandom_range(30) == 0) x = '0;
      issue(x, z);
    end
    repeat (8) @(posedge clk);
    #1;
    checks += 6;
    if (q.size() != 0) begin failures++; $display("FAIL %0d products missing", q.size()); end
    if (n_n1 == 0)     begin failures++; $display("FAIL N1 freeze never seen"); end
    if (n_n2 == 0)     begin failures++; $display("FAIL N2 freeze never seen"); end
    if (n_skip == 0)   begin failures++; $display("FAIL zero gating never seen"); end
    if (n_bubble == 0) begin failures++; $display("FAIL no bubble"); end
    if (n_out == 0)    begin failures++; $display("FAIL no output"); end
    $display("mechanisms: n1=%0d n2=%0d zero_skip=%0d bubble=%0d products=%0d",
             n_n1, n_n2, n_skip, n_bubble, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
