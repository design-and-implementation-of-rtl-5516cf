// tb_modified_booth_mac: end-to-end self-checking test of the MAC at its
// default sizes (16 x 16 -> 32 bits).
//
// Phase 1 replays the two operations of the reference MAC simulation:
// 1234 x 5678 + 00000000 and ABCD x 6789 + 01234567 (expected values are
// the exact two's-complement results).
// Phase 2 streams random operations with bubbles and an independent random
// acc_in every cycle: c must be the signed product, loaded by the 4th edge
// counting the one that sampled the operands, and acc_out must be
// c + acc_in one edge later.
// Phase 3 ties acc_in to acc_out, so the unit keeps a running sum; after a
// long stream the accumulator must equal the sum of all products modulo
// 2^32, and each step must add exactly one product.
// A reset in the middle of a stream checks that every register clears.
// Mechanisms counted, each required at least once: N1 and N2 freezes of the
// upper partial products, zero-operand gating, bubbles, the carry-select
// upper sum chosen in the accumulate adder, accumulator wrap-around and the
// closed accumulation loop.
module tb_modified_booth_mac;

  int checks = 0, failures = 0;

  logic        clk = 1'b0, reset, enable, loop;
  logic [15:0] a, b;
  logic [31:0] acc_in, acc_drv, c, acc_out;
  logic        c_valid, c_skipped, acc_valid;

  assign acc_in = loop ? acc_out : acc_drv;

  modified_booth_mac dut (
    .clk(clk), .reset(reset), .enable(enable), .a(a), .b(b), .acc_in(acc_in),
    .c(c), .c_valid(c_valid), .c_skipped(c_skipped), .acc_out(acc_out), .acc_valid(acc_valid)
  );

  always #5 clk = ~clk;

  typedef struct { logic [31:0] p; int t; logic z; } exp_t;
  exp_t        q [$];
  int          cycle = 0;
  logic [31:0] acc_in_s;       // acc_in as seen by the last edge
  logic [31:0] c_last;
  logic        c_last_v = 1'b0;
  int          n_n1 = 0, n_n2 = 0, n_skip = 0, n_bubble = 0, n_csel = 0, n_wrap = 0, n_loop = 0;
  int          n_acc = 0;

  always @(posedge clk) begin
    cycle    <= cycle + 1;
    acc_in_s <= acc_in;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor: products and accumulator updates
  initial forever begin
    @(posedge clk);
    #1;
    if (reset) begin
      c_last_v = 1'b0;
      q.delete();
    end else begin
      if (acc_valid) begin
        logic [32:0] e;
        n_acc++;
        e = {1'b0, c_last} + {1'b0, acc_in_s};
        checks += 2;
        if (!c_last_v) begin failures++; $display("FAIL acc_valid without a product"); end
        if (acc_out !== e[31:0]) begin
          failures++;
          $display("FAIL acc_out %h expected %h + %h", acc_out, c_last, acc_in_s);
        end
        if (e[32]) n_wrap++;
        if (32'(29'(c_last[27:0]) + 29'(acc_in_s[27:0])) >= 32'h10000000) n_csel++;
        if (loop) n_loop++;
      end
      c_last_v = c_valid;
      if (c_valid) begin
        exp_t x;
        c_last = c;
        if (q.size() == 0) begin
          failures++;
          $display("FAIL unexpected product");
        end else begin
          x = q.pop_front();
          checks += 3;
          if (c !== x.p) begin failures++; $display("FAIL c %h expected %h", c, x.p); end
          if (cycle - x.t != 4) begin failures++; $display("FAIL latency %0d", cycle - x.t); end
          if (c_skipped !== x.z) begin failures++; $display("FAIL c_skipped"); end
          if (x.z) n_skip++;
        end
      end
    end
  end

  task automatic issue(input logic [15:0] x, input logic [15:0] z);
    exp_t e;
    a = x; b = z; enable = 1'b1;
    e.p = 32'(int'(signed'(x)) * int'(signed'(z)));
    e.t = cycle;
    e.z = (x == 0 || z == 0);
    q.push_back(e);
    if (int'(signed'(z)) >= 0 && int'(signed'(z)) <= 127) n_n1++;
    if (int'(signed'(z)) < 0 && int'(signed'(z)) >= -128) n_n2++;
    @(posedge clk);
    #1;
    enable = 1'b0;
  endtask

  task automatic idle(input int n);
    repeat (n) begin
      @(posedge clk);
      #1;
    end
  endtask

  function automatic logic [15:0] rnd_b();
    case ($urandom_range(5))
      0: return 16'($urandom_range(127));
      1: return 16'(-int'($urandom_range(128, 1)));
      2: return ($urandom_range(4) == 0) ? 16'h0 : 16'($urandom);
      default: return 16'($urandom);
    endcase
  endfunction

  initial begin
    reset = 1'b1; enable = 1'b0; loop = 1'b0; a = '0; b = '0; acc_drv = '0;
    idle(3);
    reset = 1'b0;

    // ---- phase 1: reference operations ----
    acc_drv = 32'h00000000;
    issue(16'h1234, 16'h5678);
    idle(5);
    checks += 2;
    if (c !== 32'h06260060)       begin failures++; $display("FAIL ref c1 %h", c); end
    if (acc_out !== 32'h06260060) begin failures++; $display("FAIL ref acc1 %h", acc_out); end
    acc_drv = 32'h01234567;
    issue(16'hABCD, 16'h6789);
    idle(5);
    checks += 2;
    // -21555 * 26505 = -571315275 = DDF26BB5 (two's complement)
    if (c !== 32'hDDF26BB5)       begin failures++; $display("FAIL ref c2 %h", c); end
    if (acc_out !== 32'hDF15B11C) begin failures++; $display("FAIL ref acc2 %h", acc_out); end

    // ---- phase 2: open loop, random acc_in ----
    for (int n = 0; n < 20000; n++) begin
      logic [15:0] x;
      acc_drv = ($urandom_range(3) == 0) ? 32'hFFFFFFFF - 32'($urandom_range(1000)) : $urandom;
      if ($urandom_range(4) == 0) begin
        n_bubble++;
        idle(1);
      end
      x = ($urandom_range(30) == 0) ? 16'h0 : 16'($urandom);
      issue(x, rnd_b());
      if (n == 10000) begin   // reset in the middle of the stream
        reset = 1'b1;
        idle(1);
        reset = 1'b0;
        checks++;
        if (c !== 0 || acc_out !== 0 || c_valid || acc_valid) begin
          failures++;
          $display("FAIL reset did not clear");
        end
      end
    end
    idle(6);

    // ---- phase 3: closed loop, running sum ----
    reset = 1'b1;
    idle(1);
    reset = 1'b0;
    loop = 1'b1;
    begin
      logic [31:0] model;
      model = '0;
      for (int n = 0; n < 20000; n++) begin
        logic [15:0] x, z;
        if ($urandom_range(4) == 0) begin
          n_bubble++;
          idle(1);
        end
        x = ($urandom_range(30) == 0) ? 16'h0 : 16'($urandom);
        z = rnd_b();
        model += 32'(int'(signed'(x)) * int'(signed'(z)));
        issue(x, z);
      end
      idle(6);
      checks++;
      if (acc_out !== model) begin
        failures++;
        $display("FAIL running sum %h expected %h", acc_out, model);
      end
    end
    loop = 1'b0;

    checks += 8;
    if (q.size() != 0) begin failures++; $display("FAIL %0d products missing", q.size()); end
    if (n_n1 == 0)     begin failures++; $display("FAIL N1 freeze never seen"); end
    if (n_n2 == 0)     begin failures++; $display("FAIL N2 freeze never seen"); end
    if (n_skip == 0)   begin failures++; $display("FAIL zero gating never seen"); end
    if (n_bubble == 0) begin failures++; $display("FAIL no bubble"); end
    if (n_csel == 0)   begin failures++; $display("FAIL carry-select upper sum never used"); end
    if (n_wrap == 0)   begin failures++; $display("FAIL accumulator never wrapped"); end
    if (n_loop == 0)   begin failures++; $display("FAIL closed loop never used"); end
    $display("mechanisms: n1=%0d n2=%0d zero_skip=%0d bubble=%0d csel_hi=%0d wrap=%0d loop=%0d acc_updates=%0d",
             n_n1, n_n2, n_skip, n_bubble, n_csel, n_wrap, n_loop, n_acc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
