// tb_pp_select: self-checking test of the partial-product multiplexers.
// Random digits and two independent random multiplicands (one feeding the
// lower-digit multiples, one the upper-digit multiples) are applied, with A
// taken from the lsb set for k < 4 and from the msb set otherwise. Each row
// must match the sign-extension-prevention pattern built here from
// v = d_k * A (18-bit two's complement, sign s): row 0 is
// {~s, s, s, v[16:0]}, row k > 0 is {1, ~s, v[16:0]}, shifted by 2k. The
// sum of the rows must equal sum(d_k * A * 4^k) modulo 2^32.
module tb_pp_select;
  import mac_pkg::*;

  int checks = 0, failures = 0;

  booth_digit_t digits [NUM_PP];
  pp_mult_t     ml, mm;
  logic [31:0]  rows [NUM_PP];

  pp_select dut (.digits(digits), .mult_lsb(ml), .mult_msb(mm), .rows(rows));

  function automatic pp_mult_t mk(input int v);
    pp_mult_t m;
    m.pos1 = 18'(v);
    m.pos2 = 18'(2 * v);
    m.neg1 = 18'(-v);
    m.neg2 = 18'(-2 * v);
    return m;
  endfunction

  function automatic booth_digit_t mkd(input int v);
    booth_digit_t d;
    d.neg = (v < 0);
    d.two = (v == 2 || v == -2);
    d.one = (v == 1 || v == -1);
    return d;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 5000; r++) begin
      int al, am, dv [NUM_PP];
      al = int'(signed'(16'($urandom)));
      am = int'(signed'(16'($urandom)));
      if (r == 0) begin al = -32768; am = -32768; end
      ml = mk(al);
      mm = mk(am);
      for (int k = 0; k < NUM_PP; k++) begin
        dv[k] = int'($urandom_range(4)) - 2;
        digits[k] = mkd(dv[k]);
      end
      #1;
      begin
        logic [31:0] total, want;
        total = '0;
        want  = '0;
        for (int k = 0; k < NUM_PP; k++) begin
          longint v, e;
          logic   s;
          v = longint'(dv[k]) * longint'(k < NUM_PP / 2 ? al : am);
          s = v < 0;
          if (k == 0) e = (v & 64'h1FFFF) | (longint'(s) << 17) | (longint'(s) << 18) | (longint'(!s) << 19);
          else        e = (v & 64'h1FFFF) | (longint'(!s) << 17) | (longint'(1) << 18);
          e = e << (2 * k);
          checks++;
          if (rows[k] !== 32'(e)) begin
            failures++;
            $display("FAIL row %0d digit %0d: %h expected %h", k, dv[k], rows[k], 32'(e));
          end
          total += rows[k];
          want  += 32'(v * (longint'(1) << (2 * k)));
        end
        checks++;
        if (total !== want) begin
          failures++;
          $display("FAIL row sum %h expected %h", total, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
