// tb_booth_encoder: exhaustive self-checking test of the radix-4 Booth
// encoder. For every 16-bit multiplier (with the detection flags worked
// out here from the value's range) each digit must be one of the five legal
// codes and sum(d_k * 4^k) must equal the signed multiplier. Each bit
// triple is also compared with the recoding table, and the freeze outputs
// with the flags. Finally the flags are forced on a value with non-zero
// upper digits to check that the upper digits are suppressed.
module tb_booth_encoder;
  import mac_pkg::*;

  int checks = 0, failures = 0;

  logic [15:0]  b;
  logic         det_zero, det_ones, n1, n2;
  booth_digit_t digits [NUM_PP];

  booth_encoder dut (.b(b), .det_zero(det_zero), .det_ones(det_ones),
                     .digits(digits), .n1(n1), .n2(n2));

  function automatic int dval(input booth_digit_t d);
    int m;
    m = d.two ? 2 : (d.one ? 1 : 0);
    return d.neg ? -m : m;
  endfunction

  // the recoding table, written out independently of the package function
  function automatic int table_val(input logic [2:0] t);
    case (t)
      3'b000, 3'b111: return 0;
      3'b001, 3'b010: return 1;
      3'b011:         return 2;
      3'b100:         return -2;
      default:        return -1;
    endcase
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      int v, acc;
      logic [16:0] bx;
      b  = 16'(i);
      v  = int'(signed'(b));
      det_zero = (v >= 0 && v <= 127);
      det_ones = (v >= -128 && v < 0);
      #1;
      bx  = {b, 1'b0};
      acc = 0;
      for (int k = 0; k < NUM_PP; k++) begin
        acc += dval(digits[k]) * (1 << (2 * k));
        checks++;
        if (dval(digits[k]) != table_val(bx[2*k +: 3]) || (digits[k].one && digits[k].two)
            || (digits[k].neg && !digits[k].one && !digits[k].two)) begin
          failures++;
          $display("FAIL digit %0d of b=%h", k, b);
        end
      end
      checks += 2;
      if (acc != v) begin
        failures++;
        $display("FAIL b=%h recoded to %0d", b, acc);
      end
      if (n1 !== det_zero || n2 !== det_ones) begin
        failures++;
        $display("FAIL n1/n2 b=%h", b);
      end
    end
    // forced freeze: upper digits must read zero, lower digits unchanged
    b = 16'h5A5A; det_zero = 1'b1; det_ones = 1'b0;
    #1;
    for (int k = 0; k < NUM_PP; k++) begin
      checks++;
      if (k >= NUM_PP / 2 && dval(digits[k]) != 0) begin
        failures++;
        $display("FAIL upper digit %0d not suppressed", k);
      end
      if (k < NUM_PP / 2 && dval(digits[k]) != table_val({b, 1'b0}[2*k +: 3])) begin
        failures++;
        $display("FAIL lower digit %0d changed by freeze", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
