// booth_encoder: radix-4 (modified) Booth recoding of the multiplier.
//
// The multiplier is cut into NUM_PP overlapping triples {b[2k+1], b[2k],
// b[2k-1]}, starting at the LSB with an implicit 0 below bit 0, and each
// triple becomes one digit: 000/111 -> 0, 001/010 -> +1, 011 -> +2,
// 100 -> -2, 101/110 -> -1. The detection-logic flags are passed on as N1
// (upper multiplier bits all zero) and N2 (all one); while either is set the
// upper-half digits are forced to zero, so their multiplexers do not
// switch. Combinational.
//
// The recoding table and the N1/N2 outputs to the latch follow the source
// description; the {neg, two, one} digit format and the meaning given to
// N1/N2 are this design's choice.
module booth_encoder
  import mac_pkg::*;
(
  input  logic [B_W-1:0]  b,
  input  logic            det_zero,
  input  logic            det_ones,
  output booth_digit_t    digits [NUM_PP],
  output logic            n1,
  output logic            n2
);

  logic [B_W:0] bx;   // multiplier with the implicit 0 below bit 0

  always_comb begin
    bx = {b, 1'b0};
    n1 = det_zero;
    n2 = det_ones;
    for (int k = 0; k < NUM_PP; k++) begin
      if ((n1 || n2) && k >= NUM_PP / 2)
        digits[k] = '0;
      else
        digits[k] = booth_recode(bx[2*k +: 3]);
    end
  end

endmodule
