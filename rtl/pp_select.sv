// pp_select: partial-product multiplexers of the radix-4 Booth multiplier.
//
// For digit k the multiplexer picks 0, +A, +2A, -A or -2A (M_W-bit two's
// complement) from the multiple set. Digits 0 .. NUM_PP/2-1 use mult_lsb;
// the upper digits use mult_msb, the copy that has passed through the freeze
// latch. Instead of sign-extending every row to P_W bits, each row carries
// only its sign-inverted top bit plus a few constant bits, the usual
// sign-extension-prevention pattern of a Booth partial-product matrix
// (s = sign of the selected multiple, bit M_W-1 counted from the row's
// weight 2k):
//   row 0:     ~s  s  s  m[M_W-2:0]
//   row k > 0:  1 ~s     m[M_W-2:0]
// The constant 1s absorb the sign-extension terms of all rows, so the plain
// sum of the NUM_PP rows, modulo 2^P_W, is the product; a single row is no
// longer a weighted partial product on its own. The top row's leading 1
// falls above bit P_W-1 and is dropped. Combinational.
//
// The multiplexers, the MSB/LSB split and the row pattern follow the source
// description and its partial-product matrix drawings; forming the negated
// multiples ahead of the multiplexers (no separate +1 correction bits) is
// this design's choice.
module pp_select
  import mac_pkg::*;
(
  input  booth_digit_t   digits [NUM_PP],
  input  pp_mult_t       mult_lsb,
  input  pp_mult_t       mult_msb,
  output logic [P_W-1:0] rows   [NUM_PP]
);

  always_comb begin
    for (int k = 0; k < NUM_PP; k++) begin
      pp_mult_t       m;
      logic [M_W-1:0] sel;
      logic           s;
      logic [M_W+1:0] row;   // M_W + 2 bits before weighting
      m = (k < NUM_PP / 2) ? mult_lsb : mult_msb;
      unique case ({digits[k].neg, digits[k].two, digits[k].one})
        3'b001:  sel = m.pos1;
        3'b010:  sel = m.pos2;
        3'b101:  sel = m.neg1;
        3'b110:  sel = m.neg2;
        default: sel = '0;
      endcase
      s = sel[M_W-1];
      if (k == 0) row = {~s, s, s, sel[M_W-2:0]};
      else        row = {1'b0, 1'b1, ~s, sel[M_W-2:0]};
      rows[k] = P_W'(row) << (2 * k);
    end
  end

endmodule
