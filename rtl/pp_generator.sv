// pp_generator: forms the multiples of the multiplicand that a radix-4
// Booth digit can select.
//
// From A (two's complement, A_W bits) it produces +A, +2A, -A and -2A, each
// sign-extended to M_W = A_W+2 bits so that -2 * (-2^(A_W-1)) still fits.
// The set is computed once and shared by all partial-product multiplexers:
// the lower digits take it directly, the upper digits through pp_latch.
// Combinational.
//
// The block and its split into MSB and LSB paths follow the source block
// diagram; computing full negated multiples here is this design's choice.
module pp_generator
  import mac_pkg::*;
(
  input  logic [A_W-1:0] a,
  output pp_mult_t       mult
);

  always_comb begin
    logic signed [M_W-1:0] ax;
    ax        = M_W'(signed'(a));
    mult.pos1 = ax;
    mult.pos2 = ax <<< 1;
    mult.neg1 = -ax;
    mult.neg2 = -(ax <<< 1);
  end

endmodule
