// mac_pkg: widths and types shared by the modified-Booth MAC.
//
// The MAC multiplies two 16-bit two's-complement operands into a 32-bit
// product and accumulates it in a 32-bit register. Radix-4 Booth recoding
// turns the 16-bit multiplier into 8 signed digits in {0, +-1, +-2}, so the
// multiplier sums 8 partial-product rows instead of 16.
//
// booth_digit_t is this design's encoding of one digit: `one` selects the
// multiplicand, `two` selects twice the multiplicand (never both), `neg`
// selects the negated multiple. A digit with neither `one` nor `two` is zero.
// pp_mult_t carries the four multiples a digit can pick, formed once per
// multiplicand by the partial-product generator.
package mac_pkg;

  parameter int unsigned A_W    = 16;        // multiplicand width
  parameter int unsigned B_W    = 16;        // multiplier width
  parameter int unsigned P_W    = A_W + B_W; // product / accumulator width
  parameter int unsigned NUM_PP = B_W / 2;   // radix-4 partial products
  parameter int unsigned M_W    = A_W + 2;   // width of one signed multiple (-2 * -2^15 needs 18 bits)
  parameter int unsigned CSEL_W = 4;         // carry-select part of the hybrid adder

  typedef struct packed {
    logic neg;
    logic two;
    logic one;
  } booth_digit_t;

  typedef struct packed {
    logic signed [M_W-1:0] pos1;   // +A
    logic signed [M_W-1:0] pos2;   // +2A
    logic signed [M_W-1:0] neg1;   // -A
    logic signed [M_W-1:0] neg2;   // -2A
  } pp_mult_t;

  // Radix-4 recoding of one overlapping bit triple {b[2k+1], b[2k], b[2k-1]}.
  function automatic booth_digit_t booth_recode(input logic [2:0] t);
    booth_digit_t d;
    unique case (t)
      3'b000, 3'b111: d = '{neg: 1'b0, two: 1'b0, one: 1'b0};
      3'b001, 3'b010: d = '{neg: 1'b0, two: 1'b0, one: 1'b1};
      3'b011:         d = '{neg: 1'b0, two: 1'b1, one: 1'b0};
      3'b100:         d = '{neg: 1'b1, two: 1'b1, one: 1'b0};
      default:        d = '{neg: 1'b1, two: 1'b0, one: 1'b1}; // 101, 110
    endcase
    return d;
  endfunction

endpackage
