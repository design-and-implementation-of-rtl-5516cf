// pp_latch: level-sensitive latch that freezes the inputs of the upper
// partial-product multiplexers.
//
// While freeze is low the latch is transparent and q follows d. While
// freeze is high (the encoder has found the upper Booth digits redundant) q
// holds its last value, so a new multiplicand causes no switching in the
// upper multiplexers; their digits are zero then, so the held value is
// never used.
//
// The latch, and freezing multiplexer inputs on redundant digits, follow the
// source description. The latch that synthesis reports here (one bit per
// input bit) is intended: this block is meant to be a latch.
module pp_latch #(
  parameter int unsigned W = $bits(mac_pkg::pp_mult_t)
) (
  input  logic         freeze,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_latch begin
    if (!freeze) q = d;
  end

endmodule
