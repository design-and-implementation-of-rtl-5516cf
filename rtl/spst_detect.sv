// spst_detect: detection logic of the spurious-power-suppression (SPST)
// Booth encoder.
//
// A radix-4 Booth digit is zero when its bit triple is 000 or 111. If the
// multiplier bits from B_W/2-1 up to the sign bit are all equal, every digit
// of the upper half (digits B_W/4 .. B_W/2-1) is zero, so the upper partial
// products are redundant. msb_zero flags the all-zero case (small positive
// multiplier), msb_ones the all-one case (small negative multiplier); the
// encoder passes them on to freeze the upper multiplexer inputs. Bits
// below B_W/2-1 do not affect the upper digits and are not read.
// Combinational.
//
// That a detection unit decides whether computations are redundant follows
// the source description; the exact test (upper half pure sign extension)
// and its two outputs are this design's choice.
module spst_detect
  import mac_pkg::*;
(
  input  logic [B_W-1:0] b,
  output logic           msb_zero,
  output logic           msb_ones
);

  always_comb begin
    msb_zero = ~|b[B_W-1:B_W/2-1];
    msb_ones =  &b[B_W-1:B_W/2-1];
  end

endmodule
