// carry_select_adder: the precomputing half of a carry-select adder.
//
// Two ripple-carry adders add the same operands, one assuming a carry-in of
// 0 (s0, c0) and one assuming a carry-in of 1 (s1, c1). The multiplexers
// that pick one pair once the real carry arrives sit in the enclosing
// hybrid_adder, as in the hybrid-adder block diagram. Purely combinational.
//
// The precompute-both-sums scheme and the S0/S1/C0/C1 names follow the
// source description; using ripple chains for the two sums is this design's
// choice (the width is only 4 bits by default).
module carry_select_adder #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] s0,
  output logic [WIDTH-1:0] s1,
  output logic             c0,
  output logic             c1
);

  logic [WIDTH:0] r0, r1;   // carry chains for carry-in 0 and 1

  assign r0[0] = 1'b0;
  assign r1[0] = 1'b1;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    assign s0[i]   = a[i] ^ b[i] ^ r0[i];
    assign r0[i+1] = (a[i] & b[i]) | (r0[i] & (a[i] ^ b[i]));
    assign s1[i]   = a[i] ^ b[i] ^ r1[i];
    assign r1[i+1] = (a[i] & b[i]) | (r1[i] & (a[i] ^ b[i]));
  end

  assign c0 = r0[WIDTH];
  assign c1 = r1[WIDTH];

endmodule
