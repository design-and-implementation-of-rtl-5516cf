// csa_row: one row of 3:2 carry-save compressors (full adders).
//
// Three W-bit rows x, y, z are reduced to a sum row s and a carry row c with
// x + y + z = s + c (mod 2^W). The carry row is already shifted one place
// left; the carry out of the top bit is dropped, as the product is taken
// modulo 2^W. Combinational.
module csa_row #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);

  always_comb begin
    logic [W-1:0] maj;
    s   = x ^ y ^ z;
    maj = (x & y) | (x & z) | (y & z);
    c   = {maj[W-2:0], 1'b0};
  end

endmodule
