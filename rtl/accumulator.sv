// accumulator: the MAC's P_W-bit accumulator register.
//
// On a clock edge with load high it takes d, the hybrid-adder sum of the
// new product and the accumulate input; otherwise it holds. Synchronous
// reset to zero.
//
// The register follows the source block diagram; the load enable and the
// reset value are this design's choice.
module accumulator #(
  parameter int unsigned P_W = 32
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           load,
  input  logic [P_W-1:0] d,
  output logic [P_W-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)       q <= '0;
    else if (load) q <= d;
  end

endmodule
