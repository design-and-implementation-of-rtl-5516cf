// conditional_gating: load enables for the multiplier pipeline.
//
// A valid bit and a "zero" bit travel down the pipeline with every
// operation. ld[0] loads the partial-product register, ld[1] and ld[2] the
// two reduction registers, ld[STAGES-1] the product register. A stage loads
// only when a valid operation reaches it, so bubbles (in_valid low) leave
// every register untouched. An operation whose multiplicand or multiplier
// is zero has a known product: none of its datapath registers is loaded,
// and when it reaches the last stage clr_out asks for the product register
// to be cleared instead. out_valid/out_zero describe the operation now in
// the product register. Registers reset synchronously; one operation per
// cycle, STAGES edges from in_valid to out_valid.
//
// Disabling inactive pipeline stages to save power follows the source
// description; the two conditions used (bubble, zero operand) are this
// design's choice.
module conditional_gating #(
  parameter int unsigned STAGES = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  logic              a_zero,
  input  logic              b_zero,
  output logic [STAGES-1:0] ld,
  output logic              clr_out,
  output logic              out_valid,
  output logic              out_zero
);

  logic [STAGES-1:0] v, z;   // valid / zero-product flag per stage
  logic              skip;

  always_comb begin
    skip  = a_zero | b_zero;
    ld[0] = in_valid & ~skip;
    for (int k = 1; k < STAGES; k++) ld[k] = v[k-1] & ~z[k-1];
    clr_out   = v[STAGES-2] & z[STAGES-2];
    out_valid = v[STAGES-1];
    out_zero  = z[STAGES-1];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      v <= '0;
      z <= '0;
    end else begin
      v <= {v[STAGES-2:0], in_valid};
      z <= {z[STAGES-2:0], in_valid & skip};
    end
  end

endmodule
