// modified_booth: pipelined 16 x 16 signed radix-4 Booth multiplier.
//
// Stage 1: the detection logic checks whether the upper multiplier bits are
// only sign extension; the encoder recodes B into 8 Booth digits; the
// partial-product generator forms +-A and +-2A; the upper-digit
// multiplexers get those multiples through a latch that is frozen while
// their digits are redundant; the 8 weighted rows are registered.
// Stages 2-3: carry-save reduction to a sum and a carry row (ppr_tree).
// Stage 4: the hybrid adder (carry-lookahead low bits, carry-select top
// bits) adds sum and carry, and the product register y is loaded.
// conditional_gating loads each register only when a valid, non-trivial
// operation reaches it; a product with a zero operand skips the datapath
// and clears y.
//
// Interface: a and b are sampled on a rising edge where in_valid is high,
// and that same edge loads the partial-product register; y and y_valid are
// loaded by the 4th rising edge counting that one. One product per cycle. gated_zero marks
// a product that took the zero-operand path. Synchronous active-high reset.
//
// Booth recoding, SPST detection with a latch freeze, carry-save reduction
// to sum/carry and the hybrid final adder follow the source description;
// the number of stages, the handshake and the gating conditions are this
// design's choice.
module modified_booth
  import mac_pkg::*;
(
  input  logic           clk,
  input  logic           rst,
  input  logic           in_valid,
  input  logic [A_W-1:0] a,
  input  logic [B_W-1:0] b,
  output logic [P_W-1:0] y,
  output logic           y_valid,
  output logic           gated_zero
);

  localparam int unsigned STAGES = 4;

  // ---- stage 1: encode and generate partial products ----
  logic           det_zero, det_ones, n1, n2;
  booth_digit_t   digits [NUM_PP];
  pp_mult_t       mult, mult_msb;
  logic [P_W-1:0] rows   [NUM_PP];
  logic [P_W-1:0] rows_q [NUM_PP];
  logic [STAGES-1:0] ld;
  logic           clr_out;

  spst_detect   u_det (.b(b), .msb_zero(det_zero), .msb_ones(det_ones));

  booth_encoder u_enc (.b(b), .det_zero(det_zero), .det_ones(det_ones),
                       .digits(digits), .n1(n1), .n2(n2));

  pp_generator  u_ppg (.a(a), .mult(mult));

  pp_latch #(.W($bits(pp_mult_t))) u_msb_latch (
    .freeze(n1 | n2), .d(mult), .q(mult_msb)
  );

  pp_select     u_mux (.digits(digits), .mult_lsb(mult), .mult_msb(mult_msb),
                       .rows(rows));

  conditional_gating #(.STAGES(STAGES)) u_gate (
    .clk(clk), .rst(rst), .in_valid(in_valid),
    .a_zero(a == '0), .b_zero(b == '0),
    .ld(ld), .clr_out(clr_out), .out_valid(y_valid), .out_zero(gated_zero)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < NUM_PP; k++) rows_q[k] <= '0;
    end else if (ld[0]) begin
      rows_q <= rows;
    end
  end

  // ---- stages 2-3: carry-save reduction ----
  logic [P_W-1:0] sum, carry;

  ppr_tree u_ppr (.clk(clk), .rst(rst), .ld2(ld[1]), .ld3(ld[2]),
                  .rows(rows_q), .sum(sum), .carry(carry));

  // ---- stage 4: hybrid final adder ----
  // The carry out of bit 31 is not needed: sum + carry is the product
  // modulo 2^32, and the exact product fits in 32 bits.
  logic [P_W-1:0] prod;

  hybrid_adder #(.WIDTH(P_W), .CSEL_W(CSEL_W)) u_final (
    .a(sum), .b(carry), .y(prod), .cout()
  );

  always_ff @(posedge clk) begin
    if (rst)           y <= '0;
    else if (ld[3])    y <= prod;
    else if (clr_out)  y <= '0;
  end

endmodule
