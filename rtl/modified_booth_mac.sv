// modified_booth_mac: power- and area-oriented multiply-accumulate unit.
//
// A pipelined radix-4 Booth multiplier (modified_booth) forms the 32-bit
// signed product c of a and b. A second hybrid adder adds c to acc_in and
// the accumulator register takes the sum on the cycle after c appears:
// acc_out = c + acc_in (mod 2^32). Tying acc_in to acc_out outside gives
// the usual running sum acc <= acc + a*b; driving acc_in from elsewhere
// adds the product to any 32-bit value.
//
// Interface: a, b are sampled on a rising clk edge with enable high;
// counting that edge as the 1st, c and c_valid are loaded by the 4th edge
// and acc_out and acc_valid by the 5th;
// acc_in is sampled on the edge that loads acc_out. One operation per cycle.
// c_skipped marks a product with a zero operand, which bypasses the
// multiplier datapath. reset is synchronous and active high and clears
// every register, the accumulator included.
//
// The multiplier -> hybrid adder -> accumulator chain, the port names and
// the 16/32-bit widths follow the source description. Accumulating through
// an external acc_in, the latencies and the valid outputs are this design's
// choice.
module modified_booth_mac
  import mac_pkg::*;
(
  input  logic           clk,
  input  logic           reset,
  input  logic           enable,
  input  logic [A_W-1:0] a,
  input  logic [B_W-1:0] b,
  input  logic [P_W-1:0] acc_in,
  output logic [P_W-1:0] c,
  output logic           c_valid,
  output logic           c_skipped,
  output logic [P_W-1:0] acc_out,
  output logic           acc_valid
);

  logic [P_W-1:0] acc_sum;

  modified_booth u_mul (
    .clk(clk), .rst(reset), .in_valid(enable), .a(a), .b(b),
    .y(c), .y_valid(c_valid), .gated_zero(c_skipped)
  );

  // accumulate adder; its carry-out is dropped, the accumulator wraps
  hybrid_adder #(.WIDTH(P_W), .CSEL_W(CSEL_W)) u_add (
    .a(c), .b(acc_in), .y(acc_sum), .cout()
  );

  accumulator #(.P_W(P_W)) u_acc (
    .clk(clk), .rst(reset), .load(c_valid), .d(acc_sum), .q(acc_out)
  );

  always_ff @(posedge clk) begin
    if (reset) acc_valid <= 1'b0;
    else       acc_valid <= c_valid;
  end

endmodule
