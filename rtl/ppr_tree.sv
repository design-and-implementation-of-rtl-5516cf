// ppr_tree: pipelined carry-save reduction of the eight partial products.
//
// Stage 2 reduces the 8 rows to 4 with two levels of 3:2 carry-save rows
// (8 -> 6 -> 4) and registers them when ld2 is high. Stage 3 reduces those 4
// rows to 2 (4 -> 3 -> 2) and registers the resulting sum and carry rows
// when ld3 is high. Their sum equals the sum of the input rows modulo
// 2^P_W; the final carry-propagate addition is done outside by the hybrid
// adder. Two clock edges from rows to sum/carry. Registers reset
// synchronously to zero.
//
// Reducing to one sum and one carry row with carry-save adders, in
// pipelined stages, follows the source description; the tree shape and the
// two-stage split are this design's choice. The tree is written for
// NUM_PP = 8.
module ppr_tree
  import mac_pkg::*;
(
  input  logic           clk,
  input  logic           rst,
  input  logic           ld2,
  input  logic           ld3,
  input  logic [P_W-1:0] rows [NUM_PP],
  output logic [P_W-1:0] sum,
  output logic [P_W-1:0] carry
);

  // stage 2: 8 -> 6 -> 4
  logic [P_W-1:0] s0, c0, s1, c1, s2, c2, s3, c3;
  logic [P_W-1:0] q [4];

  csa_row #(.W(P_W)) u_l1a (.x(rows[0]), .y(rows[1]), .z(rows[2]), .s(s0), .c(c0));
  csa_row #(.W(P_W)) u_l1b (.x(rows[3]), .y(rows[4]), .z(rows[5]), .s(s1), .c(c1));
  csa_row #(.W(P_W)) u_l2a (.x(s0),      .y(c0),      .z(s1),      .s(s2), .c(c2));
  csa_row #(.W(P_W)) u_l2b (.x(c1),      .y(rows[6]), .z(rows[7]), .s(s3), .c(c3));

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 4; i++) q[i] <= '0;
    end else if (ld2) begin
      q[0] <= s2;
      q[1] <= c2;
      q[2] <= s3;
      q[3] <= c3;
    end
  end

  // stage 3: 4 -> 3 -> 2
  logic [P_W-1:0] s4, c4, s5, c5;

  csa_row #(.W(P_W)) u_l3 (.x(q[0]), .y(q[1]), .z(q[2]), .s(s4), .c(c4));
  csa_row #(.W(P_W)) u_l4 (.x(s4),   .y(c4),   .z(q[3]), .s(s5), .c(c5));

  always_ff @(posedge clk) begin
    if (rst) begin
      sum   <= '0;
      carry <= '0;
    end else if (ld3) begin
      sum   <= s5;
      carry <= c5;
    end
  end

endmodule
