// carry_lookahead_adder: WIDTH-bit adder built on propagate/generate signals.
//
// Every bit forms g = a & b and p = a ^ b up front. Bits are grouped GROUP at
// a time; inside a group each carry is written out as a two-level
// sum of products of the group's g/p and the group carry-in (full
// lookahead, no ripple). Each group also forms its group generate and group
// propagate, and the group carry-out G | P & cin feeds the next group.
// Combinational; WIDTH need not be a multiple of GROUP.
//
// The use of precomputed propagate/generate signals follows the source
// description; the 4-bit grouping and the chaining of group carries are
// this design's choice.
module carry_lookahead_adder #(
  parameter int unsigned WIDTH = 28,
  parameter int unsigned GROUP = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);

  localparam int unsigned NGRP = (WIDTH + GROUP - 1) / GROUP;

  logic [WIDTH-1:0] g, p, c;
  logic [NGRP:0]    gc;        // carry into each group

  assign g     = a & b;
  assign p     = a ^ b;
  assign gc[0] = cin;

  for (genvar grp = 0; grp < NGRP; grp++) begin : g_grp
    localparam int unsigned LO = grp * GROUP;
    localparam int unsigned N  = (WIDTH - LO < GROUP) ? WIDTH - LO : GROUP;

    // carries inside the group, each a two-level function of g, p and gc
    always_comb begin
      for (int i = 0; i < N; i++) begin
        logic ci, t;
        ci = gc[grp];
        for (int j = 0; j < i; j++) ci = ci & p[LO + j];
        for (int k = 0; k < i; k++) begin
          t = g[LO + k];
          for (int j = k + 1; j < i; j++) t = t & p[LO + j];
          ci = ci | t;
        end
        c[LO + i] = ci;
      end
    end

    // group generate / propagate and the carry into the next group
    logic gg, gp;
    always_comb begin
      gg = 1'b0;
      gp = 1'b1;
      for (int i = 0; i < N; i++) begin
        gg = g[LO + i] | (p[LO + i] & gg);
        gp = gp & p[LO + i];
      end
    end
    assign gc[grp+1] = gg | (gp & gc[grp]);
  end

  assign s    = p ^ c;
  assign cout = gc[NGRP];

endmodule
