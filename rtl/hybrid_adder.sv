// hybrid_adder: WIDTH-bit adder, carry-lookahead below and carry-select on top.
//
// The low WIDTH-CSEL_W bits go to a carry-lookahead adder (S_CLA, C_CLA).
// At the same time the top CSEL_W bits are added twice by a carry-select
// pair, once for each possible incoming carry (S0/C0, S1/C1). The CLA
// carry-out then drives the multiplexers that pick S_CSA/C_CSA, so the top
// bits are ready as soon as the low carry is known. Y = {S_CSA, S_CLA};
// cout = C_CSA. The sum wraps modulo 2^WIDTH. Combinational.
//
// The split, the selection by the CLA carry-out and the defaults (4-bit
// carry-select over a 28-bit CLA for 32-bit operands) follow the source
// description; WIDTH=16, CSEL_W=2 gives its 16-bit (2 + 14) variant.
// There is no carry-in port; the CLA carry-in is tied low.
module hybrid_adder #(
  parameter int unsigned WIDTH  = 32,
  parameter int unsigned CSEL_W = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y,
  output logic             cout
);

  localparam int unsigned CLA_W = WIDTH - CSEL_W;

  logic [CLA_W-1:0]  s_cla;
  logic              c_cla;
  logic [CSEL_W-1:0] s0, s1, s_csa;
  logic              c0, c1, c_csa;

  carry_lookahead_adder #(.WIDTH(CLA_W)) u_cla (
    .a(a[CLA_W-1:0]), .b(b[CLA_W-1:0]), .cin(1'b0), .s(s_cla), .cout(c_cla)
  );

  carry_select_adder #(.WIDTH(CSEL_W)) u_csel (
    .a(a[WIDTH-1:CLA_W]), .b(b[WIDTH-1:CLA_W]),
    .s0(s0), .s1(s1), .c0(c0), .c1(c1)
  );

  // output multiplexers, selected by the CLA carry-out
  always_comb begin
    s_csa = c_cla ? s1 : s0;
    c_csa = c_cla ? c1 : c0;
    y     = {s_csa, s_cla};
    cout  = c_csa;
  end

endmodule
