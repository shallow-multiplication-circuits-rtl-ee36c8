// fa_5_1 -- FA_{5,1} bit adder: y = x1+x2+x3+x4+x5 + 2*x6 as a 3-bit number.
//
// Seven half adders and three two-input merge gates.  x1..x4 (significance 0)
// are paired by two HAs; their sums meet in a third HA whose sum is added to
// x5 by a fourth HA to give y0.  The two first-level carries meet in a HA whose
// sum and carry have significance 1 and 2.  Every merge gate joins two signals
// of the same significance that can never both be 1, so its own carry would
// always be 0; it is a single XOR, or, with MERGE_WITH_OR = 1, an OR, which
// computes the same function.
//
// Input and output times in the unit-delay gate model (all inputs at time 0
// give the depths):
//   x1..x4 at 0, x5 at 2, x6 at 4;  y0 at 3, y1 at 5, y2 at 6.
// Purely combinational.  Gate structure and timing follow the published cell;
// the MERGE_WITH_OR option is the alternative it mentions.
module fa_5_1 #(
  parameter bit MERGE_WITH_OR = 1'b0
) (
  input  logic [4:0] x,    // x[0..4] = x1..x5, significance 0
  input  logic       x6,   // significance 1
  output logic [2:0] y     // y[j] has significance j
);
  logic s1, c1, s2, c2, s3, c3, s4, c4, c5, s6, c6, c7;
  logic m1, m2;

  // Level 1: x1+x2 and x3+x4.
  half_adder u_ha1 (.a(x[0]), .b(x[1]), .s(s1), .c(c1));
  half_adder u_ha2 (.a(x[2]), .b(x[3]), .s(s2), .c(c2));
  // Level 2: significance-0 sums and significance-1 carries.
  half_adder u_ha3 (.a(s1),   .b(s2),   .s(s3), .c(c3));
  half_adder u_ha4 (.a(c1),   .b(c2),   .s(s4), .c(c4));
  // Level 3: add x5, giving y0.
  half_adder u_ha5 (.a(x[4]), .b(s3),   .s(y[0]), .c(c5));
  // c3 and s4 (significance 1) are never both 1.
  assign m1 = MERGE_WITH_OR ? (c3 | s4) : (c3 ^ s4);
  // Level 4: the two significance-1 bits from below.
  half_adder u_ha6 (.a(c5),   .b(m1),   .s(s6), .c(c6));
  // Level 5: add x6, giving y1.
  half_adder u_ha7 (.a(x6),   .b(s6),   .s(y[1]), .c(c7));
  // Significance 2: c4, c6 and c7 -- at most one of them is 1.
  assign m2   = MERGE_WITH_OR ? (c4 | c6) : (c4 ^ c6);
  assign y[2] = MERGE_WITH_OR ? (m2 | c7) : (m2 ^ c7);
endmodule
