// sym4_funcs -- the symmetric functions V_A of four bits v = (x4..x7):
// V_A = 1 iff x4+x5+x6+x7 is in the set A.  The same block computes the
// functions T_A of the four significance-1 inputs x8..x11 of the FA_{7,4}.
//
// AND-like gates only, all four inputs at time 0.  Depths:
//   V1234, V4: 2    V34, V234, V04: 3    V1, V2, V3, V13, V024: 4
// (V13 is the free complement of V024, V2 = V234 and not V34.)  Purely
// combinational.
module sym4_funcs (
  input  logic [3:0]             x,   // x[0..3] = x4..x7
  output shallow_pkg::v_funcs_t  f
);
  logic a, b, c, d;               // x4, x5, x6, x7
  logic ab_and, ab_nor, ab_xor, ab_eq;
  logic cd_and, cd_nor, cd_xor, cd_eq;

  assign {d, c, b, a} = x;
  assign ab_and = a & b;
  assign ab_nor = ~a & ~b;
  assign ab_xor = (~a & b) | (a & ~b);
  assign ab_eq  = ab_nor | ab_and;
  assign cd_and = c & d;
  assign cd_nor = ~c & ~d;
  assign cd_xor = (~c & d) | (c & ~d);
  assign cd_eq  = cd_nor | cd_and;

  assign f.v1    = (ab_nor & cd_xor) | (ab_xor & cd_nor);
  assign f.v3    = (ab_xor & cd_and) | (ab_and & cd_xor);
  assign f.v4    = ab_and & cd_and;
  assign f.v04   = (ab_nor & cd_nor) | (ab_and & cd_and);
  assign f.v34   = (ab_and | cd_and) & ((a & c) | (b & d));
  assign f.v024  = (ab_eq & cd_eq) | (ab_xor & cd_xor);
  assign f.v234  = ((a | b) & (c | d)) | ((a | c) & (b | d));
  assign f.v1234 = (a | b) | (c | d);
  assign f.v13   = ~f.v024;
  assign f.v2    = f.v234 & ~f.v34;
endmodule
