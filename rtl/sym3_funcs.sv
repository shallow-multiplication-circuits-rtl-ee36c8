// sym3_funcs -- the symmetric functions U_A of three bits u = (x1, x2, x3)
// used by the seven-input adders: U_A = 1 iff x1+x2+x3 is in the set A.
//
// AND-like gates only (a complemented input or output is free in this gate
// model).  The bracketing sets the depths, given as (depth from x1, depth
// from x2 and x3):
//   U3, U123: (1,2)    U03, U23: (2,3)    U13: (2,4)
// so x1 may arrive later than x2 and x3.  The complements U01 = not U23,
// U02 = not U13 and U12 = not U03 cost nothing.  Purely combinational.
module sym3_funcs (
  input  logic [2:0]             x,   // x[0..2] = x1..x3
  output shallow_pkg::u_funcs_t  f
);
  logic x1, x2, x3;
  logic p23, n23, e23, o23;

  assign {x3, x2, x1} = x;
  assign p23 = x2 & x3;            // both 1
  assign n23 = ~x2 & ~x3;          // both 0
  assign o23 = (~x2 & x3) | (x2 & ~x3);   // exactly one
  assign e23 = n23 | p23;          // equal

  assign f.u3   = x1 & p23;
  assign f.u03  = (~x1 & n23) | (x1 & p23);
  assign f.u13  = (~x1 & o23) | (x1 & e23);
  assign f.u23  = (x1 & (x2 | x3)) | p23;
  assign f.u123 = x1 | (x2 | x3);
  assign f.u01  = ~f.u23;
  assign f.u02  = ~f.u13;
  assign f.u12  = ~f.u03;
endmodule
