// khrapchenko_fa7 -- FA7 from AND-like gates only: the three bits of the sum
// of seven bits x1..x7, y0 = S1357, y1 = S2367, y2 = S4567, where S_A = 1 iff
// x1+..+x7 is in the set A.
//
// The seven bits are split into u = (x1,x2,x3) and v = (x4..x7).  The
// symmetric functions U_A and V_A of the two groups (sym3_funcs, sym4_funcs)
// are combined by sum-of-products over the ways the total can be split:
//   y0 = U02 V13 | U13 V024
//   y1 = (U23 V04 | U12 V1) | (U01 V2 | U03 V3)
//   y2 = (U23 V234 | U123 V34) | (U3 V1234 | V4)
// Depths (unit-delay AND-like gates), as (x1, x2 x3, x4..x7):
//   y0 (4,6,6)   y1 (5,6,7)   y2 (5,6,6)
// so x1 may be one or two gate delays late.  The U and V functions are brought
// out as well, because the FA_{7,4} reuses them.  Purely combinational.
module khrapchenko_fa7 (
  input  logic [6:0]             x,    // x[0..6] = x1..x7
  output logic [2:0]             y,    // binary sum, y[j] of significance j
  output shallow_pkg::u_funcs_t  uf,   // U_A of x1..x3
  output shallow_pkg::v_funcs_t  vf    // V_A of x4..x7
);
  sym3_funcs u_u (.x(x[2:0]), .f(uf));
  sym4_funcs u_v (.x(x[6:3]), .f(vf));

  assign y[0] = (uf.u02 & vf.v13) | (uf.u13 & vf.v024);
  assign y[1] = ((uf.u23 & vf.v04) | (uf.u12 & vf.v1)) |
                ((uf.u01 & vf.v2)  | (uf.u03 & vf.v3));
  assign y[2] = ((uf.u23 & vf.v234) | (uf.u123 & vf.v34)) |
                ((uf.u3 & vf.v1234) | vf.v4);
endmodule
