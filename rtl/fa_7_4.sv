// fa_7_4 -- FA_{7,4} bit adder from AND-like gates only:
//   y = (x1+..+x7) + 2*(x8+x9+x10+x11) as a 4-bit number.
//
// Let S_A be the symmetric functions of s = (x1..x7) and T_A those of
// t = (x8..x11).  The total is s + 2t, so
//   y0 = S1357                                   (from the FA7)
//   y1 = S0145 T13 | S2367 T024                  (bit 1 of s, xor t odd)
//   y2 = (S4567 T04 | S2345 T1) | (S0123 T2 | S0167 T3)
//   y3 = (S234567 T34 | S67 T1234) | T234 (S4567 | T4)
// with S0145, S0167, S0123 the free complements of S2367, S2345, S4567 and
//   S234567 = U123 V1234 | (U23 | V234)
//   S67     = U23 V4 | U3 V34
//   S2345   = S234567 and not S67
//   S4567 | T4 = (U23 V234 | U123 V34) | ((U3 V1234 | V4) | T4)
// The last one folds T4 into the tree of S4567 so that y3 is not held up.
//
// Timing in the unit-delay gate model: x2..x7 needed at 0, x1 at 1, x8..x11 at
// 2; y0 ready at 6, y3 at 8, y1 and y2 at 9.  Purely combinational.  The
// formulas and the bracketing follow the published construction.
module fa_7_4 (
  input  logic [6:0] xs,   // xs[0..6] = x1..x7, significance 0
  input  logic [3:0] xt,   // xt[0..3] = x8..x11, significance 1
  output logic [3:0] y     // y[j] has significance j
);
  shallow_pkg::u_funcs_t uf;
  shallow_pkg::v_funcs_t vf, tf;
  logic [2:0] s_fa7;
  logic s1357, s2367, s4567, s0145, s0123, s0167;
  logic s234567, s67, s2345, s4567_t4;

  khrapchenko_fa7 u_fa7 (.x(xs), .y(s_fa7), .uf(uf), .vf(vf));
  sym4_funcs      u_t   (.x(xt), .f(tf));

  assign s1357 = s_fa7[0];
  assign s2367 = s_fa7[1];
  assign s4567 = s_fa7[2];
  assign s0145 = ~s2367;
  assign s0123 = ~s4567;

  assign s234567  = (uf.u123 & vf.v1234) | (uf.u23 | vf.v234);
  assign s67      = (uf.u23 & vf.v4) | (uf.u3 & vf.v34);
  assign s2345    = s234567 & ~s67;
  assign s0167    = ~s2345;
  assign s4567_t4 = ((uf.u23 & vf.v234) | (uf.u123 & vf.v34)) |
                    (((uf.u3 & vf.v1234) | vf.v4) | tf.v4);

  assign y[0] = s1357;
  assign y[1] = (s0145 & tf.v13) | (s2367 & tf.v024);
  assign y[2] = ((s4567 & tf.v04) | (s2345 & tf.v1)) |
                ((s0123 & tf.v2)  | (s0167 & tf.v3));
  assign y[3] = ((s234567 & tf.v34) | (s67 & tf.v1234)) |
                (tf.v234 & s4567_t4);
endmodule
