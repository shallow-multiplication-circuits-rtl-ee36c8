// csa_6to3 -- carry-save adder reducing six numbers to three:
//   a+b+c+d+e+f = u+v+w.
//
// One FA_{5,1} per bit position i.  Its five significance-0 inputs are a[i],
// b[i], c[i], d[i], e[i]; its significance-1 input is f[i+1] (0 above the top
// bit).  Its outputs go to u[i], v[i+1] and w[i+2].  The one bit of f left
// over, f[0], is placed in the free position w[0]; v[0] and w[1] are 0.
//
// Timing (unit-delay gate model, independent of WIDTH): a..d needed at 0, e at
// 2, f at 4; u ready at 3, v at 5, w at 6.  Purely combinational.  WIDTH is
// free; its default is this design's choice.
module csa_6to3 #(
  parameter int unsigned WIDTH         = 32,
  parameter bit          MERGE_WITH_OR = 1'b0
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  input  logic [WIDTH-1:0] d,
  input  logic [WIDTH-1:0] e,   // needed 2 gate delays after a..d
  input  logic [WIDTH-1:0] f,   // needed 4 gate delays after a..d
  output logic [WIDTH-1:0] u,
  output logic [WIDTH:0]   v,
  output logic [WIDTH+1:0] w
);
  logic [WIDTH-1:0] y1, y2;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    logic [2:0] y;
    logic       f_up;   // f[i+1]: significance 1 at this position
    if (i + 1 < WIDTH) begin : g_f
      assign f_up = f[i+1];
    end else begin : g_ftop
      assign f_up = 1'b0;
    end
    fa_5_1 #(.MERGE_WITH_OR(MERGE_WITH_OR)) u_fa (
      .x ({e[i], d[i], c[i], b[i], a[i]}),
      .x6(f_up),
      .y (y)
    );
    assign u[i]  = y[0];
    assign y1[i] = y[1];
    assign y2[i] = y[2];
  end

  assign v = {y1, 1'b0};
  assign w = {y2, 1'b0, f[0]};
endmodule
