// csa_11to4 -- carry-save adder reducing eleven numbers to four, AND-like
// gates only:  x[0] + .. + x[10] = y0 + y1 + y2 + y3.
//
// Built from FA_{7,4} slices the way the CSA 6->3 is built from FA_{5,1}s.  The
// slice at bit position i takes bit i of x[0..6] as its seven significance-0
// inputs and bit i+1 of x[7..10] as its four significance-1 inputs (0 above
// the top bit), and drives y0[i], y1[i+1], y2[i+2] and y3[i+3].  Bit 0 of
// x[7..10] is left over: four bits of weight 1.  An extra slice at position -1,
// whose seven significance-0 inputs are 0, adds them; its y0 is always 0 and
// its other three outputs land in y1[0], y2[1] and y3[2].  y2[0], y3[0] and
// y3[1] are 0.
//
// Timing (unit-delay gate model, independent of WIDTH): x[1..6] needed at 0,
// x[0] at 1, x[7..10] at 2; y0 ready at 6, y3 at 8, y1 and y2 at 9.  Purely
// combinational.  WIDTH is free; its default is this design's choice.
module csa_11to4 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] x [11],
  output logic [WIDTH-1:0] y0,
  output logic [WIDTH:0]   y1,
  output logic [WIDTH+1:0] y2,
  output logic [WIDTH+2:0] y3
);
  logic [WIDTH-1:0] b1, b2, b3;
  logic [3:0]       low;          // slice at position -1

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    logic [6:0] xs;
    logic [3:0] xt;
    logic [3:0] y;
    for (genvar j = 0; j < 7; j++) begin : g_s
      assign xs[j] = x[j][i];
    end
    for (genvar j = 0; j < 4; j++) begin : g_t
      if (i + 1 < WIDTH) begin : g_in
        assign xt[j] = x[7+j][i+1];
      end else begin : g_top
        assign xt[j] = 1'b0;
      end
    end
    fa_7_4 u_fa (.xs(xs), .xt(xt), .y(y));
    assign y0[i] = y[0];
    assign b1[i] = y[1];
    assign b2[i] = y[2];
    assign b3[i] = y[3];
  end

  fa_7_4 u_fa_low (
    .xs(7'd0),
    .xt({x[10][0], x[9][0], x[8][0], x[7][0]}),
    .y (low)
  );
  // The position -1 slice adds only weight-2 bits, so its y0 is always 0.
  always_comb assert (low[0] == 1'b0);

  assign y1 = {b1, low[1]};
  assign y2 = {b2, low[2], 1'b0};
  assign y3 = {b3, low[3], 2'b00};
endmodule
