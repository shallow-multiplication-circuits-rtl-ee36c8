// partial_products -- the N numbers whose sum is the product a * b.
//
// Number i is a AND b[i], shifted left by i, in a 2N-bit word: one row of
// N two-input AND gates per multiplier bit, so all partial products are ready
// after one gate delay.  Unsigned operands.  Purely combinational.  The
// document reduces multiplication to adding N numbers; forming them with AND
// gates is the standard way and this design's choice.
module partial_products #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] pp [N]
);
  for (genvar i = 0; i < N; i++) begin : g_row
    logic [N-1:0] row;
    assign row   = a & {N{b[i]}};
    assign pp[i] = {{N{1'b0}}, row} << i;
  end
endmodule
