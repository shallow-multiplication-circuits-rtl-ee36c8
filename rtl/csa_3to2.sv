// csa_3to2 -- carry-save adder reducing three numbers to two: a+b+c = u+v.
//
// One FA3 per bit position i takes a[i], b[i], c[i]; its sum bit is u[i] and
// its carry bit is v[i+1].  v[0] is 0.  No carry travels between positions, so
// the delay does not depend on WIDTH (2 for u, 3 for v in the unit-delay gate
// model; 4 and 3 with AND_LIKE = 1, which builds the FA3s without XOR gates).
// Purely combinational.  WIDTH is free; the default is this design's choice.
module csa_3to2 #(
  parameter int unsigned WIDTH    = 32,
  parameter bit          AND_LIKE = 1'b0
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  output logic [WIDTH-1:0] u,   // sum bits
  output logic [WIDTH:0]   v    // carry bits, shifted up by one
);
  logic [WIDTH-1:0] carry;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder #(.AND_LIKE(AND_LIKE)) u_fa (
      .a (a[i]),
      .b (b[i]),
      .ci(c[i]),
      .s (u[i]),
      .co(carry[i])
    );
  end

  assign v = {carry, 1'b0};
endmodule
