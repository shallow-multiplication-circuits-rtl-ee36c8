// shallow_mult_top -- the two shallow multipliers side by side.
//
//   p_xor = a_xor * b_xor  built from CSA 6->3 units (FA_{5,1} slices), the
//                          faster design when XOR gates may be used;
//   p_and = a_and * b_and  built from CSA 11->4 units (FA_{7,4} slices), the
//                          faster design when only AND-like gates may be used.
//
// Both are unsigned N x N -> 2N-bit, purely combinational, and independent of
// each other.  N = 32 is this design's default; the construction works for
// any N from 3 to 128.
module shallow_mult_top #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]   a_xor,
  input  logic [N-1:0]   b_xor,
  output logic [2*N-1:0] p_xor,
  input  logic [N-1:0]   a_and,
  input  logic [N-1:0]   b_and,
  output logic [2*N-1:0] p_and
);
  shallow_multiplier #(.KIND(shallow_pkg::CSA_6TO3), .N(N)) u_mul_xor (
    .a(a_xor), .b(b_xor), .p(p_xor)
  );
  shallow_multiplier #(.KIND(shallow_pkg::CSA_11TO4), .N(N)) u_mul_and (
    .a(a_and), .b(b_and), .p(p_and)
  );
endmodule
