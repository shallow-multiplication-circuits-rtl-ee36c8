// half_adder -- HA: the basic two-bit cell of the FA_{5,1}.
//
// The left output is the sum a XOR b (significance of the inputs), the right
// output the carry a AND b (one significance higher).  Purely combinational:
// one gate level, delay 1 in the unit-delay gate model.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,   // a xor b
  output logic c    // a and b
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
