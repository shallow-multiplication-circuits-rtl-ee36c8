// full_adder -- FA3: adds three bits of significance 0 into a sum bit
// (significance 0) and a carry bit (significance 1).
//
// The cell is only named as the building block of a CSA 3->2; its gates here
// are the usual ones.  With AND_LIKE = 0:
//   s  = (a xor b) xor ci                 depth 2
//   co = (a and b) or (ci and (a xor b))  depth 3
// With AND_LIKE = 1 no XOR gate is used, for circuits restricted to AND-like
// gates: each XOR becomes (x or y) and not (x and y), three AND-like gates of
// depth 2, and the carry is the majority (a and b) or (ci and (a or b)):
//   s depth 4, co depth 3.
// Purely combinational.
module full_adder #(
  parameter bit AND_LIKE = 1'b0
) (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  logic p;
  if (AND_LIKE) begin : g_and_like
    assign p  = (a | b) & ~(a & b);
    assign s  = (p | ci) & ~(p & ci);
    assign co = (a & b) | (ci & (a | b));
  end else begin : g_xor
    assign p  = a ^ b;
    assign s  = p ^ ci;
    assign co = (a & b) | (ci & p);
  end
endmodule
