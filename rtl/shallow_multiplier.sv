// shallow_multiplier -- unsigned N x N -> 2N-bit multiplier of logarithmic
// depth: partial products, a carry-save network, one carry look-ahead adder.
//
// The N partial products (partial_products) are reduced to two numbers by a
// csa_network built from CSA 6->3 units (KIND = CSA_6TO3, XOR and AND-like
// gates) or CSA 11->4 units (KIND = CSA_11TO4, AND-like gates only).  A
// cla_adder adds the two.  With CSA_11TO4 the network's CSA 3->2 tail and the
// final adder are also built without XOR gates, each XOR replaced by three
// AND-like gates of depth 2, so that the whole multiplier uses AND-like gates
// only.  All
// arithmetic is modulo 2^(2N), which loses nothing since a*b < 2^(2N).
//
// Purely combinational; p is valid one propagation delay after a and b.  In
// gate delays: 1 for the partial products, csa_network's DEPTH for the
// network, and about 2 + 2*log2(2N) for the final adder.
module shallow_multiplier #(
  parameter shallow_pkg::csa_kind_e KIND          = shallow_pkg::CSA_6TO3,
  parameter int unsigned            N             = 32,
  parameter bit                     MERGE_WITH_OR = 1'b0
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  logic [2*N-1:0] pp [N];
  logic [2*N-1:0] s0, s1;
  logic           co_unused;   // always 0: s0 + s1 = a * b < 2^(2N)

  partial_products #(.N(N)) u_pp (.a(a), .b(b), .pp(pp));

  csa_network #(
    .KIND(KIND), .N_IN(N), .WIDTH(2*N), .MERGE_WITH_OR(MERGE_WITH_OR)
  ) u_net (
    .in(pp), .sum0(s0), .sum1(s1)
  );

  cla_adder #(.WIDTH(2*N), .AND_LIKE(KIND == shallow_pkg::CSA_11TO4)) u_add (.a(s0), .b(s1), .s(p), .co(co_unused));
endmodule
