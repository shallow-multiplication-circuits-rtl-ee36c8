// cla_adder -- carry look-ahead adder for the final addition: s = a + b
// modulo 2^WIDTH, with a delay that grows with log2(WIDTH).
//
// Parallel-prefix (Kogge-Stone) form.  Each bit first forms generate
// g = a and b and propagate p = a xor b.  Then ceil(log2(WIDTH)) levels
// combine (g, p) pairs over spans doubling each level:
//   G = G_hi | P_hi & G_lo,   P = P_hi & P_lo,
// after which G[i] is the carry out of bits 0..i, and s[i] = p[i] xor G[i-1].
// With AND_LIKE = 1 the two XOR levels (propagate and sum) are built as
// (x or y) and not (x and y), so the adder uses AND-like gates only, at two
// extra gate delays.  Purely combinational.  Only "a carry look-ahead adder"
// is asked for at this step; the Kogge-Stone prefix tree is this design's
// choice.
module cla_adder #(
  parameter int unsigned WIDTH    = 64,
  parameter bit          AND_LIKE = 1'b0
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] s,
  output logic             co     // carry out of the top bit
);
  localparam int LEVELS = (WIDTH > 1) ? $clog2(WIDTH) : 1;

  logic [WIDTH-1:0] g [LEVELS+1];
  logic [WIDTH-1:0] p [LEVELS+1];

  logic [WIDTH-1:0] carry_in;   // carry into each bit

  assign g[0] = a & b;
  if (AND_LIKE) begin : g_p_and_like
    assign p[0] = (a | b) & ~g[0];
  end else begin : g_p_xor
    assign p[0] = a ^ b;
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int SPAN = 1 << l;
    for (genvar i = 0; i < WIDTH; i++) begin : g_bit
      if (i >= SPAN) begin : g_comb
        assign g[l+1][i] = g[l][i] | (p[l][i] & g[l][i-SPAN]);
        assign p[l+1][i] = p[l][i] & p[l][i-SPAN];
      end else begin : g_pass
        assign g[l+1][i] = g[l][i];
        assign p[l+1][i] = p[l][i];
      end
    end
  end

  if (WIDTH > 1) begin : g_cin
    assign carry_in = {g[LEVELS][WIDTH-2:0], 1'b0};
  end else begin : g_cin0
    assign carry_in = '0;
  end
  if (AND_LIKE) begin : g_s_and_like
    assign s = (p[0] | carry_in) & ~(p[0] & carry_in);
  end else begin : g_s_xor
    assign s = p[0] ^ carry_in;
  end
  assign co = g[LEVELS][WIDTH-1];
endmodule
