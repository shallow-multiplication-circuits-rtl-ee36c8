// tb_csa_6to3 -- CSA 6->3 at WIDTH 16, both merge-gate forms: random and
// extreme operands; checks u + v + w = a+b+c+d+e+f exactly, the constant
// zero positions v[0] and w[1], and that f[0] is passed to w[0].
module tb_csa_6to3;
  localparam int W = 16;
  logic [W-1:0] a, b, c, d, e, f, u0, u1;
  logic [W:0]   v0, v1;
  logic [W+1:0] w0, w1;
  int checks = 0, failures = 0;

  csa_6to3 #(.WIDTH(W), .MERGE_WITH_OR(1'b0)) dut_xor (
    .a(a), .b(b), .c(c), .d(d), .e(e), .f(f), .u(u0), .v(v0), .w(w0));
  csa_6to3 #(.WIDTH(W), .MERGE_WITH_OR(1'b1)) dut_or (
    .a(a), .b(b), .c(c), .d(d), .e(e), .f(f), .u(u1), .v(v1), .w(w1));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(string tag, logic [W-1:0] u, logic [W:0] v,
                           logic [W+1:0] w);
    longint exp, got;
    exp = longint'(a) + longint'(b) + longint'(c) + longint'(d) +
          longint'(e) + longint'(f);
    got = longint'(u) + longint'(v) + longint'(w);
    checks++;
    if (exp != got || v[0] || w[1] || w[0] != f[0]) begin
      failures++;
      $display("FAIL %s: sum %0d, u+v+w %0d (v=%h w=%h)", tag, exp, got, v, w);
    end
  endtask

  task automatic apply(input logic [W-1:0] ia, ib, ic, id, ie, i_f);
    a = ia; b = ib; c = ic; d = id; e = ie; f = i_f;
    #1;
    check_one("xor", u0, v0, w0);
    check_one("or",  u1, v1, w1);
  endtask

  initial begin
    apply('0, '0, '0, '0, '0, '0);
    apply('1, '1, '1, '1, '1, '1);
    apply('0, '0, '0, '0, '0, '1);
    apply('1, '1, '1, '1, '1, '0);
    for (int i = 0; i < 3000; i++)
      apply(W'($urandom), W'($urandom), W'($urandom),
            W'($urandom), W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
