// tb_csa_3to2 -- CSA 3->2 at WIDTH 16, XOR and AND-like forms: random and
// extreme operands; checks u + v = a + b + c exactly (no bit lost) and
// v[0] = 0.
module tb_csa_3to2;
  localparam int W = 16;
  logic [W-1:0] a, b, c, u;
  logic [W:0]   v;
  logic [W-1:0] u_al;
  logic [W:0]   v_al;
  int checks = 0, failures = 0;

  csa_3to2 #(.WIDTH(W)) dut (.a(a), .b(b), .c(c), .u(u), .v(v));
  csa_3to2 #(.WIDTH(W), .AND_LIKE(1'b1)) dut_al (
    .a(a), .b(b), .c(c), .u(u_al), .v(v_al));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] ia, ib, ic);
    longint exp, got;
    a = ia; b = ib; c = ic;
    #1;
    exp = longint'(ia) + longint'(ib) + longint'(ic);
    got = longint'(u) + longint'(v);
    checks++;
    if (exp != got || v[0] != 1'b0) begin
      failures++;
      $display("FAIL %h+%h+%h: u=%h v=%h", ia, ib, ic, u, v);
    end
    got = longint'(u_al) + longint'(v_al);
    checks++;
    if (exp != got || v_al[0] != 1'b0) begin
      failures++;
      $display("FAIL AND-like %h+%h+%h: u=%h v=%h", ia, ib, ic, u_al, v_al);
    end
  endtask

  initial begin
    apply('0, '0, '0);
    apply('1, '1, '1);
    apply('1, '0, '1);
    for (int i = 0; i < 3000; i++)
      apply(W'($urandom), W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
