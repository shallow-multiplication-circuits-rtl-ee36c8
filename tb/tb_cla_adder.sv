// tb_cla_adder -- the prefix adder at its default width (64), in XOR and
// AND-like forms, and at an odd width (7, exhaustive): sum and carry out
// against the + operator, with full-length carry chains (all-ones plus one)
// among the vectors.
module tb_cla_adder;
  logic [63:0] a, b, s;
  logic        co;
  logic [63:0] s_al;
  logic        co_al;
  logic [6:0]  a7, b7, s7;
  logic        co7;
  int checks = 0, failures = 0;

  cla_adder dut (.a(a), .b(b), .s(s), .co(co));
  cla_adder #(.AND_LIKE(1'b1)) dut_al (.a(a), .b(b), .s(s_al), .co(co_al));
  cla_adder #(.WIDTH(7)) dut7 (.a(a7), .b(b7), .s(s7), .co(co7));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [63:0] ia, ib);
    logic [64:0] exp;
    a = ia; b = ib;
    #1;
    exp = {1'b0, ia} + {1'b0, ib};
    checks++;
    if ({co, s} != exp) begin
      failures++;
      $display("FAIL %h + %h = %h, got %b %h", ia, ib, exp, co, s);
    end
    checks++;
    if ({co_al, s_al} != exp) begin
      failures++;
      $display("FAIL AND-like %h + %h = %h, got %b %h", ia, ib, exp, co_al, s_al);
    end
  endtask

  initial begin
    apply('1, 64'd1);
    apply('1, '1);
    apply(64'h7fff_ffff_ffff_ffff, 64'd1);
    apply('0, '0);
    for (int i = 0; i < 3000; i++)
      apply({$urandom, $urandom}, {$urandom, $urandom});
    for (int i = 0; i < 128; i++) begin
      for (int j = 0; j < 128; j++) begin
        a7 = 7'(i); b7 = 7'(j);
        #1;
        checks++;
        if ({co7, s7} != 8'(i + j)) begin
          failures++;
          $display("FAIL width 7: %0d + %0d -> %b %0d", i, j, co7, s7);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
