// tb_shallow_multiplier -- the multiplier with both carry-save unit kinds:
// N = 8 exhaustively (all 65536 operand pairs) and N = 13 on random and
// extreme operands, against the * operator.
module tb_shallow_multiplier;
  import shallow_pkg::*;
  logic [7:0]  a8, b8;
  logic [15:0] p8_63, p8_114;
  logic [12:0] a13, b13;
  logic [25:0] p13_63, p13_114, p13_or;
  int checks = 0, failures = 0;

  shallow_multiplier #(.KIND(CSA_6TO3),  .N(8))  m8_63   (.a(a8),  .b(b8),  .p(p8_63));
  shallow_multiplier #(.KIND(CSA_11TO4), .N(8))  m8_114  (.a(a8),  .b(b8),  .p(p8_114));
  shallow_multiplier #(.KIND(CSA_6TO3),  .N(13)) m13_63  (.a(a13), .b(b13), .p(p13_63));
  shallow_multiplier #(.KIND(CSA_11TO4), .N(13)) m13_114 (.a(a13), .b(b13), .p(p13_114));
  shallow_multiplier #(.KIND(CSA_6TO3),  .N(13), .MERGE_WITH_OR(1'b1)) m13_or (
    .a(a13), .b(b13), .p(p13_or));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply13(input logic [12:0] ia, ib);
    logic [25:0] exp;
    a13 = ia; b13 = ib;
    #1;
    exp = 26'(ia) * 26'(ib);
    checks += 3;
    if (p13_63 != exp || p13_114 != exp || p13_or != exp) begin
      failures++;
      $display("FAIL N=13 %0d*%0d: %0d %0d %0d", ia, ib, p13_63, p13_114, p13_or);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j);
        #1;
        checks += 2;
        if (p8_63 != 16'(i * j) || p8_114 != 16'(i * j)) begin
          failures++;
          $display("FAIL N=8 %0d*%0d: %0d %0d", i, j, p8_63, p8_114);
        end
      end
    end
    apply13('1, '1);
    apply13('1, 13'd1);
    apply13('0, '1);
    for (int i = 0; i < 5000; i++) apply13(13'($urandom), 13'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
