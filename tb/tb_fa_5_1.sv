// tb_fa_5_1 -- exhaustive check of the FA_{5,1}, in both forms of its three
// merge gates (XOR and OR): y = x1+..+x5 + 2*x6 for all 64 inputs.
module tb_fa_5_1;
  logic [4:0] x;
  logic       x6;
  logic [2:0] y_xor, y_or;
  int checks = 0, failures = 0;

  fa_5_1 #(.MERGE_WITH_OR(1'b0)) dut_xor (.x(x), .x6(x6), .y(y_xor));
  fa_5_1 #(.MERGE_WITH_OR(1'b1)) dut_or  (.x(x), .x6(x6), .y(y_or));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      int exp;
      {x6, x} = 6'(i);
      #1;
      exp = $countones(x) + 2 * int'(x6);
      checks += 2;
      if (int'(y_xor) != exp) begin
        failures++;
        $display("FAIL xor form x=%b x6=%b -> %0d, expected %0d", x, x6, y_xor, exp);
      end
      if (int'(y_or) != exp) begin
        failures++;
        $display("FAIL or form x=%b x6=%b -> %0d, expected %0d", x, x6, y_or, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
