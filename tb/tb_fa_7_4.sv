// tb_fa_7_4 -- exhaustive check of the FA_{7,4}: for all 2048 inputs,
// y = (x1+..+x7) + 2*(x8+..+x11).
module tb_fa_7_4;
  logic [6:0] xs;
  logic [3:0] xt;
  logic [3:0] y;
  int checks = 0, failures = 0;

  fa_7_4 dut (.xs(xs), .xt(xt), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2048; i++) begin
      int exp;
      {xt, xs} = 11'(i);
      #1;
      exp = $countones(xs) + 2 * $countones(xt);
      checks++;
      if (int'(y) != exp) begin
        failures++;
        $display("FAIL xs=%b xt=%b: y=%0d expected %0d", xs, xt, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
