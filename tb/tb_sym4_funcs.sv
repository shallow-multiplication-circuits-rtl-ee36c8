// tb_sym4_funcs -- exhaustive check of the ten V_A functions: for every
// input, each V_A must be 1 exactly when x4+x5+x6+x7 is in A.
module tb_sym4_funcs;
  logic [3:0] x;
  shallow_pkg::v_funcs_t f;
  int checks = 0, failures = 0;

  sym4_funcs dut (.x(x), .f(f));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      int n;
      shallow_pkg::v_funcs_t exp;
      x = 4'(i);
      #1;
      n = $countones(x);
      exp.v1    = (n == 1);
      exp.v2    = (n == 2);
      exp.v3    = (n == 3);
      exp.v13   = (n == 1 || n == 3);
      exp.v4    = (n == 4);
      exp.v04   = (n == 0 || n == 4);
      exp.v34   = (n >= 3);
      exp.v024  = (n == 0 || n == 2 || n == 4);
      exp.v234  = (n >= 2);
      exp.v1234 = (n >= 1);
      checks++;
      if (f != exp) begin
        failures++;
        $display("FAIL x=%b: got %b expected %b", x, f, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
