// tb_sym3_funcs -- exhaustive check of the eight U_A functions: for every
// input, each U_A must be 1 exactly when x1+x2+x3 is in A.
module tb_sym3_funcs;
  logic [2:0] x;
  shallow_pkg::u_funcs_t f;
  int checks = 0, failures = 0;

  sym3_funcs dut (.x(x), .f(f));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  initial begin
    for (int i = 0; i < 8; i++) begin
      int n;
      shallow_pkg::u_funcs_t exp;
      x = 3'(i);
      #1;
      n = $countones(x);
      exp.u3   = (n == 3);
      exp.u03  = (n == 0 || n == 3);
      exp.u13  = (n == 1 || n == 3);
      exp.u23  = (n >= 2);
      exp.u123 = (n >= 1);
      exp.u01  = (n <= 1);
      exp.u02  = (n == 0 || n == 2);
      exp.u12  = (n == 1 || n == 2);
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
