// tb_khrapchenko_fa7 -- exhaustive check of the FA7: for all 128 inputs the
// output must be the binary count of ones, and the U and V functions it
// brings out must match the counts of x1..x3 and x4..x7.
module tb_khrapchenko_fa7;
  logic [6:0] x;
  logic [2:0] y;
  shallow_pkg::u_funcs_t uf;
  shallow_pkg::v_funcs_t vf;
  int checks = 0, failures = 0;

  khrapchenko_fa7 dut (.x(x), .y(y), .uf(uf), .vf(vf));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 128; i++) begin
      int nu, nv;
      x = 7'(i);
      #1;
      nu = $countones(x[2:0]);
      nv = $countones(x[6:3]);
      checks += 3;
      if (int'(y) != nu + nv) begin
        failures++;
        $display("FAIL x=%b: y=%0d expected %0d", x, y, nu + nv);
      end
      if (uf.u23 != (nu >= 2) || uf.u13 != (nu == 1 || nu == 3)) begin
        failures++;
        $display("FAIL x=%b: U functions %b", x, uf);
      end
      if (vf.v234 != (nv >= 2) || vf.v4 != (nv == 4)) begin
        failures++;
        $display("FAIL x=%b: V functions %b", x, vf);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
