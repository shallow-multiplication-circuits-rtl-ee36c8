// tb_full_adder -- exhaustive check of FA3, in its XOR form and its AND-like
// form: 2*co + s = a + b + ci for all eight input combinations.
module tb_full_adder;
  logic a, b, ci, s, co, s_al, co_al;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));
  full_adder #(.AND_LIKE(1'b1)) dut_al (.a(a), .b(b), .ci(ci), .s(s_al), .co(co_al));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, ci} = 3'(i);
      #1;
      checks++;
      if ({co, s} != 2'($countones(i))) begin
        failures++;
        $display("FAIL a=%0b b=%0b ci=%0b -> co=%0b s=%0b", a, b, ci, co, s);
      end
      checks++;
      if ({co_al, s_al} != 2'($countones(i))) begin
        failures++;
        $display("FAIL AND-like a=%0b b=%0b ci=%0b -> co=%0b s=%0b", a, b, ci, co_al, s_al);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
