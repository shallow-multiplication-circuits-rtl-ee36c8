// tb_shallow_mult_top -- end-to-end test of both multipliers at the default
// size (32 x 32 -> 64 bits): random operands, operands with few and many ones,
// and corner values, against the * operator.
//
// It also counts how often the mechanisms particular to the carry-save units
// were exercised, and fails if one never was:
//   - the spare bit f[0] of a CSA 6->3 routed straight into w[0];
//   - the extra FA_{7,4} slice below bit 0 of a CSA 11->4 adding the four
//     weight-1 bits left over by the significance-1 inputs;
//   - a carry in the final carry look-ahead adder running through at least
//     16 consecutive bit positions.
module tb_shallow_mult_top;
  logic [31:0] a_xor, b_xor, a_and, b_and;
  logic [63:0] p_xor, p_and;
  int checks = 0, failures = 0;
  int n_f0_bypass = 0, n_low_slice = 0, n_long_xor = 0, n_long_and = 0;

  shallow_mult_top dut (
    .a_xor(a_xor), .b_xor(b_xor), .p_xor(p_xor),
    .a_and(a_and), .b_and(b_and), .p_and(p_and)
  );

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] operand(int mode);
    case (mode)
      0: return $urandom;
      1: return $urandom & $urandom & $urandom;   // few ones
      2: return $urandom | $urandom | $urandom;   // many ones
      default: return '1;
    endcase
  endfunction

  // Longest run of consecutive positions that receive a carry in x + y.
  function automatic int longest_carry_run(logic [63:0] x, logic [63:0] y);
    logic [63:0] carries;
    int run, best;
    carries = (x + y) ^ x ^ y;
    run = 0;
    best = 0;
    for (int i = 0; i < 64; i++) begin
      run = carries[i] ? run + 1 : 0;
      if (run > best) best = run;
    end
    return best;
  endfunction

  task automatic apply(input logic [31:0] ax, bx, aa, ba);
    logic [63:0] ex, ea;
    a_xor = ax; b_xor = bx; a_and = aa; b_and = ba;
    #1;
    ex = 64'(ax) * 64'(bx);
    ea = 64'(aa) * 64'(ba);
    checks += 2;
    if (p_xor != ex) begin
      failures++;
      $display("FAIL 6->3 multiplier: %h * %h = %h, got %h", ax, bx, ex, p_xor);
    end
    if (p_and != ea) begin
      failures++;
      $display("FAIL 11->4 multiplier: %h * %h = %h, got %h", aa, ba, ea, p_and);
    end
    if (dut.u_mul_xor.u_net.g_unit[0].g_6to3.u_csa.f[0]) n_f0_bypass++;
    if (dut.u_mul_and.u_net.g_unit[0].g_11to4.u_csa.low != 4'd0) n_low_slice++;
    if (longest_carry_run(dut.u_mul_xor.u_add.a, dut.u_mul_xor.u_add.b) >= 16)
      n_long_xor++;
    if (longest_carry_run(dut.u_mul_and.u_add.a, dut.u_mul_and.u_add.b) >= 16)
      n_long_and++;
  endtask

  initial begin
    apply('0, '0, '0, '0);
    apply('1, '1, '1, '1);
    apply('1, 32'd1, 32'd1, '1);
    apply(32'h8000_0000, 32'h8000_0000, 32'hffff_0000, 32'h0000_ffff);
    for (int i = 0; i < 20000; i++) begin
      int m;
      m = i % 3;
      apply(operand(m), operand(m), operand(m), operand(m));
    end
    $display("network depth: 6->3 %0d, 11->4 %0d gate delays",
             dut.u_mul_xor.u_net.DEPTH, dut.u_mul_and.u_net.DEPTH);
    $display("f[0] bypass %0d, low FA_{7,4} slice %0d, long carry %0d / %0d",
             n_f0_bypass, n_low_slice, n_long_xor, n_long_and);
    checks += 3;
    if (n_f0_bypass == 0) begin failures++; $display("FAIL f[0] bypass never used"); end
    if (n_low_slice == 0) begin failures++; $display("FAIL low slice never used"); end
    if (n_long_xor == 0 || n_long_and == 0) begin
      failures++;
      $display("FAIL no long carry chain in a final adder");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
