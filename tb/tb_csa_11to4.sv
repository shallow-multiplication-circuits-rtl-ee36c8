// tb_csa_11to4 -- CSA 11->4 at WIDTH 16: random and extreme operands; checks
// y0+y1+y2+y3 equals the sum of the eleven inputs exactly, and the constant
// zero positions y2[0], y3[1:0].
module tb_csa_11to4;
  localparam int W = 16;
  logic [W-1:0] x [11];
  logic [W-1:0] y0;
  logic [W:0]   y1;
  logic [W+1:0] y2;
  logic [W+2:0] y3;
  int checks = 0, failures = 0;

  csa_11to4 #(.WIDTH(W)) dut (.x(x), .y0(y0), .y1(y1), .y2(y2), .y3(y3));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_now();
    longint exp, got;
    exp = 0;
    for (int j = 0; j < 11; j++) exp += longint'(x[j]);
    got = longint'(y0) + longint'(y1) + longint'(y2) + longint'(y3);
    checks++;
    if (exp != got || y2[0] || y3[1:0] != 2'b00) begin
      failures++;
      $display("FAIL sum %0d, outputs add to %0d", exp, got);
    end
  endtask

  initial begin
    for (int j = 0; j < 11; j++) x[j] = '0;
    #1 check_now();
    for (int j = 0; j < 11; j++) x[j] = '1;
    #1 check_now();
    for (int j = 0; j < 11; j++) x[j] = (j >= 7) ? W'(1) : W'(0);
    #1 check_now();
    for (int i = 0; i < 3000; i++) begin
      for (int j = 0; j < 11; j++) x[j] = W'($urandom);
      #1 check_now();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
