// tb_partial_products -- N = 12: every partial product must be a*b[i]
// shifted by i, and together they must add up to a*b.
module tb_partial_products;
  localparam int N = 12;
  logic [N-1:0]   a, b;
  logic [2*N-1:0] pp [N];
  int checks = 0, failures = 0;

  partial_products #(.N(N)) dut (.a(a), .b(b), .pp(pp));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [N-1:0] ia, ib);
    longint total;
    a = ia; b = ib;
    #1;
    total = 0;
    for (int i = 0; i < N; i++) begin
      longint exp;
      exp = ib[i] ? (longint'(ia) << i) : 0;
      total += longint'(pp[i]);
      checks++;
      if (longint'(pp[i]) != exp) begin
        failures++;
        $display("FAIL a=%h b=%h row %0d: %h", ia, ib, i, pp[i]);
      end
    end
    checks++;
    if (total != longint'(ia) * longint'(ib)) begin
      failures++;
      $display("FAIL a=%h b=%h: rows add to %h", ia, ib, total);
    end
  endtask

  initial begin
    apply('1, '1);
    apply('0, '1);
    for (int i = 0; i < 500; i++) apply(N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
