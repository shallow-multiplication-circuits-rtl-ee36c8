// tb_csa_network -- carry-save networks of several sizes (3 to 128 inputs,
// the largest supported) and both unit kinds, WIDTH 24: random and all-ones
// inputs; sum0 + sum1 must equal the sum of the inputs modulo 2^24.  Also checks that the planned depth grows
// no faster than the bound the units promise: a network of N inputs must be
// ready within about log(N)/log(lambda) + 10 gate delays, with lambda the
// unit's principal root (1.21486 for CSA 6->3, 1.15041 for CSA 11->4).
module tb_csa_network;
  import shallow_pkg::*;
  localparam int W = 24;
  int checks = 0, failures = 0;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_sum(string tag, int n, logic [W-1:0] in [],
                           logic [W-1:0] s0, logic [W-1:0] s1);
    logic [W-1:0] exp;
    exp = '0;
    for (int i = 0; i < n; i++) exp += in[i];
    checks++;
    if (W'(s0 + s1) != exp) begin
      failures++;
      $display("FAIL %s: expected %h got %h + %h", tag, exp, s0, s1);
    end
  endtask

  task automatic check_depth(string tag, int n, int depth, real lambda);
    real bound;
    bound = $ln(real'(n)) / $ln(lambda) + 10.0;
    checks++;
    $display("%s: N=%0d depth %0d gate delays (bound %0.1f)", tag, n, depth, bound);
    if (real'(depth) > bound) begin
      failures++;
      $display("FAIL %s: network too deep", tag);
    end
  endtask

  // One network under test per (kind, size).
  `define NET_INST(NAME, K, NN)                                              \
    logic [W-1:0] NAME``_in [NN];                                           \
    logic [W-1:0] NAME``_s0, NAME``_s1;                                     \
    csa_network #(.KIND(K), .N_IN(NN), .WIDTH(W)) NAME (                    \
      .in(NAME``_in), .sum0(NAME``_s0), .sum1(NAME``_s1));

  `NET_INST(n63_3,   CSA_6TO3,  3)
  `NET_INST(n63_7,   CSA_6TO3,  7)
  `NET_INST(n63_32,  CSA_6TO3,  32)
  `NET_INST(n63_100, CSA_6TO3,  100)
  `NET_INST(n114_11, CSA_11TO4, 11)
  `NET_INST(n114_32, CSA_11TO4, 32)
  `NET_INST(n114_100, CSA_11TO4, 100)
  `NET_INST(n63_128,  CSA_6TO3,  128)
  `NET_INST(n114_128, CSA_11TO4, 128)

  `define NET_RUN(NAME, NN, MODE)                                            \
    for (int i = 0; i < NN; i++)                                            \
      NAME``_in[i] = (MODE == 0) ? W'($urandom) : '1;                       \
    #1;                                                                     \
    begin                                                                   \
      logic [W-1:0] tmp [];                                                 \
      tmp = new[NN];                                                        \
      for (int i = 0; i < NN; i++) tmp[i] = NAME``_in[i];                   \
      check_sum(`"NAME`", NN, tmp, NAME``_s0, NAME``_s1);                   \
    end

  initial begin
    for (int r = 0; r < 300; r++) begin
      int mode;
      mode = (r == 0) ? 1 : 0;
      `NET_RUN(n63_3, 3, mode)
      `NET_RUN(n63_7, 7, mode)
      `NET_RUN(n63_32, 32, mode)
      `NET_RUN(n63_100, 100, mode)
      `NET_RUN(n114_11, 11, mode)
      `NET_RUN(n114_32, 32, mode)
      `NET_RUN(n114_100, 100, mode)
      `NET_RUN(n63_128, 128, mode)
      `NET_RUN(n114_128, 128, mode)
    end
    check_depth("6->3",  32,  n63_32.DEPTH,   1.21486);
    check_depth("6->3",  100, n63_100.DEPTH,  1.21486);
    check_depth("11->4", 32,  n114_32.DEPTH,  1.15041);
    check_depth("11->4", 100, n114_100.DEPTH, 1.15041);
    check_depth("6->3",  128, n63_128.DEPTH,  1.21486);
    check_depth("11->4", 128, n114_128.DEPTH, 1.15041);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
