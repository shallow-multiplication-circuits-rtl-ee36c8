// csa_network -- carry-save network: reduces the sum of N_IN numbers to the
// sum of two, with a delay that grows with the logarithm of N_IN.
//
// The network is planned at elaboration time by shallow_pkg::csa_schedule():
// time is walked forward in gate delays, and at every time as many copies of
// the main unit (CSA 6->3 or CSA 11->4, by KIND) are "based" as there are
// numbers ready for their input slots, each slot taking a number that is ready
// by the slot's own input time.  Outputs become new numbers, ready when the
// unit produces them, and may feed other units at once.  When fewer numbers
// remain than the main unit takes, CSA 3->2 units bring them down to two;
// in a CSA 11->4 network they are built from AND-like gates only, like the
// rest of it.
// All numbers are WIDTH bits and the network works modulo 2^WIDTH: bits a
// unit carries above WIDTH are dropped, so sum0 + sum1 = sum of in[] modulo
// 2^WIDTH.
//
// Every number lives in one slot of the array `pool`: inputs first, then the
// outputs of the units in the order they were placed.  The time at which
// sum0/sum1 are ready, in gate delays, is the localparam DEPTH.
//
// Purely combinational.  Basing units as early as their slot times allow is
// the construction principle of the published networks; the greedy order in
// which this implementation places them, and the CSA 3->2 tail, are this
// design's own choices.
module csa_network #(
  parameter shallow_pkg::csa_kind_e KIND          = shallow_pkg::CSA_6TO3,
  parameter int unsigned            N_IN          = 32,
  parameter int unsigned            WIDTH         = 64,
  parameter bit                     MERGE_WITH_OR = 1'b0
) (
  input  logic [WIDTH-1:0] in [N_IN],
  output logic [WIDTH-1:0] sum0,
  output logic [WIDTH-1:0] sum1
);
  import shallow_pkg::*;

  // The plan, computed once per network.
  localparam sched_tab_t TAB = csa_schedule(KIND, N_IN);
  localparam int NUNITS = TAB[T_NUNITS];
  localparam int NPOOL  = TAB[T_POOL];
  localparam int FIN0   = TAB[T_FIN0];
  localparam int FIN1   = TAB[T_FIN1];
  localparam int DEPTH  = TAB[T_DEPTH];

  initial begin
    assert (N_IN >= 1 && N_IN <= SCHED_MAX_IN)
      else $error("csa_network: N_IN must be 1..%0d", SCHED_MAX_IN);
  end

  logic [WIDTH-1:0] pool [NPOOL];

  for (genvar i = 0; i < N_IN; i++) begin : g_in
    assign pool[i] = in[i];
  end

  for (genvar j = 0; j < NUNITS; j++) begin : g_unit
    localparam int UK = TAB[rec(j, R_KIND)];
    if (UK == UNIT_6TO3) begin : g_6to3
      localparam int I0 = TAB[rec(j, R_IN + 0)];
      localparam int I1 = TAB[rec(j, R_IN + 1)];
      localparam int I2 = TAB[rec(j, R_IN + 2)];
      localparam int I3 = TAB[rec(j, R_IN + 3)];
      localparam int I4 = TAB[rec(j, R_IN + 4)];
      localparam int I5 = TAB[rec(j, R_IN + 5)];
      localparam int O0 = TAB[rec(j, R_OUT)];
      logic [WIDTH-1:0] u;
      logic [WIDTH:0]   v;
      logic [WIDTH+1:0] w;
      csa_6to3 #(.WIDTH(WIDTH), .MERGE_WITH_OR(MERGE_WITH_OR)) u_csa (
        .a(pool[I0]), .b(pool[I1]), .c(pool[I2]),
        .d(pool[I3]), .e(pool[I4]), .f(pool[I5]),
        .u(u), .v(v), .w(w)
      );
      assign pool[O0]   = u;
      assign pool[O0+1] = v[WIDTH-1:0];
      assign pool[O0+2] = w[WIDTH-1:0];
    end else if (UK == UNIT_11TO4) begin : g_11to4
      localparam int O0 = TAB[rec(j, R_OUT)];
      logic [WIDTH-1:0] xin [11];
      logic [WIDTH-1:0] y0;
      logic [WIDTH:0]   y1;
      logic [WIDTH+1:0] y2;
      logic [WIDTH+2:0] y3;
      for (genvar s = 0; s < 11; s++) begin : g_slot
        localparam int IS = TAB[rec(j, R_IN + s)];
        assign xin[s] = pool[IS];
      end
      csa_11to4 #(.WIDTH(WIDTH)) u_csa (
        .x(xin), .y0(y0), .y1(y1), .y2(y2), .y3(y3)
      );
      assign pool[O0]   = y0;
      assign pool[O0+1] = y1[WIDTH-1:0];
      assign pool[O0+2] = y2[WIDTH-1:0];
      assign pool[O0+3] = y3[WIDTH-1:0];
    end else begin : g_3to2
      localparam int I0 = TAB[rec(j, R_IN + 0)];
      localparam int I1 = TAB[rec(j, R_IN + 1)];
      localparam int I2 = TAB[rec(j, R_IN + 2)];
      localparam int O0 = TAB[rec(j, R_OUT)];
      logic [WIDTH-1:0] u;
      logic [WIDTH:0]   v;
      csa_3to2 #(.WIDTH(WIDTH), .AND_LIKE(UK == UNIT_3TO2_AND_LIKE)) u_csa (
        .a(pool[I0]), .b(pool[I1]), .c(pool[I2]), .u(u), .v(v)
      );
      assign pool[O0]   = u;
      assign pool[O0+1] = v[WIDTH-1:0];
    end
  end

  if (FIN0 >= 0) begin : g_fin0
    assign sum0 = pool[FIN0];
  end else begin : g_nofin0
    assign sum0 = '0;
  end
  if (FIN1 >= 0) begin : g_fin1
    assign sum1 = pool[FIN1];
  end else begin : g_nofin1
    assign sum1 = '0;
  end
endmodule
