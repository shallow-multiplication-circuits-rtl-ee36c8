// shallow_pkg -- types and elaboration-time helpers shared by the carry-save
// adder (CSA) family and the multipliers built from it.
//
// Timing is given in the unit-delay model of dyadic (two-input) Boolean gates:
// every gate has delay 1 and wires are free.  The input and output times of
// each CSA unit below are those of the bit adder it is built from:
//   CSA 6->3  (FA_{5,1}): inputs at 0,0,0,0,2,4   outputs at 3,5,6
//   CSA 11->4 (FA_{7,4}): inputs x1 at 1, x2..x7 at 0, x8..x11 at 2,
//                         outputs y0 at 6, y1 at 9, y2 at 9, y3 at 8
//   CSA 3->2  (FA3)     : inputs at 0,0,0        outputs at 2 (sum), 3 (carry)
//   CSA 3->2, AND-like  : inputs at 0,0,0        outputs at 4 (sum), 3 (carry)
// The first two come with the unit designs; the FA3 times follow from the
// gates of full_adder and are this design's assumption.  A CSA 11->4 network
// finishes with the AND-like CSA 3->2 so that it uses no XOR gate.  They are only used to order the network, never in logic.
//
// csa_schedule() plans a CSA network at elaboration time.  It walks time
// t = 0,1,2,... and at each t "bases" as many copies of the main unit as it
// can: a copy based at t needs, for each input slot with time x, a still unused
// number that is ready by t + x, and produces numbers ready at t + y.  Numbers
// are kept in a pool: the n inputs first, then the outputs of each unit in the
// order the units were placed.  Slots are filled latest-deadline first with
// the latest-ready number that fits, which keeps early numbers for early
// slots.  Once fewer numbers are left than the main unit takes, CSA 3->2 units
// finish the reduction down to two numbers.
package shallow_pkg;

  // Which carry-save unit a network is built from.
  typedef enum logic [1:0] {
    CSA_6TO3  = 2'd0,   // FA_{5,1} slices, XOR and AND-like gates
    CSA_11TO4 = 2'd1    // FA_{7,4} slices, AND-like gates only
  } csa_kind_e;

  // Symmetric functions of three bits u = (x1,x2,x3): U_A = 1 iff sum(u) in A.
  typedef struct packed {
    logic u3;
    logic u03;
    logic u13;
    logic u23;
    logic u123;
    logic u01;
    logic u02;
    logic u12;
  } u_funcs_t;

  // Symmetric functions of four bits v = (x4..x7) (and t = (x8..x11)).
  typedef struct packed {
    logic v1;
    logic v2;
    logic v3;
    logic v13;
    logic v4;
    logic v04;
    logic v34;
    logic v024;
    logic v234;
    logic v1234;
  } v_funcs_t;

  // Unit types placed by the scheduler.
  localparam int UNIT_6TO3  = 0;
  localparam int UNIT_11TO4 = 1;
  localparam int UNIT_3TO2  = 2;
  localparam int UNIT_3TO2_AND_LIKE = 3;

  // Largest number of inputs a scheduled network may take, and the most
  // units such a network can need (every unit removes at least one number).
  localparam int SCHED_MAX_IN    = 128;
  localparam int SCHED_MAX_POOL  = 6 * SCHED_MAX_IN;
  localparam int SCHED_MAX_UNITS = SCHED_MAX_IN;

  // Layout of the schedule table built by csa_schedule():
  //   [T_NUNITS] number of units, [T_POOL] pool size, [T_FIN0], [T_FIN1]
  //   pool indices of the two final numbers (-1 if none), [T_DEPTH] time at
  //   which they are ready; then one record of T_REC entries per unit:
  //   [R_KIND] unit type, [R_BASE] time it is based at, [R_OUT] pool index of
  //   its first output (the others follow), [R_IN + s] pool index feeding
  //   input slot s.
  localparam int T_NUNITS = 0;
  localparam int T_POOL   = 1;
  localparam int T_FIN0   = 2;
  localparam int T_FIN1   = 3;
  localparam int T_DEPTH  = 4;
  localparam int T_UNITS  = 5;
  localparam int R_KIND   = 0;
  localparam int R_BASE   = 1;
  localparam int R_OUT    = 2;
  localparam int R_IN     = 3;
  localparam int T_REC    = 14;
  localparam int SCHED_TAB = T_UNITS + T_REC * SCHED_MAX_UNITS;

  typedef int sched_tab_t [SCHED_TAB];

  // Index of entry `field` of unit `u`'s record in the schedule table.
  function automatic int rec(int u, int field);
    return T_UNITS + T_REC * u + field;
  endfunction

  function automatic int unit_inputs(int uk);
    case (uk)
      UNIT_6TO3:  return 6;
      UNIT_11TO4: return 11;
      default:    return 3;
    endcase
  endfunction

  function automatic int unit_outputs(int uk);
    case (uk)
      UNIT_6TO3:  return 3;
      UNIT_11TO4: return 4;
      default:    return 2;
    endcase
  endfunction

  function automatic int unit_in_time(int uk, int s);
    case (uk)
      UNIT_6TO3:  return (s < 4) ? 0 : (s == 4) ? 2 : 4;
      UNIT_11TO4: return (s == 0) ? 1 : (s < 7) ? 0 : 2;
      default:    return 0;
    endcase
  endfunction

  function automatic int unit_out_time(int uk, int s);
    case (uk)
      UNIT_6TO3:          return (s == 0) ? 3 : (s == 1) ? 5 : 6;
      UNIT_11TO4:         return (s == 0) ? 6 : (s == 3) ? 8 : 9;
      UNIT_3TO2_AND_LIKE: return (s == 0) ? 4 : 3;
      default:            return (s == 0) ? 2 : 3;
    endcase
  endfunction

  function automatic int main_unit(csa_kind_e kind);
    return (kind == CSA_11TO4) ? UNIT_11TO4 : UNIT_6TO3;
  endfunction

  // The CSA 3->2 that finishes a network of the given kind.
  function automatic int tail_unit(csa_kind_e kind);
    return (kind == CSA_11TO4) ? UNIT_3TO2_AND_LIKE : UNIT_3TO2;
  endfunction

  // Greedy time-driven network construction; see the header.  Returns the
  // whole plan as a table laid out as described above.
  function automatic sched_tab_t csa_schedule(csa_kind_e kind, int n);
    sched_tab_t tab;
    int  ready [SCHED_MAX_POOL];
    bit  used  [SCHED_MAX_POOL];
    int  pick  [11];
    int  np, count, nu, t, uk, k, l, best, fin, depth;
    bit  ok;
    tab[T_NUNITS] = 0;
    tab[T_FIN0]   = -1;
    tab[T_FIN1]   = -1;
    np    = n;
    count = n;
    nu    = 0;
    t     = 0;
    for (int i = 0; i < n; i++) begin
      ready[i] = 0;
      used[i]  = 1'b0;
    end
    while (count > 2) begin
      uk = (count >= unit_inputs(main_unit(kind))) ? main_unit(kind) : tail_unit(kind);
      k  = unit_inputs(uk);
      l  = unit_outputs(uk);
      ok = 1'b1;
      for (int s = 0; s < 11; s++) pick[s] = -1;
      // Fill slots latest input time first.
      for (int tt = 4; tt >= 0; tt--) begin
        for (int s = 0; s < k; s++) begin
          if (unit_in_time(uk, s) == tt) begin
            best = -1;
            for (int i = 0; i < np; i++) begin
              if (!used[i] && ready[i] <= t + tt &&
                  (best < 0 || ready[i] > ready[best]))
                best = i;
            end
            if (best < 0) ok = 1'b0;
            else begin
              used[best] = 1'b1;
              pick[s]    = best;
            end
          end
        end
      end
      if (ok) begin
        tab[rec(nu, R_KIND)] = uk;
        tab[rec(nu, R_BASE)] = t;
        tab[rec(nu, R_OUT)]  = np;
        for (int s = 0; s < 11; s++) tab[rec(nu, R_IN + s)] = pick[s];
        for (int s = 0; s < l; s++) begin
          ready[np + s] = t + unit_out_time(uk, s);
          used[np + s]  = 1'b0;
        end
        np    = np + l;
        nu    = nu + 1;
        count = count + l - k;
      end else begin
        for (int s = 0; s < k; s++)
          if (pick[s] >= 0) used[pick[s]] = 1'b0;
        t = t + 1;
      end
    end
    // The (at most two) numbers left over are the network's result.
    fin   = 0;
    depth = 0;
    for (int i = 0; i < np; i++) begin
      if (!used[i]) begin
        if (fin == 0) tab[T_FIN0] = i;
        if (fin == 1) tab[T_FIN1] = i;
        if (ready[i] > depth) depth = ready[i];
        fin = fin + 1;
      end
    end
    tab[T_NUNITS] = nu;
    tab[T_POOL]   = np;
    tab[T_DEPTH]  = depth;
    return tab;
  endfunction

endpackage
