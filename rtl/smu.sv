// State metric unit.
//
// Eight add-compare-select units in parallel compute one trellis step of
// either recursion:
//   forward  (bwd=0): A_k(s)    = max over branches (s',u)->s  of A_{k-1}(s') + G(u,p)
//   backward (bwd=1): B_{k-1}(s') = max over branches s'->(s,u) of B_k(s) + G(u,p)
// Metrics are SM_W-bit modulo values, never normalised explicitly.
// In the forward direction the unit also outputs, for each of the 16
// branches b = 2*s'+u, the term A_{k-1}(s') + G relative to A_{k-1}(0) as a
// true signed value (ag). Storing the rebased term instead of the wrapped
// one lets the LLR unit add it to B without modulo ambiguity; this
// rebasing is this design's own choice. Combinational.
module smu
  import tdec_pkg::*;
(
  input  logic bwd,
  input  smv_t sm_in,
  input  gv_t  g,
  output smv_t sm_out,
  output agv_t ag
);
  for (genvar st = 0; st < N_ST; st++) begin : g_acs
    // forward predecessors of state st, backward successors of state st
    localparam logic [2:0] P0 = 3'((st % 4) * 2);
    localparam logic [2:0] P1 = 3'((st % 4) * 2 + 1);
    localparam logic U0 = 1'(((st / 4) + st) % 2);
    localparam logic U1 = ~U0;
    localparam logic [2:0] N0 = tr_next(3'(st), 1'b0);
    localparam logic [2:0] N1 = tr_next(3'(st), 1'b1);
    localparam logic Q0 = tr_par(3'(st), 1'b0);
    localparam logic Q1 = tr_par(3'(st), 1'b1);
    localparam logic QF0 = tr_par(P0, U0);
    localparam logic QF1 = tr_par(P1, U1);

    sm_t    a1, a2;
    gamma_t b1, b2;

    always_comb begin
      if (bwd) begin
        a1 = sm_in[N0]; b1 = g[{1'b0, Q0}];
        a2 = sm_in[N1]; b2 = g[{1'b1, Q1}];
      end else begin
        a1 = sm_in[P0]; b1 = g[{U0, QF0}];
        a2 = sm_in[P1]; b2 = g[{U1, QF1}];
      end
    end

    acs u_acs (.sm1(a1), .bm1(b1), .sm2(a2), .bm2(b2), .survivor(sm_out[st]));
  end

  // rebased A+Gamma of every branch (forward only)
  for (genvar b = 0; b < N_BR; b++) begin : g_ag
    localparam logic [2:0] SP = 3'(b >> 1);
    localparam logic       UB = 1'(b % 2);
    localparam logic       PB = tr_par(SP, UB);
    sm_t diff;
    always_comb begin
      diff  = sm_in[SP] - sm_in[0];
      ag[b] = ag_t'($signed(diff)) + ag_t'(g[{UB, PB}]);
    end
  end
endmodule
