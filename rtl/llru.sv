// Log-likelihood ratio unit.
//
// For every branch (s',u) -> s of one trellis step it adds the stored
// forward term A+Gamma to the backward metric B(s), then two compare-select
// trees pick the best branch with u=1 and with u=0, and their difference is
// the a-posteriori LLR (in the doubled scale of the branch metric unit).
// B arrives as wrapped SM_W-bit values; they are rebased to B(0) first so
// the sums are exact signed numbers (this design's own step). Combinational.
module llru
  import tdec_pkg::*;
(
  input  agv_t ag,
  input  smv_t b,
  output lam_t lam
);
  localparam int SUM_W = AG_W + 1;

  logic signed [N_ST-1:0][SUM_W-1:0] s1, s0;
  logic signed [SUM_W-1:0]           max1, max0;

  always_comb begin
    for (int sp = 0; sp < N_ST; sp++) begin
      for (int u = 0; u < 2; u++) begin
        logic [2:0] ns;
        sm_t        bd;
        logic signed [SUM_W-1:0] v;
        ns = tr_next(3'(sp), 1'(u));
        bd = b[ns] - b[0];
        v  = SUM_W'(ag[2*sp+u]) + SUM_W'($signed(bd));
        if (u == 1) s1[sp] = v;
        else        s0[sp] = v;
      end
    end
  end

  cs_max #(.N(N_ST), .W(SUM_W)) u_max1 (.d(s1), .max(max1));
  cs_max #(.N(N_ST), .W(SUM_W)) u_max0 (.d(s0), .max(max0));

  assign lam = lam_t'(max1) - lam_t'(max0);
endmodule
