// Branch metric unit.
//
// Computes the four branch metrics of one trellis step from the systematic
// soft value ys, the parity soft value yp and the a-priori LLR lu. With
// codeword bits mapped to +1/-1, the metric of codeword (u,p) is
// u*(ys+lu) + p*yp; the common factor 1/2 of the log-domain formula is
// dropped (the LLR unit output is therefore twice the a-posteriori LLR).
// Codewords 11 and 10 are the negations of 00 and 01, so three adders are
// enough: s = ys+lu, T10 = s-yp, T00 = -s-yp, and T01 = -T10, T11 = -T00.
// Purely combinational. g is indexed by {u,p}.
module bmu
  import tdec_pkg::*;
(
  input  soft_t ys,
  input  soft_t yp,
  input  llr_t  lu,
  output sys_t  s,
  output gv_t   g
);
  gamma_t t10, t00;

  always_comb begin
    s   = sys_t'(ys) + sys_t'(lu);
    t10 = gamma_t'(s) - gamma_t'(yp);
    t00 = -gamma_t'(s) - gamma_t'(yp);
    g[2'b10] = t10;
    g[2'b01] = -t10;
    g[2'b00] = t00;
    g[2'b11] = -t00;
  end
endmodule
