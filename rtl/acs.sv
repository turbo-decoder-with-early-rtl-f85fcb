// Add-compare-select unit of the state metric unit.
//
// Adds a branch metric to each of two state metrics and keeps the larger
// sum. Metrics are modulo-normalised: they wrap freely in SM_W bits and the
// comparison uses the modified rule z = MSB1 ^ MSB2 ^ (low1 < low2), which
// gives the right answer as long as the two sums differ by less than half the
// modulo range. Combinational.
module acs
  import tdec_pkg::*;
(
  input  sm_t    sm1,
  input  gamma_t bm1,
  input  sm_t    sm2,
  input  gamma_t bm2,
  output sm_t    survivor
);
  sm_t m1, m2;

  always_comb begin
    m1 = sm1 + sm_t'(bm1);
    m2 = sm2 + sm_t'(bm2);
    survivor = mod_lt(m1, m2) ? m2 : m1;
  end
endmodule
