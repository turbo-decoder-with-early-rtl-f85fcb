// QPP interleaver address generator, forward direction.
//
// Produces pi(i), pi(i+1), ... of the LTE quadratic permutation polynomial
// pi(i) = (f1*i + f2*i^2) mod K without multipliers, by the recursion
//   pi(i+d) = (pi(i) + g(i)) mod K,  g(i+d) = (g(i) + z) mod K,  d = 1.
// Since pi, g < K each modulo is one add followed by a subtraction of K and
// a multiplexer steered by the sign of the difference. On init the adders
// take pi0/g0 instead of the registers, so the registers then hold
// (pi0+g0) mod K and (g0+z) mod K: the caller passes the values of the
// index before the first wanted one (pi(i0-1), g(i0-1)), and pi(i0) is on
// addr the cycle after init. step advances by one index; otherwise the
// registers hold. pi_nxt/g_nxt are the values the next step loads, used to
// start the backward generator. The structure follows the document; the
// step enable and the pi(i0-1) convention are this design's choices.
module qpp_fwd_gen
  import tdec_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          init,
  input  logic          step,
  input  logic [AW-1:0] k,
  input  logic [AW-1:0] pi0,
  input  logic [AW-1:0] g0,
  input  logic [AW-1:0] z,
  output logic [AW-1:0] addr,
  output logic [AW-1:0] g,
  output logic [AW-1:0] pi_nxt,
  output logic [AW-1:0] g_nxt
);
  function automatic logic [AW-1:0] add_mod(input logic [AW-1:0] a, input logic [AW-1:0] b,
                                            input logic [AW-1:0] m);
    logic [AW:0] s, d;
    s = {1'b0, a} + {1'b0, b};
    d = s - {1'b0, m};
    return d[AW] ? s[AW-1:0] : d[AW-1:0];
  endfunction

  logic [AW-1:0] pi_a, g_a;

  always_comb begin
    pi_a   = init ? pi0 : addr;
    g_a    = init ? g0  : g;
    pi_nxt = add_mod(pi_a, g_a, k);
    g_nxt  = add_mod(g_a, z, k);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr <= '0;
      g    <= '0;
    end else if (init || step) begin
      addr <= pi_nxt;
      g    <= g_nxt;
    end
  end
endmodule
