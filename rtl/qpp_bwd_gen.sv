// QPP interleaver address generator, backward direction.
//
// Produces the interleaved addresses in decreasing index order with
//   pi(i-1) = (pi(i) - g(i-1)) mod K,  g(i-1) = (g(i) - z) mod K.
// Each modulo is a subtraction followed by an add of K chosen by the sign.
// It is started with pi0 = pi(i), g0 = g(i) of the index just past the
// window (taken from the forward generator). pi0 and init pass through a
// delay register as in the document's figure: in the init cycle g becomes
// g(i-1); in the following cycle pi becomes pi(i) - g(i-1) = pi(i-1) and
// g becomes g(i-2). From then on addr holds pi(i-1) until step, and each
// step moves one index down. Which init copy steers the g multiplexer, and
// the step enable, are this design's choices.
module qpp_bwd_gen
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
  output logic [AW-1:0] addr
);
  function automatic logic [AW-1:0] sub_mod(input logic [AW-1:0] a, input logic [AW-1:0] b,
                                            input logic [AW-1:0] m);
    logic [AW:0] d, s;
    d = {1'b0, a} - {1'b0, b};
    s = d + {1'b0, m};
    return d[AW] ? s[AW-1:0] : d[AW-1:0];
  endfunction

  logic [AW-1:0] pi0_d, g;
  logic          init_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pi0_d  <= '0;
      init_d <= 1'b0;
      addr   <= '0;
      g      <= '0;
    end else begin
      pi0_d  <= pi0;
      init_d <= init;
      if (init)                g <= sub_mod(g0, z, k);
      else if (init_d || step) g <= sub_mod(g, z, k);
      if (init_d)              addr <= sub_mod(pi0_d, g, k);
      else if (step)           addr <= sub_mod(addr, g, k);
    end
  end
endmodule
