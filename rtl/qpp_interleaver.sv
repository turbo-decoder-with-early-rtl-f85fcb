// Interleaver of one MAP decoder.
//
// Holds a forward and a backward QPP address generator. During the forward
// recursion of a window the forward generator supplies the interleaved
// addresses; in its last step the forward generator's next pi and g seed
// the backward generator, which then supplies the same addresses in
// reverse order for the backward recursion. The forward generator simply
// continues into the next window. dir selects the output: 0 forward,
// 1 backward. Timing: see qpp_fwd_gen and qpp_bwd_gen.
module qpp_interleaver
  import tdec_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          init,      // start of a half iteration
  input  logic          fwd_step,
  input  logic          bwd_init,  // together with the last fwd_step of a window
  input  logic          bwd_step,
  input  logic          dir,
  input  logic [AW-1:0] k,
  input  logic [AW-1:0] pi0,
  input  logic [AW-1:0] g0,
  input  logic [AW-1:0] z,
  output logic [AW-1:0] addr
);
  logic [AW-1:0] f_addr, f_pi_nxt, f_g_nxt, b_addr;

  qpp_fwd_gen u_fwd (
    .clk, .rst_n, .init, .step(fwd_step), .k, .pi0, .g0, .z,
    .addr(f_addr), .g(), .pi_nxt(f_pi_nxt), .g_nxt(f_g_nxt)
  );

  qpp_bwd_gen u_bwd (
    .clk, .rst_n, .init(bwd_init), .step(bwd_step), .k,
    .pi0(f_pi_nxt), .g0(f_g_nxt), .z, .addr(b_addr)
  );

  assign addr = dir ? b_addr : f_addr;
endmodule
