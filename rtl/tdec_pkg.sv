// Shared types, widths and trellis helpers of the LTE turbo decoder.
//
// Number formats follow the decoder description: channel soft values are
// 4-bit signed integers, state metrics are 10-bit modulo-normalised values
// and the extrinsic LLR is a 7-bit signed integer stored together with one
// status bit (the "frozen" flag of the early stopping criterion).
//
// The trellis is the 8-state recursive systematic convolutional code of LTE
// (feedback 1+D^2+D^3, feed-forward 1+D+D^3). A state is written
// {s1,s2,s3}, s1 being the most recent register. Branch b = 2*s'+u leaves
// state s' with information bit u. These indexing conventions are this
// design's own.
//
// The control bundle (ctrl_t) is broadcast by the sequencer to every MAP
// decoder. Its index fields have fixed widths large enough for the largest
// LTE block (6144 bits) and windows of up to 128 steps.
package tdec_pkg;

  localparam int Y_W   = 4;            // channel soft value width
  localparam int LE_W  = 7;            // extrinsic LLR width
  localparam int SM_W  = 10;           // state metric width (modulo)
  localparam int S_W   = LE_W + 1;     // ys + Lu
  localparam int G_W   = LE_W + 2;     // branch metric
  localparam int AG_W  = SM_W + 1;     // A+Gamma, relative to state 0
  localparam int LAM_W = AG_W + 2;     // a-posteriori LLR from the LLRU
  localparam int N_ST  = 8;            // trellis states
  localparam int N_BR  = 16;           // trellis branches

  // fixed widths of control fields
  localparam int AW   = 13;            // block index, covers 6144
  localparam int LW   = 7;             // position in a window, windows <= 128
  localparam int NWW  = 8;             // window number

  typedef logic signed [Y_W-1:0]   soft_t;
  typedef logic signed [LE_W-1:0]  llr_t;
  typedef logic signed [S_W-1:0]   sys_t;
  typedef logic signed [G_W-1:0]   gamma_t;
  typedef logic        [SM_W-1:0]  sm_t;
  typedef logic signed [AG_W-1:0]  ag_t;
  typedef logic signed [LAM_W-1:0] lam_t;

  typedef sm_t    [N_ST-1:0] smv_t;    // one set of 8 state metrics
  typedef ag_t    [N_BR-1:0] agv_t;    // one set of 16 A+Gamma terms
  typedef gamma_t [3:0]      gv_t;     // branch metric, index {u,p}

  // one word of the LLR memory
  typedef struct packed {
    logic status;
    llr_t le;
  } llr_word_t;

  // one entry of the a-priori buffer of a MAP decoder
  typedef struct packed {
    logic  status;
    llr_t  lu;
    soft_t ys;
    soft_t yp;
  } apri_t;

  typedef struct packed {
    logic            half_type;    // 0: natural order, 1: interleaved
    logic            last_half;    // no extrinsic write-back
    logic            use_stake;    // beta stakes hold last iteration's values
    logic            gen_init;     // load the forward address generators
    logic            fwd_issue;    // read issue of step j_issue
    logic [AW-1:0]   j_issue;
    logic            fwd_en;       // forward step, data of fwd_loc arrives
    logic            fwd_first;    // first step of the sub-block
    logic            fwd_last;     // last step of a window
    logic [LW-1:0]   fwd_loc;
    logic            bwd_gen_init; // load the backward address generators
    logic            bwd_rd;       // window buffer read of bwd_rd_loc
    logic [LW-1:0]   bwd_rd_loc;
    logic            bwd_en;       // backward step of block index j_bwd
    logic            bwd_first;
    logic            bwd_last;
    logic [AW-1:0]   j_bwd;
    logic [NWW-1:0]  win;          // current window
    logic [NWW-1:0]  nwin_m1;      // number of windows - 1
  } ctrl_t;

  // trellis: next state and parity bit of branch (s', u)
  function automatic logic [2:0] tr_next(input logic [2:0] s, input logic u);
    logic a;
    a = u ^ s[1] ^ s[0];
    return {a, s[2], s[1]};
  endfunction

  function automatic logic tr_par(input logic [2:0] s, input logic u);
    logic a;
    a = u ^ s[1] ^ s[0];
    return a ^ s[2] ^ s[0];
  endfunction

  // Modified comparison rule of modulo normalisation:
  // 1 when m2 is the larger of two wrapped metrics.
  function automatic logic mod_lt(input sm_t m1, input sm_t m2);
    return m1[SM_W-1] ^ m2[SM_W-1] ^ (m1[SM_W-2:0] < m2[SM_W-2:0]);
  endfunction

  // Saturate a wide signed value to the extrinsic LLR range.
  function automatic llr_t sat_llr(input logic signed [LAM_W:0] v);
    if (v > $signed((LAM_W+1)'(2**(LE_W-1) - 1)))  return llr_t'(2**(LE_W-1) - 1);
    if (v < -$signed((LAM_W+1)'(2**(LE_W-1))))     return llr_t'(-(2**(LE_W-1)));
    return llr_t'(v);
  endfunction

endpackage
