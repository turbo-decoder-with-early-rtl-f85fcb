// Max-log-MAP decoder (one SISO component decoder) with sliding window.
//
// The sub-block is processed window by window: a forward recursion over
// the window (one trellis step per cycle) followed by a backward recursion
// over the same window in reverse order.
//
// Forward step (ctrl.fwd_en): the branch metric unit turns ys, yp and the
// a-priori LLR lu into branch metrics, the state metric unit advances A,
// the 16 A+Gamma terms are written to the A+Gamma memory and the inputs to
// the a-priori buffer (so the backward recursion needs no access to the
// shared memories). A bit whose status bit is set is frozen: its A+Gamma
// terms are not stored, and in the backward recursion the A+Gamma memory is
// not read for it (a 1-bit flag per window position, kept in flip-flops,
// tells the read side in time).
// Backward step (ctrl.bwd_en, one cycle after ctrl.bwd_rd): the buffered
// inputs give the branch metrics again, the state metric unit advances B,
// the LLR unit combines A+Gamma with B into the a-posteriori LLR lam, and
// the extrinsic LLR is Le = 0.75 * (lam/2 - (ys + lu)), the 0.75 made of
// a shift by one plus a shift by two, saturated to 7 bits.
// The hard decision is lam > 0, or for a frozen bit the sign of ys + lu.
//
// Initial metrics: A starts at state 0 in sub-block 0 and uniform in the
// others. B at the end of a window starts at 0 in the first iteration and
// from the beta stakes memory later: the B reached at the start of window
// w is stored as the end value of window w-1 for the next half iteration of
// the same kind, and the one reached at the start of window 0 is handed to
// the neighbouring decoder (nb_beta_in, nb_out) for its last window.
// Likewise the A reached at the end of a sub-block is handed to the next
// decoder, which starts its forward recursion from it in the next half
// iteration of the same kind (uniform in the first iteration). The end of
// the whole block always starts uniform.
//
// What follows the document: the three units, the A+Gamma and beta stakes
// memories, the a-priori buffer, the 0.75 scaling, the status handling.
// This design's own choices: the factor 1/2 on lam, saturation, the forward
// initialisation of sub-blocks, passing stakes between neighbours, and the
// hard decision of frozen bits.
module map_decoder
  import tdec_pkg::*;
#(
  parameter int WIN    = 64,
  parameter int NW_MAX = 6
) (
  input  logic  clk,
  input  logic  rst_n,
  input  ctrl_t ctrl,
  input  logic  is_first_blk,
  input  logic  is_last_blk,
  // forward inputs, valid with ctrl.fwd_en
  input  soft_t ys,
  input  soft_t yp,
  input  llr_t  lu,
  input  logic  status,
  // stake exchange with the neighbouring decoders
  input  smv_t  nb_alpha_in,   // from the previous decoder
  input  smv_t  nb_beta_in,    // from the next decoder
  output smv_t  nb_out,
  // backward outputs, valid with out_valid
  output logic  out_valid,
  output llr_t  le,
  output logic  status_old,
  output logic  hd,
  output lam_t  lam
);
  localparam int WA = (WIN > 1) ? $clog2(WIN) : 1;
  localparam int SD = 2 * NW_MAX;
  localparam int SA = $clog2(SD);
  localparam int NA = (NW_MAX > 1) ? $clog2(NW_MAX) : 1;
  localparam sm_t NEG = sm_t'(-(2 ** (SM_W - 2)));

  smv_t  a_q, b_q, sm_in, sm_out, a_init, b_init, stake_q;
  smv_t  alpha_stk [2];
  agv_t  ag_new, ag_q;
  apri_t apri_w, apri_q;
  gv_t   g;
  sys_t  s;
  soft_t bm_ys, bm_yp;
  llr_t  bm_lu;

  // ---------------------------------------------------------------- BMU/SMU
  always_comb begin
    if (ctrl.bwd_en) begin
      bm_ys = apri_q.ys;  bm_yp = apri_q.yp;  bm_lu = apri_q.lu;
    end else begin
      bm_ys = ys;         bm_yp = yp;         bm_lu = lu;
    end
  end

  bmu u_bmu (.ys(bm_ys), .yp(bm_yp), .lu(bm_lu), .s(s), .g(g));

  always_comb begin
    if (is_first_blk)
      for (int i = 0; i < N_ST; i++) a_init[i] = (i != 0) ? NEG : '0;
    else if (ctrl.use_stake)
      a_init = alpha_stk[ctrl.half_type];
    else
      a_init = '0;
    b_init = '0;
    if (ctrl.use_stake && !(is_last_blk && ctrl.win == ctrl.nwin_m1)) b_init = stake_q;
    if (ctrl.bwd_en) sm_in = ctrl.bwd_first ? b_init : b_q;
    else             sm_in = ctrl.fwd_first ? a_init : a_q;
  end

  smu u_smu (.bwd(ctrl.bwd_en), .sm_in(sm_in), .g(g), .sm_out(sm_out), .ag(ag_new));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0;
      b_q <= '0;
      alpha_stk[0] <= '0;
      alpha_stk[1] <= '0;
    end else begin
      if (ctrl.fwd_en) a_q <= sm_out;
      if (ctrl.bwd_en) b_q <= sm_out;
      if (ctrl.fwd_en && ctrl.fwd_last && ctrl.win == ctrl.nwin_m1)
        alpha_stk[ctrl.half_type] <= nb_alpha_in;
    end
  end

  // the SMU output is both the final A of a sub-block (forward) and the
  // B at the start of window 0 (backward) seen by the neighbours
  assign nb_out = sm_out;

  // -------------------------------------------------------------- memories
  assign apri_w = '{status: status, lu: lu, ys: ys, yp: yp};

  // frozen flags of the current window, readable in the cycle of bwd_rd
  logic [WIN-1:0] frz;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           frz <= '0;
    else if (ctrl.fwd_en) frz[WA'(ctrl.fwd_loc)] <= status;
  end

  sp_ram #(.W($bits(agv_t)), .D(WIN)) u_ag_mem (
    .clk,
    .en   ((ctrl.fwd_en && !status) || (ctrl.bwd_rd && !frz[WA'(ctrl.bwd_rd_loc)])),
    .we   (ctrl.fwd_en),
    .addr (ctrl.fwd_en ? WA'(ctrl.fwd_loc) : WA'(ctrl.bwd_rd_loc)),
    .wdata(ag_new),
    .rdata(ag_q)
  );

  sp_ram #(.W($bits(apri_t)), .D(WIN)) u_apri_mem (
    .clk,
    .en   (ctrl.fwd_en || ctrl.bwd_rd),
    .we   (ctrl.fwd_en),
    .addr (ctrl.fwd_en ? WA'(ctrl.fwd_loc) : WA'(ctrl.bwd_rd_loc)),
    .wdata(apri_w),
    .rdata(apri_q)
  );

  // beta stakes: slot half_type*NW_MAX + window
  logic          st_we;
  logic [NA-1:0] st_slot;
  smv_t          st_wdata;

  always_comb begin
    st_we    = 1'b0;
    st_slot  = NA'(ctrl.win);
    st_wdata = sm_out;
    if (ctrl.bwd_en && ctrl.bwd_last) begin
      if (ctrl.win != '0) begin
        st_we   = 1'b1;
        st_slot = NA'(ctrl.win - 1'b1);
      end else if (!is_last_blk) begin
        st_we    = 1'b1;
        st_slot  = NA'(ctrl.nwin_m1);
        st_wdata = nb_beta_in;
      end
    end
  end

  sp_ram #(.W($bits(smv_t)), .D(SD)) u_stake_mem (
    .clk,
    .en   (st_we || ctrl.bwd_rd),
    .we   (st_we),
    .addr (SA'(ctrl.half_type) * SA'(NW_MAX) + SA'(st_slot)),
    .wdata(st_wdata),
    .rdata(stake_q)
  );

  // ---------------------------------------------------- LLR and extrinsic
  llru u_llru (.ag(ag_q), .b(sm_in), .lam(lam));

  logic signed [LAM_W:0] le_raw, le_sc;

  always_comb begin
    le_raw = (LAM_W+1)'(lam >>> 1) - (LAM_W+1)'(s);
    le_sc  = (le_raw >>> 1) + (le_raw >>> 2);
    le     = sat_llr(le_sc);
  end

  assign out_valid  = ctrl.bwd_en;
  assign status_old = apri_q.status;
  assign hd         = apri_q.status ? (s > 0) : (lam > 0);
endmodule
