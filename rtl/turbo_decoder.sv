// LTE turbo decoder with N parallel max-log-MAP decoders and an early
// stopping criterion based on per-bit status flags.
//
// The block of K bits is split into N sub-blocks of Ks = K/N bits, one per
// MAP decoder and per memory bank (input memories ys/yp1/yp2 and an LLR
// memory holding the 7-bit extrinsic value plus a status bit). A single MAP
// decoder per sub-block alternately plays both component decoders: in even
// half iterations it reads ys, yp1 and the LLR in natural order, in odd ones
// ys and the LLR in QPP-interleaved order (yp2 stays natural), writing the
// new extrinsic values back to the interleaved address, which
// de-interleaves them. Because the QPP interleaver is contention free the
// N addresses of a step always fall in N different banks at one common
// offset: the minimum address block finds it and addresses every bank, and
// the master/slave Batcher network routes reads from banks to decoders
// (slave) and write data from decoders to banks (master).
//
// Early stopping: each extrinsic value passes a threshold comparison unit;
// once |Le| exceeds the threshold its status bit is set and the value is
// never updated again (no write-back, no A+Gamma storage, LLR unit idle
// for it). The early stopping unit ANDs all status bits of a half iteration;
// if all are set the decoding ends after that half iteration.
//
// Interface. Configuration (hold while busy): cfg_k block length,
// cfg_map_log2 log2 of the MAP decoders used (fewer than N when K is not a
// multiple of N), cfg_iters maximum full iterations, cfg_thr threshold,
// and the precomputed QPP values cfg_z = 2*f2 mod K and, for decoder p,
// cfg_pi0[p] = pi(p*Ks-1), cfg_g0[p] = g(p*Ks-1) mod K (with
// g(i) = (2*f2*i + f2 + f1) mod K). Load: while idle, ld_we writes the soft
// values of block index ld_bank*Ks + ld_addr and clears its LLR entry.
// start begins a decoding; done pulses at the end, with stopped and halves.
// Output: in the backward recursion of every half iteration each active
// decoder p presents a hard decision hd_bit[p] for block index hd_addr[p]
// (hd_valid[p]); the values of the last half iteration are the result.
// Timing: 2 + 2*(Ks + windows) cycles per half iteration (tdec_ctrl).
//
// Follows the document: the architecture, widths (4-bit inputs, 10-bit
// metrics, 7-bit extrinsic plus status), window length 64, up to 16
// decoders. Own choices: the host-side interface, the memory read
// pipeline, and keys {1, p} that park inactive decoders on the top banks.
module turbo_decoder
  import tdec_pkg::*;
#(
  parameter int N_MAP = 16,
  parameter int MAX_K = 6144,
  parameter int WIN   = 64,
  localparam int BANK_D = MAX_K / N_MAP,
  localparam int BA     = $clog2(BANK_D),
  localparam int NW_MAX = (BANK_D + WIN - 1) / WIN,
  localparam int NB     = (N_MAP > 1) ? $clog2(N_MAP) : 1,
  localparam int KW     = AW + 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // configuration
  input  logic [AW-1:0]            cfg_k,
  input  logic [2:0]               cfg_map_log2,
  input  logic [3:0]               cfg_iters,
  input  llr_t                     cfg_thr,
  input  logic [AW-1:0]            cfg_z,
  input  logic [N_MAP-1:0][AW-1:0] cfg_pi0,
  input  logic [N_MAP-1:0][AW-1:0] cfg_g0,
  // input load
  input  logic                     ld_we,
  input  logic [NB-1:0]            ld_bank,
  input  logic [BA-1:0]            ld_addr,
  input  soft_t                    ld_ys,
  input  soft_t                    ld_yp1,
  input  soft_t                    ld_yp2,
  // control
  input  logic                     start,
  output logic                     busy,
  output logic                     done,
  output logic                     stopped,
  output logic [4:0]               halves,
  // hard decisions
  output logic [N_MAP-1:0]         hd_valid,
  output logic [N_MAP-1:0][AW-1:0] hd_addr,
  output logic [N_MAP-1:0]         hd_bit
);
  localparam int S  = (NB * (NB + 1)) / 2;
  localparam int DW = LE_W + 2;             // {we, status, le}
  localparam int SW = Y_W + LE_W + 1;       // {ys, status, le}

  ctrl_t         ctrl;
  logic [1:0]    es_sel;
  logic          es_stop;
  logic [AW-1:0] ks;

  tdec_ctrl #(.WIN(WIN)) u_ctrl (
    .clk, .rst_n, .start, .k(cfg_k), .map_log2(cfg_map_log2), .iters(cfg_iters),
    .stop(es_stop), .ctrl, .es_sel, .ks, .busy, .done, .stopped, .halves
  );

  logic [N_MAP-1:0]           active;
  logic [N_MAP-1:0][KW-1:0]   key, key_s;
  logic [N_MAP-1:0][DW-1:0]   wdat, wdat_s;
  logic [S-1:0][N_MAP-1:0]    sel, sel_q;
  logic [N_MAP-1:0][SW-1:0]   rdat_bank, rdat_map;
  logic [KW-1:0]              amin;
  logic [N_MAP-1:0]           es_status;
  smv_t [N_MAP:0]             nb;       // metrics handed between neighbours
  soft_t [N_MAP-1:0]          yp_bank;

  assign nb[N_MAP] = '0;

  // ------------------------------------------------------------ per decoder
  for (genvar p = 0; p < N_MAP; p++) begin : g_map
    logic [AW-1:0] il_addr, nat_addr;
    llr_t          le;
    logic          st_old, st_new, we, ov, hd;
    lam_t          lam;
    llr_t          le_o;
    llr_word_t     rw;

    assign active[p] = (p < (1 << cfg_map_log2));

    qpp_interleaver u_il (
      .clk, .rst_n,
      .init    (ctrl.gen_init),
      .fwd_step(ctrl.fwd_issue & ctrl.half_type),
      .bwd_init(ctrl.bwd_gen_init & ctrl.half_type),
      .bwd_step(ctrl.bwd_en & ctrl.half_type),
      .dir     (ctrl.bwd_en),
      .k(cfg_k), .pi0(cfg_pi0[p]), .g0(cfg_g0[p]), .z(cfg_z),
      .addr    (il_addr)
    );

    always_comb begin
      nat_addr = AW'(p) * ks + (ctrl.bwd_en ? ctrl.j_bwd : ctrl.j_issue);
      if (!active[p])          key[p] = {1'b1, AW'(p)};
      else if (ctrl.half_type) key[p] = {1'b0, il_addr};
      else                     key[p] = {1'b0, nat_addr};
    end

    assign rw = llr_word_t'(rdat_map[p][LE_W:0]);

    map_decoder #(.WIN(WIN), .NW_MAX(NW_MAX)) u_map (
      .clk, .rst_n, .ctrl,
      .is_first_blk(p == 0),
      .is_last_blk (p == (1 << cfg_map_log2) - 1),
      .ys(soft_t'(rdat_map[p][SW-1 -: Y_W])), .yp(yp_bank[p]),
      .lu(rw.le), .status(rw.status),
      .nb_alpha_in((p == 0) ? smv_t'('0) : nb[(p == 0) ? 0 : p-1]),
      .nb_beta_in(nb[p+1]), .nb_out(nb[p]),
      .out_valid(ov), .le(le), .status_old(st_old), .hd(hd), .lam(lam)
    );

    tcu u_tcu (.status_in(st_old), .le(le), .thr(cfg_thr),
               .status_out(st_new), .le_out(le_o), .we(we));

    assign wdat[p]      = {we & active[p] & ~ctrl.last_half, st_new, le_o};
    assign es_status[p] = ~active[p] | st_new;
    assign hd_valid[p]  = ov & active[p];
    assign hd_addr[p]   = key[p][AW-1:0];
    assign hd_bit[p]    = hd;
  end

  // --------------------------------------------------- address and routing
  min_addr #(.N(N_MAP), .W(KW)) u_min (.a(key), .amin(amin));

  batcher_net #(.N(N_MAP), .KW(KW), .DW(DW), .SW(SW)) u_net (
    .m_key(key), .m_data(wdat), .m_key_o(key_s), .m_data_o(wdat_s), .m_sel(sel),
    .s_sel(sel_q), .s_data(rdat_bank), .s_data_o(rdat_map)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)              sel_q <= '0;
    else if (ctrl.fwd_issue) sel_q <= sel;

  early_stop #(.N(N_MAP)) u_es (.clk, .rst_n, .sel(es_sel), .status(es_status), .stop(es_stop));

  // ------------------------------------------------------------ memory banks
  for (genvar b = 0; b < N_MAP; b++) begin : g_bank
    logic      ld_b, wr_b;
    soft_t     ys_b;
    llr_word_t llr_b, llr_w;

    assign ld_b  = ld_we && (ld_bank == NB'(b));
    assign wr_b  = ctrl.bwd_en && wdat_s[b][DW-1];
    assign llr_w = ld_b ? '0 : llr_word_t'(wdat_s[b][LE_W:0]);

    input_mem_bank #(.D(BANK_D)) u_in (
      .clk, .ld_we(ld_b), .ld_addr, .ld_ys, .ld_yp1, .ld_yp2,
      .rd_en(ctrl.fwd_issue), .half_type(ctrl.half_type),
      .ys_addr(BA'(amin)), .yp_addr(BA'(ctrl.j_issue)),
      .ys(ys_b), .yp(yp_bank[b])
    );

    sp_ram #(.W(LE_W + 1), .D(BANK_D)) u_llr (
      .clk, .en(ld_b | wr_b | ctrl.fwd_issue), .we(ld_b | wr_b),
      .addr(ld_b ? ld_addr : BA'(amin)), .wdata(llr_w), .rdata(llr_b)
    );

    assign rdat_bank[b] = {ys_b, llr_b};
  end
endmodule
