// Test of one MAP decoder driven by the sequencer as a single sub-block
// (first and last block, K = 200: windows 64, 64, 64, 8) over four half
// iterations with random soft inputs and a-priori values. Every output is
// compared bit-exactly with a reference max-log-MAP computed here in plain
// integers: forward metrics start at {0, -256, ...}, backward metrics at the
// end of every window start at zero in the first two halves and at the
// stake saved at the same position two halves earlier afterwards (zero for
// the block end), LLR = max over u=1 branches - max over u=0 branches of
// A + Gamma + B, extrinsic = sat7(0.75 * (LLR/2 - (ys + lu))) with the
// arithmetic shifts of the design, hard decision LLR > 0. In the last two
// halves some bits are frozen (status 1): for those only the hard decision
// (sign of ys + lu) and the returned status are checked, and that the
// A+Gamma memory is neither written nor read for them.
module tb_map_decoder;
  import tdec_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int K = 200, NH = 4;

  logic start = 0, stop = 0;
  ctrl_t ctrl;
  logic [1:0] es_sel;
  logic [AW-1:0] ks;
  logic busy, done, stopped;
  logic [4:0] halves;

  tdec_ctrl u_ctrl (
    .clk, .rst_n, .start, .k(AW'(K)), .map_log2(3'd0), .iters(4'(NH / 2)), .stop,
    .ctrl, .es_sel, .ks, .busy, .done, .stopped, .halves
  );

  soft_t ys, yp;
  llr_t  lu;
  logic  status;
  smv_t  nb_out;
  logic  out_valid, status_old, hd;
  llr_t  le;
  lam_t  lam;

  map_decoder dut (
    .clk, .rst_n, .ctrl, .is_first_blk(1'b1), .is_last_blk(1'b1),
    .ys, .yp, .lu, .status, .nb_alpha_in('0), .nb_beta_in('0), .nb_out,
    .out_valid, .le, .status_old, .hd, .lam
  );

  int m_ys [NH][K];
  int m_yp [NH][K];
  int m_lu [NH][K];
  int m_st [NH][K];
  int r_le [NH][K];
  int r_hd [NH][K];
  int stake [NH][K+1][8];

  function automatic int nxt(int s, int u);
    int a;
    a = u ^ ((s >> 1) & 1) ^ (s & 1);
    return (a << 2) | (s >> 1);
  endfunction
  function automatic int par(int s, int u);
    int a;
    a = u ^ ((s >> 1) & 1) ^ (s & 1);
    return a ^ ((s >> 2) & 1) ^ (s & 1);
  endfunction
  function automatic int gam(int h, int j, int u, int p);
    int s;
    s = m_ys[h][j] + m_lu[h][j];
    return (u ? s : -s) + (p ? m_yp[h][j] : -m_yp[h][j]);
  endfunction

  task automatic reference(input int h);
    int al [K+1][8];
    int be [8], bn [8];
    for (int st = 0; st < 8; st++) al[0][st] = st ? -256 : 0;
    for (int j = 0; j < K; j++) begin
      for (int st = 0; st < 8; st++) al[j+1][st] = -1000000;
      for (int sp = 0; sp < 8; sp++)
        for (int u = 0; u < 2; u++) begin
          int v;
          v = al[j][sp] + gam(h, j, u, par(sp, u));
          if (v > al[j+1][nxt(sp, u)]) al[j+1][nxt(sp, u)] = v;
        end
    end
    for (int ws = 0; ws < K; ws += 64) begin
      int we;
      we = (ws + 64 < K) ? ws + 64 : K;
      for (int st = 0; st < 8; st++) be[st] = (h >= 2 && we < K) ? stake[h-2][we][st] : 0;
      for (int j = we - 1; j >= ws; j--) begin
        int m1, m0, lam_r, s, le_raw, le_sc;
        m1 = -1000000; m0 = -1000000;
        for (int sp = 0; sp < 8; sp++)
          for (int u = 0; u < 2; u++) begin
            int v;
            v = al[j][sp] + gam(h, j, u, par(sp, u)) + be[nxt(sp, u)];
            if (u && v > m1) m1 = v;
            if (!u && v > m0) m0 = v;
          end
        lam_r = m1 - m0;
        s = m_ys[h][j] + m_lu[h][j];
        le_raw = (lam_r >>> 1) - s;
        le_sc = (le_raw >>> 1) + (le_raw >>> 2);
        r_le[h][j] = le_sc > 63 ? 63 : (le_sc < -64 ? -64 : le_sc);
        r_hd[h][j] = m_st[h][j] ? (s > 0) : (lam_r > 0);
        for (int sp = 0; sp < 8; sp++) begin
          bn[sp] = -1000000;
          for (int u = 0; u < 2; u++) begin
            int v;
            v = be[nxt(sp, u)] + gam(h, j, u, par(sp, u));
            if (v > bn[sp]) bn[sp] = v;
          end
        end
        be = bn;
        if (j == ws) for (int st = 0; st < 8; st++) stake[h][j][st] = be[st];
      end
    end
  endtask

  // inputs follow the read issued in the previous cycle
  int h_cur, j_q;
  always_ff @(posedge clk) if (ctrl.fwd_issue) j_q <= int'(ctrl.j_issue);
  always_comb begin
    ys = soft_t'(m_ys[h_cur][j_q]);
    yp = soft_t'(m_yp[h_cur][j_q]);
    lu = llr_t'(m_lu[h_cur][j_q]);
    status = 1'(m_st[h_cur][j_q]);
  end

  // the A+Gamma memory is neither written nor read for a frozen bit
  int ag_skips = 0;
  always @(negedge clk) begin
    if (h_cur >= 0 && ctrl.fwd_en && status) begin
      checks++;
      if (dut.u_ag_mem.en) begin failures++; $display("FAIL A+Gamma write for a frozen bit"); end
    end
    if (h_cur >= 0 && ctrl.bwd_rd) begin
      int j;
      j = 64 * int'(ctrl.win) + int'(ctrl.bwd_rd_loc);
      checks++;
      if (dut.u_ag_mem.en == 1'(m_st[h_cur][j])) begin
        failures++; $display("FAIL A+Gamma read enable %0d for j=%0d, status %0d", dut.u_ag_mem.en, j, m_st[h_cur][j]);
      end
      if (m_st[h_cur][j]) ag_skips++;
    end
  end

  always @(negedge clk) begin
    if (ctrl.gen_init) h_cur <= h_cur + 1;
    if (out_valid && h_cur >= 0) begin
      int j;
      j = int'(ctrl.j_bwd);
      checks += 2;
      if (int'(status_old) != m_st[h_cur][j]) begin
        failures++; $display("FAIL status h=%0d j=%0d", h_cur, j);
      end
      if (int'(hd) != r_hd[h_cur][j]) begin
        failures++; if (failures < 20) $display("FAIL hd h=%0d j=%0d", h_cur, j);
      end
      if (!m_st[h_cur][j]) begin
        checks++;
        if (int'(le) != r_le[h_cur][j]) begin
          failures++;
          if (failures < 20) $display("FAIL le h=%0d j=%0d: %0d expected %0d (lam %0d)", h_cur, j, le, r_le[h_cur][j], lam);
        end
      end
    end
  end

  initial begin
    h_cur = -1; j_q = 0;
    for (int h = 0; h < NH; h++)
      for (int j = 0; j < K; j++) begin
        m_ys[h][j] = $urandom_range(15) - 8;
        m_yp[h][j] = $urandom_range(15) - 8;
        m_lu[h][j] = (h == 0) ? 0 : ($urandom_range(1) ? $urandom_range(127) - 64 : $urandom_range(40) - 20);
        m_st[h][j] = (h >= 2) && ($urandom_range(9) == 0);
      end
    for (int h = 0; h < NH; h++) reference(h);
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    wait (done);
    @(negedge clk);
    checks++;
    if (halves != 5'(NH)) begin failures++; $display("FAIL halves %0d", halves); end
    checks++;
    if (ag_skips == 0) begin failures++; $display("FAIL no frozen bit skipped its A+Gamma read"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
