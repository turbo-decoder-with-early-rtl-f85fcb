// Test of the turbo decoder built with a sliding window of 128 (WIN = 128,
// other parameters at their defaults: 16 MAP decoders, blocks up to 6144).
// The window of 128 is the one a power estimate of this architecture was
// made with; the default build uses 64. K = 6144 (f1 = 263, f2 = 480) gives
// sub-blocks of 384 bits in three windows. Runs once through a noisy channel
// for the full 7 iterations, once with threshold 45 through a clean channel,
// which must stop early, then K = 3072 (f1 = 47, f2 = 96) on 8 of the 16
// decoders and K = 1056 (f1 = 17, f2 = 66), whose 66-bit sub-blocks fill
// only part of one window. Checks the decoded bits and the cycle count,
// 2 + 2 * (K/P + windows) per half iteration, and the 7-iteration throughput
// at 200 MHz against 110 Mb/s * P/16 within 5%. Longer windows mean fewer
// window borders, so the design runs slightly faster than with 64.
module tb_turbo_decoder_w128;
  import tdec_pkg::*;

  localparam int N_MAP = 16;
  localparam int MAX_K = 6144;
  localparam int WIN   = 128;
  localparam int BANK_D = MAX_K / N_MAP;
  localparam int BA = $clog2(BANK_D);
  localparam int NB = $clog2(N_MAP);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [AW-1:0] cfg_k, cfg_z;
  logic [2:0] cfg_map_log2;
  logic [3:0] cfg_iters;
  llr_t cfg_thr;
  logic [N_MAP-1:0][AW-1:0] cfg_pi0, cfg_g0;
  logic ld_we = 0;
  logic [NB-1:0] ld_bank;
  logic [BA-1:0] ld_addr;
  soft_t ld_ys, ld_yp1, ld_yp2;
  logic start = 0, busy, done, stopped;
  logic [4:0] halves;
  logic [N_MAP-1:0] hd_valid, hd_bit;
  logic [N_MAP-1:0][AW-1:0] hd_addr;

  turbo_decoder #(.WIN(WIN)) dut (.*);

  int checks = 0, failures = 0;
  int n_early = 0, n_maxit = 0, n_idle = 0, n_route = 0, n_frozen = 0, n_stake = 0, n_short = 0;
  int n_tput = 0, n_wr = 0, n_save = 0;

  bit info [MAX_K];
  bit dec  [MAX_K];
  int pi_t [MAX_K];

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  function automatic soft_t quant(input int amp, input bit b, input int sig100);
    int n, v;
    // sum of four uniforms in [-1000,1000]: variance 4/3 * 1e6
    n = 0;
    for (int i = 0; i < 4; i++) n += int'($urandom_range(2000)) - 1000;
    v = (b ? amp : -amp) * 1000 + (n * sig100 * 866) / 100000;
    v = (v >= 0) ? (v + 500) / 1000 : -((-v + 500) / 1000);
    if (v > 7) v = 7;
    if (v < -8) v = -8;
    return soft_t'(v);
  endfunction

  // one RSC step: returns parity, updates state {s1,s2,s3}
  function automatic bit rsc(inout bit [2:0] s, input bit u);
    bit a, p;
    a = u ^ s[1] ^ s[0];
    p = a ^ s[2] ^ s[0];
    s = {a, s[2], s[1]};
    return p;
  endfunction

  always @(posedge clk)
    for (int p = 0; p < N_MAP; p++)
      if (hd_valid[p]) dec[hd_addr[p]] <= hd_bit[p];

  // mechanism monitors
  always @(posedge clk) begin
    if (dut.ctrl.fwd_en && dut.sel_q != '0) n_route++;
    if (dut.ctrl.bwd_en && dut.g_map[0].st_old) n_frozen++;
    if (dut.ctrl.bwd_en && dut.ctrl.bwd_first && dut.ctrl.use_stake) n_stake++;
    if (dut.ctrl.bwd_en)
      for (int b = 0; b < N_MAP; b++) if (dut.wdat_s[b][LE_W+1]) n_wr++;
  end

  task automatic run_case(input int K, input int f1, input int f2, input int mlog2,
                          input int iters, input int thr, input int amp, input int sig100,
                          input int exp_stop, input int exp_halves);
    int P, ks, nw, cyc, errs, raw_errs, exp_cyc, hv;
    bit [2:0] s1, s2;
    soft_t ys [MAX_K];
    soft_t yp1 [MAX_K];
    soft_t yp2 [MAX_K];
    bit seen [MAX_K];
    longint ii;

    P  = 1 << mlog2;
    ks = K / P;
    nw = (ks + WIN - 1) / WIN;
    for (int i = 0; i < K; i++) begin
      ii = i;
      pi_t[i] = int'((longint'(f1) * ii + longint'(f2) * ii * ii) % K);
      seen[i] = 0;
    end
    for (int i = 0; i < K; i++) seen[pi_t[i]] = 1;
    for (int i = 0; i < K; i++) check(seen[i], $sformatf("QPP K=%0d not a permutation", K));
    for (int i = 0; i < K; i++) info[i] = 1'($urandom);
    s1 = 0; s2 = 0;
    raw_errs = 0;
    for (int i = 0; i < K; i++) begin
      ys[i]  = quant(amp, info[i], sig100);
      yp1[i] = quant(amp, rsc(s1, info[i]), sig100);
      yp2[i] = quant(amp, rsc(s2, info[pi_t[i]]), sig100);
      if ((ys[i] > 0) != info[i]) raw_errs++;
    end
    // configuration
    cfg_k = AW'(K); cfg_map_log2 = 3'(mlog2); cfg_iters = 4'(iters); cfg_thr = llr_t'(thr);
    cfg_z = AW'((2 * f2) % K);
    for (int p = 0; p < N_MAP; p++) begin
      longint i0;
      i0 = (p * ks + K - 1) % K;
      cfg_pi0[p] = AW'((longint'(f1) * i0 + longint'(f2) * i0 * i0) % K);
      cfg_g0[p]  = AW'((2 * longint'(f2) * i0 + f2 + f1) % K);
    end
    // load
    for (int i = 0; i < K; i++) begin
      @(negedge clk);
      ld_we = 1; ld_bank = NB'(i / ks); ld_addr = BA'(i % ks);
      ld_ys = ys[i]; ld_yp1 = yp1[i]; ld_yp2 = yp2[i];
    end
    @(negedge clk); ld_we = 0;
    for (int i = 0; i < K; i++) dec[i] = ~info[i];
    // decode
    n_wr = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    hv = halves;
    @(negedge clk);
    errs = 0;
    for (int i = 0; i < K; i++) if (dec[i] != info[i]) errs++;
    exp_cyc = hv * (2 + 2 * (ks + nw)) + 1;
    $display("K=%0d P=%0d thr=%0d sigma=%0d.%02d: raw errors %0d, decoded errors %0d, halves %0d, stopped %0d, cycles %0d (expected %0d)",
             K, P, thr, sig100 / 100, sig100 % 100, raw_errs, errs, hv, stopped, cyc, exp_cyc);
    check(errs == 0, $sformatf("K=%0d: %0d decoded bit errors", K, errs));
    check(cyc == exp_cyc, $sformatf("K=%0d: %0d cycles, expected %0d", K, cyc, exp_cyc));
    // extrinsic write-backs against a decoder without the criterion, which
    // writes every bit in every half iteration but the last, for 2*iters halves
    $display("  extrinsic writes %0d = %0.1f%% of %0d without the stopping criterion",
             n_wr, 100.0 * real'(n_wr) / real'(K * (2 * iters - 1)), K * (2 * iters - 1));
    check(n_wr <= K * (hv - 1), "more extrinsic writes than bits times half iterations");
    if (n_wr < K * (2 * iters - 1)) n_save++;
    if (exp_stop >= 0) check(stopped == 1'(exp_stop), $sformatf("K=%0d: stopped=%0d", K, stopped));
    if (exp_halves > 0) check(hv == exp_halves, $sformatf("K=%0d: halves=%0d", K, hv));
    if (stopped) n_early++;
    if (hv == 2 * iters) n_maxit++;
    if (P < N_MAP) n_idle++;
    if (ks % WIN != 0 && nw > 1) n_short++;
    if (hv == 14 && K == MAX_K / N_MAP * P) begin
      real mbps, ref_mbps;
      mbps = real'(K) * 200.0 / real'(cyc);
      ref_mbps = 110.0 * real'(P) / 16.0;
      $display("throughput at 200 MHz, 7 iterations: %0.1f Mb/s (reference %0.1f)", mbps, ref_mbps);
      check(mbps > 0.95 * ref_mbps && mbps < 1.05 * ref_mbps, "throughput not within 5% of the reference");
      n_tput++;
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_case(6144, 263, 480, 4, 7, 63, 3, 200, 0, 14);
    run_case(6144, 263, 480, 4, 7, 45, 4, 100, 1, -1);
    run_case(3072, 47, 96, 3, 7, 45, 3, 170, -1, -1);
    run_case(1056, 17, 66, 4, 7, 45, 3, 200, -1, -1);
    $display("mechanisms: early_stop=%0d iteration_limit=%0d idle_decoders=%0d routed_reads=%0d frozen_bits=%0d stake_reuse=%0d",
             n_early, n_maxit, n_idle, n_route, n_frozen, n_stake);
    check(n_maxit > 0, "iteration limit never reached");
    check(n_idle > 0, "never ran with idle decoders");
    check(n_save > 0, "the criterion never saved an extrinsic write");
    check(n_tput > 1, "throughput checked for fewer than two configurations");
    check(n_early > 0, "early stop never happened");
    check(n_route > 0, "network never permuted");
    check(n_frozen > 0, "no frozen bit seen");
    check(n_stake > 0, "beta stakes never used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
