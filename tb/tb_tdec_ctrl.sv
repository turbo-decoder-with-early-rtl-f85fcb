// Test of the decoder sequencer. For random block sizes, MAP decoder counts
// and iteration limits it records every control event and compares it with
// the schedule computed by the testbench:
//  - per half iteration one gen_init, then per window the forward reads
//    j = ws..ws+lw-1 in order, each followed one cycle later by a forward
//    step at the same j, and the backward steps j = ws+lw-1 down to ws;
//  - half_type alternates, last_half marks the final half, use_stake from
//    the third half on, window numbers and nwin_m1;
//  - es_sel: 1 in the init cycle, 2 during the backward steps;
//  - the total cycle count 1 + halves*(2 + sum 2*(lw+1));
//  - stop: raised in the check cycle of a chosen half it ends the decoding
//    there with stopped = 1, otherwise 2*iters halves with stopped = 0.
module tb_tdec_ctrl;
  import tdec_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, stop = 0;
  logic [AW-1:0] k, ks;
  logic [2:0] map_log2;
  logic [3:0] iters;
  ctrl_t ctrl;
  logic [1:0] es_sel;
  logic busy, done, stopped;
  logic [4:0] halves;

  tdec_ctrl dut (.*);

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run(input int kk, input int ml2, input int it, input int stop_half);
    int ksub, nh, cyc, exp_cyc, h, fwd_j, bwd_j, ws, lw, nwin, issue_prev, half_cyc;
    ksub = kk >> ml2;
    nwin = (ksub + 63) / 64;
    half_cyc = 2;
    for (int w = 0; w < nwin; w++) begin
      lw = (ksub - w * 64 > 64) ? 64 : ksub - w * 64;
      half_cyc += 2 * (lw + 1);
    end
    nh = (stop_half >= 0 && stop_half < 2 * it) ? stop_half + 1 : 2 * it;
    exp_cyc = 1 + nh * half_cyc;
    @(negedge clk);
    k = AW'(kk); map_log2 = 3'(ml2); iters = 4'(it); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    h = -1;
    issue_prev = -1;
    while (!done) begin
      if (ctrl.gen_init) begin
        h++;
        fwd_j = 0; bwd_j = -1; ws = 0;
        expect_eq("es_sel init", es_sel, 1);
        expect_eq("half_type", ctrl.half_type, h % 2);
        expect_eq("last_half", ctrl.last_half, h == 2 * it - 1);
        expect_eq("use_stake", ctrl.use_stake, h >= 2);
        expect_eq("nwin_m1", ctrl.nwin_m1, nwin - 1);
        expect_eq("ks", ks, ksub);
      end
      if (ctrl.fwd_en) begin
        expect_eq("fwd step follows read", issue_prev, int'(ctrl.j_issue) - 1);
      end
      issue_prev = ctrl.fwd_issue ? int'(ctrl.j_issue) : -1;
      if (ctrl.fwd_issue) begin
        expect_eq("fwd j order", ctrl.j_issue, fwd_j);
        expect_eq("window number", ctrl.win, fwd_j / 64);
        if (fwd_j % 64 == 0) begin
          ws = fwd_j;
          lw = (ksub - ws > 64) ? 64 : ksub - ws;
          bwd_j = ws + lw - 1;
        end
        fwd_j++;
      end
      if (ctrl.bwd_en) begin
        expect_eq("bwd j order", ctrl.j_bwd, bwd_j);
        expect_eq("es_sel bwd", es_sel, 2);
        expect_eq("bwd_first", ctrl.bwd_first, bwd_j == ws + lw - 1);
        expect_eq("bwd_last", ctrl.bwd_last, bwd_j == ws);
        bwd_j--;
      end
      stop = (h == stop_half) && !ctrl.gen_init && !ctrl.fwd_issue && !ctrl.fwd_en &&
             !ctrl.bwd_rd && !ctrl.bwd_en && busy;
      @(negedge clk);
      cyc++;
      if (cyc > 200000) break;
    end
    stop = 0;
    expect_eq("fwd reads in last half", fwd_j, ksub);
    expect_eq("cycles", cyc, exp_cyc);
    expect_eq("halves", halves, nh);
    expect_eq("stopped", stopped, stop_half >= 0 && stop_half < 2 * it);
    @(negedge clk);
    expect_eq("idle after done", busy, 0);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(6144, 4, 7, -1);
    run(6144, 4, 7, 3);
    run(1056, 2, 2, -1);
    run(40, 0, 1, -1);
    run(40, 0, 3, 0);
    for (int n = 0; n < 20; n++) begin
      int kk, ml2;
      ml2 = $urandom_range(4);
      kk = (($urandom_range(6144 / 8) + 5) * 8) & ~((1 << ml2) - 1);
      if (kk > 6144) kk = 6144;
      run(kk, ml2, $urandom_range(1, 4), $urandom_range(8) - 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
