// Test of the interleaver of one MAP decoder under the decoder's window
// schedule: forward steps through a window, the backward generator started
// in the last forward step, one idle cycle, then backward steps through the
// same window in reverse, then the next window. Every address is checked
// against pi(i) = (f1*i + f2*i^2) mod K for K = 6144 on sub-block 5 of 16
// (Ks = 384, windows of 64) and for K = 1056 on sub-block 2 of 4 (windows
// 64,64,64,64,8).
module tb_qpp_interleaver;
  import tdec_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic init = 0, fwd_step = 0, bwd_init = 0, bwd_step = 0, dir = 0;
  logic [AW-1:0] k, pi0, g0, z, addr;

  always #5 clk = ~clk;
  qpp_interleaver dut (.*);

  function automatic longint qpi(input longint i, input longint f1, input longint f2, input longint kk);
    return (f1 * i + f2 * i * i) % kk;
  endfunction

  task automatic chk(input int i, input int kk, input int f1, input int f2);
    checks++;
    if (addr != AW'(qpi(i, f1, f2, kk))) begin
      failures++;
      if (failures < 10) $display("FAIL K=%0d i=%0d dir=%0d: %0d expected %0d", kk, i, dir, addr, qpi(i, f1, f2, kk));
    end
  endtask

  task automatic run(input int kk, input int f1, input int f2, input int ks, input int p);
    longint im;
    int i0;
    i0 = p * ks;
    im = (i0 + kk - 1) % kk;
    @(negedge clk);
    k = AW'(kk); z = AW'((2 * f2) % kk);
    pi0 = AW'(qpi(im, f1, f2, kk));
    g0  = AW'((2 * f2 * im + f2 + f1) % kk);
    init = 1;
    @(negedge clk); init = 0;
    for (int ws = 0; ws < ks; ws += 64) begin
      int lw;
      lw = (ks - ws > 64) ? 64 : ks - ws;
      dir = 0; #1;
      for (int c = 0; c < lw; c++) begin
        chk(i0 + ws + c, kk, f1, f2);
        fwd_step = 1; bwd_init = (c == lw - 1);
        @(negedge clk);
        fwd_step = 0; bwd_init = 0;
      end
      @(negedge clk);
      dir = 1; #1;
      @(negedge clk);
      for (int c = lw - 1; c >= 0; c--) begin
        chk(i0 + ws + c, kk, f1, f2);
        bwd_step = 1;
        @(negedge clk);
        bwd_step = 0;
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(6144, 263, 480, 384, 5);
    run(6144, 263, 480, 384, 0);
    run(1056, 17, 66, 264, 2);
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
