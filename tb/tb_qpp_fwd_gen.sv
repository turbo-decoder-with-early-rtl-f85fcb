// Test of the forward QPP address generator for K = 6144 (f1 = 263,
// f2 = 480) and K = 40 (f1 = 3, f2 = 10): after init with the values of
// index i0-1 the address must be pi(i0) and then follow
// pi(i) = (f1*i + f2*i^2) mod K, computed directly, with random hold cycles.
module tb_qpp_fwd_gen;
  import tdec_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic init = 0, step = 0;
  logic [AW-1:0] k, pi0, g0, z, addr, g, pi_nxt, g_nxt;

  always #5 clk = ~clk;
  qpp_fwd_gen dut (.*);

  function automatic longint qpi(input longint i, input longint f1, input longint f2, input longint kk);
    return (f1 * i + f2 * i * i) % kk;
  endfunction

  task automatic run(input int kk, input int f1, input int f2, input int i0, input int n);
    longint im;
    int i;
    im = (i0 + kk - 1) % kk;
    @(negedge clk);
    k = AW'(kk); z = AW'((2 * f2) % kk);
    pi0 = AW'(qpi(im, f1, f2, kk));
    g0  = AW'((2 * f2 * im + f2 + f1) % kk);
    init = 1;
    @(negedge clk); init = 0;
    i = i0;
    for (int c = 0; c < n; c++) begin
      checks++;
      if (addr != AW'(qpi(i % kk, f1, f2, kk))) begin
        failures++;
        if (failures < 10) $display("FAIL K=%0d i=%0d: %0d expected %0d", kk, i, addr, qpi(i % kk, f1, f2, kk));
      end
      step = ($urandom_range(3) != 0);
      @(negedge clk);
      if (step) i++;
      step = 0;
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(6144, 263, 480, 0, 1000);
    run(6144, 263, 480, 384 * 7, 1000);
    run(6144, 263, 480, 6000, 400);
    run(40, 3, 10, 0, 100);
    run(40, 3, 10, 20, 100);
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
