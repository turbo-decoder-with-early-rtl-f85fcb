// Test of the backward QPP address generator: started with pi(i), g(i) it
// must present pi(i-1) two cycles after init and then step down through
// pi(i-2), pi(i-3), ... (random hold cycles), checked against the direct
// formula, for K = 6144 and K = 40, including wrap below index 0.
module tb_qpp_bwd_gen;
  import tdec_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic init = 0, step = 0;
  logic [AW-1:0] k, pi0, g0, z, addr;

  always #5 clk = ~clk;
  qpp_bwd_gen dut (.*);

  function automatic longint qpi(input longint i, input longint f1, input longint f2, input longint kk);
    return (f1 * i + f2 * i * i) % kk;
  endfunction

  task automatic run(input int kk, input int f1, input int f2, input int i0, input int n);
    int i;
    @(negedge clk);
    k = AW'(kk); z = AW'((2 * f2) % kk);
    pi0 = AW'(qpi(i0, f1, f2, kk));
    g0  = AW'((2 * longint'(f2) * i0 + f2 + f1) % kk);
    init = 1;
    @(negedge clk); init = 0;
    @(negedge clk);
    i = i0 - 1;
    for (int c = 0; c < n; c++) begin
      int ie;
      ie = (i % kk + kk) % kk;
      checks++;
      if (addr != AW'(qpi(ie, f1, f2, kk))) begin
        failures++;
        if (failures < 10) $display("FAIL K=%0d i=%0d: %0d expected %0d", kk, ie, addr, qpi(ie, f1, f2, kk));
      end
      step = ($urandom_range(3) != 0);
      @(negedge clk);
      if (step) i--;
      step = 0;
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(6144, 263, 480, 64, 100);
    run(6144, 263, 480, 6143, 1000);
    run(6144, 263, 480, 3000, 500);
    run(40, 3, 10, 10, 100);
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
