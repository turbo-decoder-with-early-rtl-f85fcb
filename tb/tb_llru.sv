// Test of the LLR unit: random true A+Gamma terms (relative values) and
// true B metrics (fed wrapped to SM_W bits with a random offset); the output
// must equal max over u=1 branches minus max over u=0 branches of
// AG(s',u) + B(next(s',u)), computed with the testbench's own trellis model.
module tb_llru;
  import tdec_pkg::*;
  int checks = 0, failures = 0;
  agv_t ag;
  smv_t b;
  lam_t lam;

  llru dut (.*);

  function automatic int ref_next(input int sp, input int u);
    int s1, s2, s3, a;
    s1 = (sp >> 2) & 1; s2 = (sp >> 1) & 1; s3 = sp & 1;
    a  = u ^ s2 ^ s3;
    return (a << 2) | (s1 << 1) | s2;
  endfunction

  initial begin
    int agv [16];
    int bv [8];
    for (int n = 0; n < 3000; n++) begin
      int off, m1, m0, e;
      off = int'($urandom_range(1023));
      for (int i = 0; i < 16; i++) begin
        agv[i] = int'($urandom_range(1000)) - 500;
        ag[i]  = ag_t'(agv[i]);
      end
      bv[0] = 0;
      for (int s = 1; s < 8; s++) bv[s] = int'($urandom_range(800)) - 400;
      for (int s = 0; s < 8; s++) b[s] = sm_t'(bv[s] + off);
      #1;
      m1 = -100000; m0 = -100000;
      for (int sp = 0; sp < 8; sp++)
        for (int u = 0; u < 2; u++) begin
          int v;
          v = agv[2 * sp + u] + bv[ref_next(sp, u)];
          if (u == 1 && v > m1) m1 = v;
          if (u == 0 && v > m0) m0 = v;
        end
      e = m1 - m0;
      checks++;
      if (int'(lam) != e) begin
        failures++;
        if (failures < 10) $display("FAIL lam=%0d expected %0d", lam, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
