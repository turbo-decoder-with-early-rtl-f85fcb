// Test of the state metric unit. The testbench keeps true (unwrapped)
// metrics, drawn with a spread below the modulo limit, and an own model of
// the LTE RSC trellis. It checks a forward and a backward step against
// max over the branches computed on the true values (compared modulo
// 2^SM_W; any two candidate sums differ by less than half the modulo
// range, the condition of modulo normalisation), and the 16 A+Gamma terms relative to A(0). Random offsets near
// the wrap-around exercise the modulo comparison.
module tb_smu;
  import tdec_pkg::*;
  int checks = 0, failures = 0;
  logic bwd;
  smv_t sm_in, sm_out;
  gv_t g;
  agv_t ag;

  smu dut (.*);

  // reference trellis: state {s1,s2,s3}, feedback s2^s3, parity a^s1^s3
  function automatic void ref_branch(input int sp, input int u, output int ns, output int p);
    int s1, s2, s3, a;
    s1 = (sp >> 2) & 1; s2 = (sp >> 1) & 1; s3 = sp & 1;
    a  = u ^ s2 ^ s3;
    p  = a ^ s1 ^ s3;
    ns = (a << 2) | (s1 << 1) | s2;
  endfunction

  initial begin
    int tv [8];
    int gm [4];
    for (int n = 0; n < 3000; n++) begin
      int base;
      base = int'($urandom_range(1023));
      for (int s = 0; s < 8; s++) tv[s] = base + int'($urandom_range(300)) - 150;
      for (int i = 0; i < 4; i++) gm[i] = int'($urandom_range(160)) - 80;
      for (int s = 0; s < 8; s++) sm_in[s] = sm_t'(tv[s]);
      for (int i = 0; i < 4; i++) g[i] = gamma_t'(gm[i]);
      bwd = 1'($urandom);
      #1;
      begin
        int best [8];
        for (int s = 0; s < 8; s++) best[s] = -100000;
        for (int sp = 0; sp < 8; sp++)
          for (int u = 0; u < 2; u++) begin
            int ns, p, v;
            ref_branch(sp, u, ns, p);
            if (!bwd) begin
              v = tv[sp] + gm[u * 2 + p];
              if (v > best[ns]) best[ns] = v;
              checks++;
              if (int'(ag[2 * sp + u]) != v - tv[0]) begin
                failures++;
                if (failures < 10) $display("FAIL ag[%0d]=%0d expected %0d", 2 * sp + u, ag[2 * sp + u], v - tv[0]);
              end
            end else begin
              v = tv[ns] + gm[u * 2 + p];
              if (v > best[sp]) best[sp] = v;
            end
          end
        for (int s = 0; s < 8; s++) begin
          checks++;
          if (sm_out[s] != sm_t'(best[s])) begin
            failures++;
            if (failures < 10) $display("FAIL bwd=%0d state %0d: %0d expected %0d", bwd, s, sm_out[s], sm_t'(best[s]));
          end
        end
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
