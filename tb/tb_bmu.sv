// Test of the branch metric unit: random ys, yp, lu; every output is
// compared with u*(ys+lu) + p*yp for u, p in {+1,-1}.
module tb_bmu;
  import tdec_pkg::*;
  int checks = 0, failures = 0;
  soft_t ys, yp;
  llr_t lu;
  sys_t s;
  gv_t g;

  bmu dut (.*);

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int e;
      ys = soft_t'($urandom); yp = soft_t'($urandom); lu = llr_t'($urandom);
      #1;
      for (int u = 0; u < 2; u++)
        for (int p = 0; p < 2; p++) begin
          e = (u ? 1 : -1) * (int'(ys) + int'(lu)) + (p ? 1 : -1) * int'(yp);
          checks++;
          if (int'(g[{1'(u), 1'(p)}]) != e) begin
            failures++;
            if (failures < 10) $display("FAIL ys=%0d yp=%0d lu=%0d u=%0d p=%0d: %0d, expected %0d", ys, yp, lu, u, p, g[{1'(u), 1'(p)}], e);
          end
        end
      checks++;
      if (int'(s) != int'(ys) + int'(lu)) failures++;
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
