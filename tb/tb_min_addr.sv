// Test of the minimum address block with 16 and 8 inputs: random address
// vectors (including repeated values) against a linear search.
module tb_min_addr;
  int checks = 0, failures = 0;
  logic [15:0][13:0] a;
  logic [13:0] amin;
  logic [7:0][13:0] a8;
  logic [13:0] amin8;

  min_addr #(.N(16), .W(14)) dut (.a(a), .amin(amin));
  min_addr #(.N(8), .W(14)) dut8 (.a(a8), .amin(amin8));

  initial begin
    for (int n = 0; n < 5000; n++) begin
      int m, m8;
      for (int i = 0; i < 16; i++) a[i] = 14'($urandom_range((n % 2) ? 16383 : 20));
      for (int i = 0; i < 8; i++) a8[i] = a[15 - i];
      #1;
      m = 16383; m8 = 16383;
      for (int i = 0; i < 16; i++) if (int'(a[i]) < m) m = int'(a[i]);
      for (int i = 0; i < 8; i++) if (int'(a8[i]) < m8) m8 = int'(a8[i]);
      checks += 2;
      if (int'(amin) != m) begin failures++; if (failures < 10) $display("FAIL min16 %0d vs %0d", amin, m); end
      if (int'(amin8) != m8) begin failures++; if (failures < 10) $display("FAIL min8 %0d vs %0d", amin8, m8); end
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
