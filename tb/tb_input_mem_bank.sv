// Test of an input memory bank: loads random ys/yp1/yp2 values, then reads
// ys and the parity selected by half_type at independent random offsets and
// checks them one cycle later.
module tb_input_mem_bank;
  import tdec_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int D = 384;
  logic ld_we = 0, rd_en = 0, half_type = 0;
  logic [8:0] ld_addr, ys_addr, yp_addr;
  soft_t ld_ys, ld_yp1, ld_yp2, ys, yp;
  soft_t m_ys [D];
  soft_t m_p1 [D];
  soft_t m_p2 [D];

  input_mem_bank #(.D(D)) dut (.*);

  initial begin
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      ld_we = 1; ld_addr = 9'(i);
      ld_ys = soft_t'($urandom); ld_yp1 = soft_t'($urandom); ld_yp2 = soft_t'($urandom);
      m_ys[i] = ld_ys; m_p1[i] = ld_yp1; m_p2[i] = ld_yp2;
    end
    @(negedge clk); ld_we = 0;
    for (int n = 0; n < 3000; n++) begin
      int a, b, t;
      a = $urandom_range(D - 1); b = $urandom_range(D - 1); t = $urandom_range(1);
      rd_en = 1; ys_addr = 9'(a); yp_addr = 9'(b); half_type = 1'(t);
      @(negedge clk);
      rd_en = 0; half_type = 1'($urandom); #1;
      checks += 2;
      if (ys != m_ys[a]) begin failures++; if (failures < 10) $display("FAIL ys at %0d", a); end
      if (yp != (t ? m_p2[b] : m_p1[b])) begin failures++; if (failures < 10) $display("FAIL yp at %0d type %0d", b, t); end
    end
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
