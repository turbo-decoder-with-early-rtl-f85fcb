// Test of the early stopping unit: random half iterations (init, forward
// hold cycles, backward AND cycles with mostly-set status vectors) against
// a behavioural model of the flag.
module tb_early_stop;
  localparam int N = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [1:0] sel;
  logic [N-1:0] status;
  logic stop;
  bit model;

  always #5 clk = ~clk;
  early_stop #(.N(N)) dut (.*);

  initial begin
    sel = 0; status = '1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int h = 0; h < 300; h++) begin
      sel = 2'd1; @(negedge clk); model = 1;
      for (int c = 0; c < 5; c++) begin
        sel = 2'd0; status = N'($urandom); @(negedge clk);
      end
      for (int c = 0; c < 8; c++) begin
        sel = 2'd2;
        status = ($urandom_range(30) == 0) ? ~(N'(1) << $urandom_range(N - 1)) : '1;
        if (h % 3 == 0) status = '1;
        model = model & (&status);
        @(negedge clk);
        checks++;
        if (stop != model) begin failures++; $display("FAIL h=%0d c=%0d", h, c); end
      end
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
