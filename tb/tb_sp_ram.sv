// Test of the single-port memory: random writes and reads against an array
// model, checking the one-cycle read latency and that rdata holds when the
// memory is not read. Sizes of the LLR memory (8 x 384) and the beta stakes
// memory (80 x 12).
module tb_sp_ram;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic en, we;
  logic [8:0] addr;
  logic [7:0] wdata, rdata;
  logic en2, we2;
  logic [3:0] addr2;
  logic [79:0] wdata2, rdata2;

  sp_ram #(.W(8), .D(384)) dut (.clk, .en, .we, .addr, .wdata, .rdata);
  sp_ram #(.W(80), .D(12)) dut2 (.clk, .en(en2), .we(we2), .addr(addr2), .wdata(wdata2), .rdata(rdata2));

  logic [7:0] m [384];
  logic [79:0] m2 [12];

  initial begin
    logic [7:0] exp1;
    logic [79:0] exp2;
    en = 1; we = 1; en2 = 1; we2 = 1;
    for (int i = 0; i < 384; i++) begin
      @(negedge clk);
      addr = 9'(i); wdata = 8'($urandom); m[i] = wdata;
      addr2 = 4'(i % 12); wdata2 = {$urandom, $urandom, 16'($urandom)}; m2[i % 12] = wdata2;
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      en = 1'($urandom); we = ($urandom_range(3) == 0);
      addr = 9'($urandom_range(383)); wdata = 8'($urandom);
      en2 = 1'($urandom); we2 = ($urandom_range(3) == 0);
      addr2 = 4'($urandom_range(11)); wdata2 = {$urandom, $urandom, 16'($urandom)};
      exp1 = rdata; exp2 = rdata2;
      if (en && !we) exp1 = m[addr];
      if (en && we) m[addr] = wdata;
      if (en2 && !we2) exp2 = m2[addr2];
      if (en2 && we2) m2[addr2] = wdata2;
      @(negedge clk);
      en = 0; en2 = 0;
      checks += 2;
      if (rdata != exp1) begin failures++; if (failures < 10) $display("FAIL ram1 %0h vs %0h", rdata, exp1); end
      if (rdata2 != exp2) begin failures++; if (failures < 10) $display("FAIL ram2"); end
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
