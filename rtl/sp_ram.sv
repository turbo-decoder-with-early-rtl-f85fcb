// Single-port synchronous memory.
//
// One access per cycle: when en is high, we = 1 writes wdata at addr and
// we = 0 reads addr, the data appearing on rdata in the next cycle (rdata
// holds otherwise). Used for the LLR memories, the A+Gamma memories, the
// a-priori buffers and the beta stakes memories. The contents are not
// reset. Written as an array, so synthesis maps it to a memory macro.
module sp_ram #(
  parameter int W = 8,
  parameter int D = 384,
  localparam int A = (D > 1) ? $clog2(D) : 1
) (
  input  logic         clk,
  input  logic         en,
  input  logic         we,
  input  logic [A-1:0] addr,
  input  logic [W-1:0] wdata,
  output logic [W-1:0] rdata
);
  logic [W-1:0] mem [D];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
