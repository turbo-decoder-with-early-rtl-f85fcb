// Input memory bank of one sub-block.
//
// Three single-port memories hold the channel soft values ys, yp1 and yp2
// of one sub-block (the bits of memory bank b are block indices
// b*Ks .. b*Ks+Ks-1). The host fills them through the load port while the
// decoder is idle. During decoding ys is read at the offset found by the
// minimum address block and the parity memory selected by half_type
// (0: yp1, 1: yp2) at the natural offset, both with one cycle of latency.
module input_mem_bank
  import tdec_pkg::*;
#(
  parameter int D = 384,
  localparam int A = (D > 1) ? $clog2(D) : 1
) (
  input  logic         clk,
  input  logic         ld_we,
  input  logic [A-1:0] ld_addr,
  input  soft_t        ld_ys,
  input  soft_t        ld_yp1,
  input  soft_t        ld_yp2,
  input  logic         rd_en,
  input  logic         half_type,
  input  logic [A-1:0] ys_addr,
  input  logic [A-1:0] yp_addr,
  output soft_t        ys,
  output soft_t        yp
);
  soft_t yp1_q, yp2_q;
  logic  type_q;

  sp_ram #(.W(Y_W), .D(D)) u_ys (
    .clk, .en(ld_we | rd_en), .we(ld_we), .addr(ld_we ? ld_addr : ys_addr),
    .wdata(ld_ys), .rdata(ys)
  );
  sp_ram #(.W(Y_W), .D(D)) u_yp1 (
    .clk, .en(ld_we | (rd_en & ~half_type)), .we(ld_we), .addr(ld_we ? ld_addr : yp_addr),
    .wdata(ld_yp1), .rdata(yp1_q)
  );
  sp_ram #(.W(Y_W), .D(D)) u_yp2 (
    .clk, .en(ld_we | (rd_en & half_type)), .we(ld_we), .addr(ld_we ? ld_addr : yp_addr),
    .wdata(ld_yp2), .rdata(yp2_q)
  );

  always_ff @(posedge clk) if (rd_en) type_q <= half_type;

  assign yp = type_q ? yp2_q : yp1_q;
endmodule
