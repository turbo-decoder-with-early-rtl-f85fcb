// Master-slave Batcher interconnect between N MAP decoders and N memory
// banks.
//
// Master: a Batcher (bitonic, all comparators ascending) sorting network
// of sorter2 cells orders the N addresses of the MAP decoders ascending;
// a payload travels with each address (the extrinsic write data in the
// backward recursion). Output position i is memory bank i, because the
// contention-free interleaver puts the i-th smallest address in bank i.
// Each cell's swap decision is brought out on sel.
// Slave: select2 cells driven by a copy of those decisions, applied in the
// reverse stage order, undo the permutation, so the data read from bank i
// reaches the MAP decoder whose address was the i-th smallest.
// The network has S = log2(N)*(log2(N)+1)/2 stages of N/2 cells; sel is
// S*N bits, bit [s][i] belonging to the cell whose upper input is i; the
// other half of the bits (lower inputs) are constant 0 and unused.
// With N = 1 there is one stage that passes the single port straight.
// The sorting network type is named by the document; its layout here is
// the standard bitonic one. Both halves are combinational; the caller
// registers sel to match the one-cycle memory read latency.
module batcher_net #(
  parameter int N  = 16,
  parameter int KW = 14,
  parameter int DW = 9,     // master payload
  parameter int SW = 12,    // slave data
  localparam int LOG = $clog2(N),
  localparam int S   = (LOG == 0) ? 1 : (LOG * (LOG + 1)) / 2
) (
  input  logic [N-1:0][KW-1:0] m_key,
  input  logic [N-1:0][DW-1:0] m_data,
  output logic [N-1:0][KW-1:0] m_key_o,
  output logic [N-1:0][DW-1:0] m_data_o,
  output logic [S-1:0][N-1:0]  m_sel,
  input  logic [S-1:0][N-1:0]  s_sel,
  input  logic [N-1:0][SW-1:0] s_data,
  output logic [N-1:0][SW-1:0] s_data_o
);
  // stage s -> (block size 2^k, first sub-stage flag, distance j)
  function automatic int st_k(input int s);
    int c = 0;
    for (int k = 1; k <= LOG; k++)
      for (int j = k; j >= 1; j--) begin
        if (c == s) return k;
        c++;
      end
    return 1;
  endfunction
  function automatic int st_j(input int s);
    int c = 0;
    for (int k = 1; k <= LOG; k++)
      for (int j = k; j >= 1; j--) begin
        if (c == s) return j;
        c++;
      end
    return 1;
  endfunction
  // partner of position i in stage s; negative when i is the lower input
  function automatic int partner(input int s, input int i);
    int k = st_k(s);
    int j = st_j(s);
    int blk, off, d;
    if (j == k) begin
      blk = 1 << k;
      off = i % blk;
      if (off < blk / 2) return i - off + blk - 1 - off;
      return -1;
    end
    d = 1 << (j - 1);
    if ((i % (2 * d)) < d) return i + d;
    return -1;
  endfunction

  logic [KW+DW-1:0] m_in [N];
  logic [SW-1:0]    s_in [N];

  for (genvar i = 0; i < N; i++) begin : g_io
    assign m_in[i] = {m_key[i], m_data[i]};
    assign {m_key_o[i], m_data_o[i]} = g_st[S-1].mo[i];
    assign s_in[i] = s_data[i];
    assign s_data_o[i] = g_st[S-1].so[i];
  end

  // one generate block per stage, so every stage has its own nets
  for (genvar s = 0; s < S; s++) begin : g_st
    logic [KW+DW-1:0] mi [N];
    logic [KW+DW-1:0] mo [N];
    logic [SW-1:0]    si [N];
    logic [SW-1:0]    so [N];

    if (s == 0) begin : g_first
      assign mi = m_in;
      assign si = s_in;
    end else begin : g_next
      assign mi = g_st[s-1].mo;
      assign si = g_st[s-1].so;
    end

    for (genvar i = 0; i < N; i++) begin : g_c
      localparam int P = partner(s, i);
      // slave stage s applies master stage S-1-s
      localparam int PS = partner(S - 1 - s, i);
      if (P >= N) begin : g_pass
        assign mo[i] = mi[i];
        assign m_sel[s][i] = 1'b0;
      end else if (P >= 0) begin : g_sort
        sorter2 #(.KW(KW), .DW(DW)) u_sort (
          .ai(mi[i]), .aj(mi[P]), .ai_o(mo[i]), .aj_o(mo[P]), .sel(m_sel[s][i])
        );
      end else begin : g_nosort
        assign m_sel[s][i] = 1'b0;
      end
      if (PS >= N) begin : g_spass
        assign so[i] = si[i];
      end else if (PS >= 0) begin : g_sel
        select2 #(.DW(SW)) u_sel (
          .d0(si[i]), .d1(si[PS]), .sel(s_sel[S-1-s][i]), .d0_o(so[i]), .d1_o(so[PS])
        );
      end
    end
  end
endmodule
