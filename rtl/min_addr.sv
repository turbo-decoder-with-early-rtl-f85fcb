// Minimum address block.
//
// A tree of log2(N) levels of two-input compare-select cells returns the
// smallest of the N addresses produced by the interleavers. The QPP
// interleaver is contention free, so in every step the N addresses fall in
// N different memory banks at the same offset; the smallest one lies in
// bank 0 and equals that common offset, which then addresses every bank.
// Each cell compares a_i > a_j and passes a_j if so, else a_i.
// N must be a power of two. Combinational.
module min_addr #(
  parameter int N = 16,
  parameter int W = 14
) (
  input  logic [N-1:0][W-1:0] a,
  output logic [W-1:0]        amin
);
  localparam int LVL = $clog2(N);
  logic [W-1:0] t [LVL+1][N];

  always_comb begin
    for (int i = 0; i < N; i++) t[0][i] = a[i];
    for (int l = 0; l < LVL; l++) begin
      for (int i = 0; i < N; i++) t[l+1][i] = '0;
      for (int i = 0; i < (N >> (l+1)); i++)
        t[l+1][i] = (t[l][2*i] > t[l][2*i+1]) ? t[l][2*i+1] : t[l][2*i];
    end
    amin = t[LVL][0];
  end
endmodule
