// Compare-select tree returning the largest of N signed inputs.
//
// log2(N) levels of two-input compare-select cells (a comparator driving a
// two-way multiplexer), as used by the LLR unit to find the best branch of
// each information bit value. N must be a power of two. Combinational.
module cs_max #(
  parameter int N = 8,
  parameter int W = 12
) (
  input  logic signed [N-1:0][W-1:0] d,
  output logic signed [W-1:0]        max
);
  localparam int LVL = $clog2(N);
  logic signed [W-1:0] t [LVL+1][N];

  always_comb begin
    for (int i = 0; i < N; i++) t[0][i] = d[i];
    for (int l = 0; l < LVL; l++) begin
      for (int i = 0; i < N; i++) t[l+1][i] = '0;
      for (int i = 0; i < (N >> (l+1)); i++)
        t[l+1][i] = (t[l][2*i+1] > t[l][2*i]) ? t[l][2*i+1] : t[l][2*i];
    end
    max = t[LVL][0];
  end
endmodule
