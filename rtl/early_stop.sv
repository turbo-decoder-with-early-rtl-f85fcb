// Early stopping unit.
//
// A one-bit register tells whether every extrinsic value has reached the
// threshold. sel = 1 sets it to 1 at the start of a half iteration, sel = 0
// holds it (forward recursion) and sel = 2 loads register AND (AND of the
// N status bits) (backward recursion). After the last backward step of a
// half iteration, stop = 1 means the decoding can end.
module early_stop #(
  parameter int N = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [1:0]   sel,
  input  logic [N-1:0] status,
  output logic         stop
);
  logic nxt;

  always_comb begin
    unique case (sel)
      2'd1:    nxt = 1'b1;
      2'd2:    nxt = stop & (&status);
      default: nxt = stop;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) stop <= 1'b0;
    else        stop <= nxt;
endmodule
