// Two-input sorter of the master network.
//
// Compares the keys of the upper input (i) and the lower input (j). If the
// lower key is smaller the two inputs, key and payload, are swapped and sel
// is 1; otherwise they pass straight and sel is 0. Combinational.
module sorter2 #(
  parameter int KW = 14,
  parameter int DW = 9
) (
  input  logic [KW+DW-1:0] ai,
  input  logic [KW+DW-1:0] aj,
  output logic [KW+DW-1:0] ai_o,
  output logic [KW+DW-1:0] aj_o,
  output logic             sel
);
  always_comb begin
    sel  = aj[KW+DW-1:DW] < ai[KW+DW-1:DW];
    ai_o = sel ? aj : ai;
    aj_o = sel ? ai : aj;
  end
endmodule
