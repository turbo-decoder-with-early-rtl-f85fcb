// Select block of the slave network: two multiplexers that swap the two
// data inputs when sel is 1 and pass them straight otherwise. Combinational.
module select2 #(
  parameter int DW = 12
) (
  input  logic [DW-1:0] d0,
  input  logic [DW-1:0] d1,
  input  logic          sel,
  output logic [DW-1:0] d0_o,
  output logic [DW-1:0] d1_o
);
  assign d0_o = sel ? d1 : d0;
  assign d1_o = sel ? d0 : d1;
endmodule
