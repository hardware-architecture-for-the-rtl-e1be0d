// mux2: two-input multiplexer (MUX2_1 and MUX2_2 of the Montgomery datapath,
// MUX2 of the modular multiplier).
//
// y = d1 when sel is 1, otherwise d0. In the datapath one input is tied to
// zero, so the multiplexer passes "0 or B" (selected by a0) and "0 or M"
// (selected by r0). Purely combinational; the width DW is this design's
// choice, the source design does not fix it.
module mux2 #(
  parameter int unsigned DW = 1024
) (
  input  logic          sel,
  input  logic [DW-1:0] d0,
  input  logic [DW-1:0] d1,
  output logic [DW-1:0] y
);
  always_comb y = sel ? d1 : d0;
endmodule
