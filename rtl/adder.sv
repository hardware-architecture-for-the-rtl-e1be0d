// adder: DW-bit binary adder (ADDER_1 and ADDER_2 of the datapath).
//
// s = x + y modulo 2^DW, combinational. ADDER_1 forms R + a_i*B and ADDER_2
// adds q*M (q = bit 0 of ADDER_1's sum) so that the result is even. The
// datapath sizes DW so that no sum ever wraps. The source design gives only the
// adders' function; a plain ripple/behavioural '+' is this design's choice.
module adder #(
  parameter int unsigned DW = 1027
) (
  input  logic [DW-1:0] x,
  input  logic [DW-1:0] y,
  output logic [DW-1:0] s
);
  always_comb s = x + y;
endmodule
