// shift_register_r: accumulator shift register (SHIFT REGISTER_2).
//
// Holds the running Montgomery partial product R. At the start of a pass it
// is cleared (R = 0). In each iteration it first loads ADDER_2's even sum
// R + a_i*B + q*M, then shifts right by one, which is the exact division by
// two of the algorithm. Its output feeds back into ADDER_1 and is the
// result. Priority clear > load > shift is this design's choice.
module shift_register_r #(
  parameter int unsigned DW = 1027
) (
  input  logic          clk,
  input  logic          clear,
  input  logic          load,
  input  logic          shift,
  input  logic [DW-1:0] d,
  output logic [DW-1:0] q
);
  always_ff @(posedge clk) begin
    if (clear)      q <= '0;
    else if (load)  q <= d;
    else if (shift) q <= {1'b0, q[DW-1:1]};
  end
endmodule
