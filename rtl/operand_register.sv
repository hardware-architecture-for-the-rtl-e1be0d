// operand_register: register with synchronous clear and load enable.
//
// Used for the multiplicand B, the modulus M (both loaded when a
// multiplication starts) and, in the modular multiplier, for REGISTER, which
// carries the step-0 result into step 1. On a rising clock edge: clear
// writes 0, else load writes d, else q holds. Clear-over-load priority is
// this design's choice.
module operand_register #(
  parameter int unsigned DW = 1024
) (
  input  logic          clk,
  input  logic          clear,
  input  logic          load,
  input  logic [DW-1:0] d,
  output logic [DW-1:0] q
);
  always_ff @(posedge clk) begin
    if (clear)     q <= '0;
    else if (load) q <= d;
  end
endmodule
