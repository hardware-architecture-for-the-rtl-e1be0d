// shift_register_a: multiplier shift register (SHIFT REGISTER_1).
//
// Holds the multiplier operand (A, or the constant C in the second pass of
// the modular multiplier) and presents its least significant bit as a0.
// Each iteration the controller shifts it right once, so that a0 carries
// a_i in iteration i. On a rising edge: load writes d, else shift moves the
// contents right by one with 0 entering at the top, else it holds. The
// priority and the zero fill are this design's choice.
module shift_register_a #(
  parameter int unsigned WIDTH = 1024
) (
  input  logic             clk,
  input  logic             load,
  input  logic             shift,
  input  logic [WIDTH-1:0] d,
  output logic             a0
);
  logic [WIDTH-1:0] q;

  always_ff @(posedge clk) begin
    if (load)       q <= d;
    else if (shift) q <= {1'b0, q[WIDTH-1:1]};
  end

  assign a0 = q[0];
endmodule
