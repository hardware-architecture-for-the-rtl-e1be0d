// mux4: four-input multiplexer (MUX4 of the modular multiplier).
//
// y = d[sel]. In the modular multiplier it sits in front of ADDER_1 with
// select {step, a0}: in step 0 it passes 0 or B, in step 1 it passes 0 or
// the step-0 result held in REGISTER. Combinational. Which input carries
// which select code is this design's choice.
module mux4 #(
  parameter int unsigned DW = 1024
) (
  input  logic [1:0]    sel,
  input  logic [DW-1:0] d0,
  input  logic [DW-1:0] d1,
  input  logic [DW-1:0] d2,
  input  logic [DW-1:0] d3,
  output logic [DW-1:0] y
);
  always_comb begin
    unique case (sel)
      2'd0:    y = d0;
      2'd1:    y = d1;
      2'd2:    y = d2;
      default: y = d3;
    endcase
  end
endmodule
