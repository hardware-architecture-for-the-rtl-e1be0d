// modular_multiplier: modular multiplier built from two Montgomery passes.
//
// Montgomery multiplication returns A*B*2^-WIDTH instead of A*B mod M. This
// unit removes the factor by running the Montgomery datapath twice:
//   step 0: R0 = A*B*2^-WIDTH       (multiplier A, multiplicand B)
//   step 1: R  = R0*C*2^-WIDTH      (multiplier C, multiplicand R0)
// With the constant C = 2^(2*WIDTH) mod M, supplied by the user, R is
// congruent to A*B (mod M). MUX2 chooses A or C as the multiplier loaded
// into the shift register that supplies a0. MUX4, selected by {step, a0},
// passes 0 or B in step 0 and 0 or REGISTER in step 1 to ADDER_1. REGISTER
// copies the accumulator at the end of every step-0 iteration, so it holds
// R0 when step 1 starts; the accumulator is then cleared. The rest of the
// datapath (ADDER_1, MUX2_2 selected by r0, ADDER_2, accumulator shift
// register) is that of the Montgomery multiplier. No final subtraction is
// made: for odd M and A, B, C < M the result is below 3M.
//
// Interface: hold A, B, M, C stable and raise 'control'; 'done' rises
// 3 + 6*WIDTH rising clock edges after control is raised in S0 and stays
// high, with r valid, until 'control' falls. 'count' pulses once per iteration and
// 'step' shows which pass runs. rst_n is synchronous, active low.
//
// Datapath and sequencing follow the source design. This design's own choices:
// the internal width WIDTH+3 (sums stay below 6M), the WIDTH+2-bit result,
// the MUX4 input order, REGISTER gated onto MUX4 by enable_R, and the
// handshake. The source design gives C as 2^n mod M; the value 2^(2*WIDTH) mod M
// is what makes the two passes return A*B mod M.
module modular_multiplier #(
  parameter int unsigned WIDTH = 1024
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             control,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] m,
  input  logic [WIDTH-1:0] c,
  output logic [WIDTH+1:0] r,
  output logic             done,
  output logic             count,
  output logic             step
);
  localparam int unsigned DW = WIDTH + 3;

  logic reset, resetR, load_SR1, load_SR2, load_R;
  logic enable_SR1, enable_SR2, enable_R, load_BM;
  logic a0, r0;
  logic [WIDTH-1:0] b_q, m_q, mult;
  logic [DW-1:0] acc, reg_q, reg_out, sel_x, sel_m, sum1, sum2;

  modmul_controller #(.WIDTH(WIDTH)) u_ctrl (
    .clk, .rst_n, .control, .reset, .resetR, .step, .load_SR1, .load_SR2,
    .load_R, .enable_SR1, .enable_SR2, .enable_R, .count, .load_BM, .done
  );

  operand_register #(.DW(WIDTH)) u_reg_b (
    .clk, .clear(1'b0), .load(load_BM), .d(b), .q(b_q));
  operand_register #(.DW(WIDTH)) u_reg_m (
    .clk, .clear(1'b0), .load(load_BM), .d(m), .q(m_q));

  // REGISTER: carries the step-0 result into step 1.
  operand_register #(.DW(DW)) u_reg_r (
    .clk, .clear(resetR), .load(load_R), .d(acc), .q(reg_q));
  assign reg_out = enable_R ? reg_q : '0;

  // MUX2: multiplier operand A (step 0) or constant C (step 1).
  mux2 #(.DW(WIDTH)) u_mux_ac (.sel(step), .d0(a), .d1(c), .y(mult));

  // SHIFT REGISTER_1.
  shift_register_a #(.WIDTH(WIDTH)) u_sr1 (
    .clk, .load(load_SR1), .shift(enable_SR1), .d(mult), .a0);

  // MUX4: {step, a0} = 00 -> 0, 01 -> B, 10 -> 0, 11 -> REGISTER.
  mux4 #(.DW(DW)) u_mux4 (
    .sel({step, a0}), .d0('0), .d1(DW'(b_q)), .d2('0), .d3(reg_out), .y(sel_x));

  adder #(.DW(DW)) u_add1 (.x(acc), .y(sel_x), .s(sum1));

  assign r0 = sum1[0];
  mux2 #(.DW(DW)) u_mux_m (.sel(r0), .d0('0), .d1(DW'(m_q)), .y(sel_m));
  adder #(.DW(DW)) u_add2 (.x(sum1), .y(sel_m), .s(sum2));

  // SHIFT REGISTER_2: the accumulator.
  shift_register_r #(.DW(DW)) u_sr2 (
    .clk, .clear(reset), .load(load_SR2), .shift(enable_SR2), .d(sum2), .q(acc));

  assign r = acc[WIDTH+1:0];

  a_even: assert property (@(posedge clk) disable iff (!rst_n) load_SR2 |-> !sum2[0]);
endmodule
