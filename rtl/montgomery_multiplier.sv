// montgomery_multiplier: bit-serial radix-2 Montgomery modular multiplier.
//
// Computes R with R = A*B*2^-WIDTH (mod M), for an odd modulus M and
// operands A, B < M. The multiplier A is scanned from its least significant
// bit. Each iteration i adds a_i*B to the accumulator R (MUX2_1, ADDER_1),
// adds M when that sum is odd (MUX2_2 selected by its bit r0, ADDER_2) so
// that it becomes even, and halves it (the accumulator shift register
// loads the sum and then shifts right once). After WIDTH iterations R is
// congruent to A*B*2^-WIDTH and below 2M; no final subtraction is made, so
// R may still exceed M.
//
// Interface: hold A, B, M stable and raise 'control'; 'done' rises
// 2 + 3*WIDTH rising clock edges after control is raised in S0 and stays
// high, with r valid, until 'control' falls. 'count' pulses once per iteration (the
// controller's counter step). rst_n is synchronous, active low.
//
// The datapath (two multiplexers, two adders, two shift registers, operand
// registers, controller) follows the source design. This design's own choices:
// the internal width WIDTH+3 (sums stay below 4M), the WIDTH+2-bit result
// port (the source design draws it WIDTH bits wide, but an unreduced result can
// reach 2M), and the handshake.
module montgomery_multiplier #(
  parameter int unsigned WIDTH = 1024
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             control,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] m,
  output logic [WIDTH+1:0] r,
  output logic             done,
  output logic             count
);
  localparam int unsigned DW = WIDTH + 3;

  logic          reset, load_SR1, load_SR2, enable_SR1, enable_SR2, load_BM;
  logic          a0, r0;
  logic [WIDTH-1:0] b_q, m_q;
  logic [DW-1:0] acc, sel_b, sel_m, sum1, sum2;

  mont_controller #(.WIDTH(WIDTH)) u_ctrl (
    .clk, .rst_n, .control, .reset, .load_SR1, .load_SR2,
    .enable_SR1, .enable_SR2, .count, .load_BM, .done
  );

  // Multiplicand and modulus registers.
  operand_register #(.DW(WIDTH)) u_reg_b (
    .clk, .clear(1'b0), .load(load_BM), .d(b), .q(b_q));
  operand_register #(.DW(WIDTH)) u_reg_m (
    .clk, .clear(1'b0), .load(load_BM), .d(m), .q(m_q));

  // SHIFT REGISTER_1: multiplier bits a_i.
  shift_register_a #(.WIDTH(WIDTH)) u_sr1 (
    .clk, .load(load_SR1), .shift(enable_SR1), .d(a), .a0);

  // MUX2_1 and ADDER_1: R + a_i*B.
  mux2 #(.DW(DW)) u_mux_b (.sel(a0), .d0('0), .d1(DW'(b_q)), .y(sel_b));
  adder #(.DW(DW)) u_add1 (.x(acc), .y(sel_b), .s(sum1));

  // MUX2_2 and ADDER_2: add M when the sum is odd.
  assign r0 = sum1[0];
  mux2 #(.DW(DW)) u_mux_m (.sel(r0), .d0('0), .d1(DW'(m_q)), .y(sel_m));
  adder #(.DW(DW)) u_add2 (.x(sum1), .y(sel_m), .s(sum2));

  // SHIFT REGISTER_2: the accumulator R; the right shift divides by two.
  shift_register_r #(.DW(DW)) u_sr2 (
    .clk, .clear(reset), .load(load_SR2), .shift(enable_SR2), .d(sum2), .q(acc));

  assign r = acc[WIDTH+1:0];

  // The sum loaded into the accumulator is always even, so the shift is exact.
  a_even: assert property (@(posedge clk) disable iff (!rst_n) load_SR2 |-> !sum2[0]);
endmodule
