// modmul_top: the two multipliers of this design side by side.
//
// mod_*: the modular multiplier, the main unit. It returns a value
//        congruent to A*B mod M (below 3M) when given C = 2^(2*WIDTH) mod M.
// mm_*:  the stand-alone Montgomery multiplier on which it is based. It
//        returns a value congruent to A*B*2^-WIDTH mod M (below 2M).
// Each has its own run signal ('control'), 'done' flag and per-iteration
// 'count' pulse; mod_step shows which of the two passes runs; see the two
// modules for timing (3 + 6*WIDTH and 2 + 3*WIDTH cycles). Operands are
// WIDTH bits, results WIDTH+2 bits. Clock and synchronous active-low reset
// are shared. Placing both units in one top is this design's choice.
module modmul_top #(
  parameter int unsigned WIDTH = 1024
) (
  input  logic             clk,
  input  logic             rst_n,
  // modular multiplier
  input  logic             mod_control,
  input  logic [WIDTH-1:0] mod_a,
  input  logic [WIDTH-1:0] mod_b,
  input  logic [WIDTH-1:0] mod_m,
  input  logic [WIDTH-1:0] mod_c,
  output logic [WIDTH+1:0] mod_r,
  output logic             mod_done,
  output logic             mod_count,
  output logic             mod_step,
  // Montgomery multiplier
  input  logic             mm_control,
  input  logic [WIDTH-1:0] mm_a,
  input  logic [WIDTH-1:0] mm_b,
  input  logic [WIDTH-1:0] mm_m,
  output logic [WIDTH+1:0] mm_r,
  output logic             mm_done,
  output logic             mm_count
);
  modular_multiplier #(.WIDTH(WIDTH)) u_modmul (
    .clk, .rst_n, .control(mod_control), .a(mod_a), .b(mod_b), .m(mod_m),
    .c(mod_c), .r(mod_r), .done(mod_done),
    .count(mod_count), .step(mod_step));

  montgomery_multiplier #(.WIDTH(WIDTH)) u_mont (
    .clk, .rst_n, .control(mm_control), .a(mm_a), .b(mm_b), .m(mm_m),
    .r(mm_r), .done(mm_done), .count(mm_count));
endmodule
