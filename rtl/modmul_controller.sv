// modmul_controller: ten-state controller of the modular multiplier.
//
// Runs two Montgomery passes on the shared datapath and moves the first
// pass's result into REGISTER for the second. A built-in down counter,
// loaded with WIDTH before each pass, counts the iterations.
//   S0 initialisation, step 0: clear accumulator and REGISTER, load counter
//   S1 load A (through MUX2) into shift register 1, B and M into registers
//   S2 accumulator loads ADDER_2's sum; counter steps down
//   S3 both shift registers shift right once
//   S4 REGISTER loads the accumulator; counter zero -> S5, else S2
//   S5 step 1: load C into shift register 1, clear the accumulator,
//      reload the counter
//   S6, S7, S8 as S2, S3, S4 without the REGISTER load; S8 zero -> S9
//   S9 halt; result valid (done)
// A full modular multiplication takes 3 + 6*WIDTH rising clock edges,
// counted from the first edge that sees control high in S0, to reach S9. The state list follows the source design. This design's own
// choices: 'control' is a level run signal (S0 waits for it, S9 returns to
// S0 when it falls); the counter counts down (the source design says both
// "increment counter" and "down counter"); "reset register" in S5 is taken
// to clear the accumulator, since REGISTER must keep step 0's result;
// resetR clears REGISTER in S0; load_R strobes REGISTER in S4; enable_R lets
// REGISTER drive MUX4 during step 1; step is 1 in S5..S9; count is the
// counter's step pulse; load_BM and done are added outputs; rst_n is an
// active-low synchronous reset. All outputs are Moore outputs.
module modmul_controller
  import modmul_pkg::*;
#(
  parameter int unsigned WIDTH = 1024
) (
  input  logic clk,
  input  logic rst_n,
  input  logic control,
  output logic reset,
  output logic resetR,
  output logic step,
  output logic load_SR1,
  output logic load_SR2,
  output logic load_R,
  output logic enable_SR1,
  output logic enable_SR2,
  output logic enable_R,
  output logic count,
  output logic load_BM,
  output logic done
);
  localparam int unsigned CW = $clog2(WIDTH + 1);

  modmul_state_t   state, state_nx;
  logic [CW-1:0]   cnt;

  always_comb begin
    state_nx = state;
    unique case (state)
      XS_S0_INIT:  if (control) state_nx = XS_S1_LOAD;
      XS_S1_LOAD:  state_nx = XS_S2_ADD;
      XS_S2_ADD:   state_nx = XS_S3_SHIFT;
      XS_S3_SHIFT: state_nx = XS_S4_CHECK;
      XS_S4_CHECK: state_nx = (cnt == '0) ? XS_S5_LOADC : XS_S2_ADD;
      XS_S5_LOADC: state_nx = XS_S6_ADD;
      XS_S6_ADD:   state_nx = XS_S7_SHIFT;
      XS_S7_SHIFT: state_nx = XS_S8_CHECK;
      XS_S8_CHECK: state_nx = (cnt == '0) ? XS_S9_HALT : XS_S6_ADD;
      XS_S9_HALT:  if (!control) state_nx = XS_S0_INIT;
      default:     state_nx = XS_S0_INIT;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) state <= XS_S0_INIT;
    else        state <= state_nx;
  end

  // Built-in iteration counter, reloaded before each pass.
  always_ff @(posedge clk) begin
    if (state == XS_S0_INIT || state == XS_S5_LOADC)   cnt <= CW'(WIDTH);
    else if (state == XS_S2_ADD || state == XS_S6_ADD) cnt <= cnt - 1'b1;
  end

  always_comb begin
    step       = (state >= XS_S5_LOADC);
    reset      = (state == XS_S0_INIT) || (state == XS_S5_LOADC);
    resetR     = (state == XS_S0_INIT);
    load_SR1   = (state == XS_S1_LOAD) || (state == XS_S5_LOADC);
    load_BM    = (state == XS_S1_LOAD);
    load_SR2   = (state == XS_S2_ADD)  || (state == XS_S6_ADD);
    count      = (state == XS_S2_ADD)  || (state == XS_S6_ADD);
    enable_SR1 = (state == XS_S3_SHIFT) || (state == XS_S7_SHIFT);
    enable_SR2 = (state == XS_S3_SHIFT) || (state == XS_S7_SHIFT);
    load_R     = (state == XS_S4_CHECK);
    enable_R   = step;
    done       = (state == XS_S9_HALT);
  end

  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
                                   count |-> (cnt != '0));
endmodule
