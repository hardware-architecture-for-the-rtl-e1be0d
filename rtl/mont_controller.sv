// mont_controller: six-state controller of the Montgomery multiplier.
//
// Sequences the load and shift operations of the two shift registers and
// counts the iterations with a built-in down counter, loaded with WIDTH
// (one iteration per bit of the multiplier):
//   S0 initialisation: clear the accumulator, load the counter
//   S1 load A into shift register 1, B and M into their registers
//   S2 adders settle; accumulator loads ADDER_2's sum; counter steps down
//   S3 both shift registers shift right once
//   S4 counter zero -> S5, else back to S2
//   S5 halt; result valid (done)
// One multiplication therefore takes 2 + 3*WIDTH rising clock edges,
// counted from the first edge that sees control high in S0, to reach S5. The state list follows the source design. This design's own
// choices: 'control' is a level run signal (S0 waits for it to rise, S5
// returns to S0 when it falls), 'count' is the counter's step pulse, the
// counter counts down (the source design says both "increment counter" and
// "down counter"), load_BM and done are added outputs, and rst_n is an
// active-low synchronous reset into S0. All outputs are Moore outputs.
module mont_controller
  import modmul_pkg::*;
#(
  parameter int unsigned WIDTH = 1024
) (
  input  logic clk,
  input  logic rst_n,
  input  logic control,
  output logic reset,
  output logic load_SR1,
  output logic load_SR2,
  output logic enable_SR1,
  output logic enable_SR2,
  output logic count,
  output logic load_BM,
  output logic done
);
  localparam int unsigned CW = $clog2(WIDTH + 1);

  mont_state_t     state, state_nx;
  logic [CW-1:0]   cnt;

  always_comb begin
    state_nx = state;
    unique case (state)
      MS_S0_INIT:  if (control) state_nx = MS_S1_LOAD;
      MS_S1_LOAD:  state_nx = MS_S2_ADD;
      MS_S2_ADD:   state_nx = MS_S3_SHIFT;
      MS_S3_SHIFT: state_nx = MS_S4_CHECK;
      MS_S4_CHECK: state_nx = (cnt == '0) ? MS_S5_HALT : MS_S2_ADD;
      MS_S5_HALT:  if (!control) state_nx = MS_S0_INIT;
      default:     state_nx = MS_S0_INIT;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) state <= MS_S0_INIT;
    else        state <= state_nx;
  end

  // Built-in iteration counter.
  always_ff @(posedge clk) begin
    if (state == MS_S0_INIT)     cnt <= CW'(WIDTH);
    else if (state == MS_S2_ADD) cnt <= cnt - 1'b1;
  end

  always_comb begin
    reset      = (state == MS_S0_INIT);
    load_SR1   = (state == MS_S1_LOAD);
    load_BM    = (state == MS_S1_LOAD);
    load_SR2   = (state == MS_S2_ADD);
    count      = (state == MS_S2_ADD);
    enable_SR1 = (state == MS_S3_SHIFT);
    enable_SR2 = (state == MS_S3_SHIFT);
    done       = (state == MS_S5_HALT);
  end

  // The counter must never step below zero.
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
                                   (state == MS_S2_ADD) |-> (cnt != '0));
endmodule
