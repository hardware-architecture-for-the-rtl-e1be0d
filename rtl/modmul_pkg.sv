// modmul_pkg: types shared by the Montgomery and modular multipliers.
//
// Holds the state encodings of the two controllers. The state names S0..S5
// and S0..S9 are the ones used by the state lists of the design; the binary
// codes are this implementation's choice (plain sequential numbering).
package modmul_pkg;

  // Six states of the stand-alone Montgomery multiplier controller.
  typedef enum logic [2:0] {
    MS_S0_INIT    = 3'd0,  // initialisation: clear accumulator, load counter
    MS_S1_LOAD    = 3'd1,  // load A into shift register 1, B and M into registers
    MS_S2_ADD     = 3'd2,  // adders settle; accumulator loads the sum; counter steps
    MS_S3_SHIFT   = 3'd3,  // both shift registers shift right once
    MS_S4_CHECK   = 3'd4,  // counter zero? -> S5 else S2
    MS_S5_HALT    = 3'd5   // halt, result valid
  } mont_state_t;

  // Ten states of the modular multiplier controller (two Montgomery passes).
  typedef enum logic [3:0] {
    XS_S0_INIT    = 4'd0,  // initialisation, step 0
    XS_S1_LOAD    = 4'd1,  // load A, B, M
    XS_S2_ADD     = 4'd2,  // step 0 iteration: accumulate
    XS_S3_SHIFT   = 4'd3,  // step 0 iteration: shift
    XS_S4_CHECK   = 4'd4,  // copy accumulator to REGISTER, test counter
    XS_S5_LOADC   = 4'd5,  // load C, clear accumulator, step 1
    XS_S6_ADD     = 4'd6,  // step 1 iteration: accumulate
    XS_S7_SHIFT   = 4'd7,  // step 1 iteration: shift
    XS_S8_CHECK   = 4'd8,  // test counter
    XS_S9_HALT    = 4'd9   // halt, result valid
  } modmul_state_t;

endpackage
