// tb_modmul_top: end-to-end test of the whole design at its default size
// (WIDTH = 1024, no parameter override).
// For each test vector both units run at the same time on the same A, B, M:
//  - the modular multiplier, with C = 2^(2*WIDTH) mod M computed here, must
//    return a value below 3M congruent to A*B mod M, equal to two passes of
//    a bit-serial software model of the Montgomery algorithm;
//  - the Montgomery multiplier must return the one-pass model value, below
//    2M and with r*2^WIDTH congruent to A*B mod M;
//  - latencies must be 3 + 6*WIDTH and 2 + 3*WIDTH clock edges.
// Vectors: random 1024-bit odd moduli with A, B < M, the largest odd
// modulus with A = B = M-1, a tiny modulus, and zero operands. Operations
// run back to back through the control/done handshake.
// Each datapath mechanism is counted and must occur at least once: an
// iteration adding the multiplicand (a0 = 1) and one adding nothing
// (a0 = 0), one adding M (r0 = 1) and one not (r0 = 0), in both units; the
// switch from step 0 to step 1; REGISTER loads; the accumulator clear
// that starts step 1; and a return from halt to S0 on a falling control.
module tb_modmul_top;
  localparam int unsigned W  = 1024;
  localparam int unsigned LW = 2*W + 4;
  typedef logic [LW-1:0] wide_t;

  logic clk = 1'b0;
  logic rst_n;
  logic mod_control, mod_done, mod_count, mod_step;
  logic mm_control, mm_done, mm_count;
  logic [W-1:0] a, b, m, c;
  logic [W+1:0] mod_r, mm_r;
  int checks = 0, failures = 0;

  modmul_top dut (
    .clk, .rst_n,
    .mod_control, .mod_a(a), .mod_b(b), .mod_m(m), .mod_c(c), .mod_r, .mod_done,
    .mod_count, .mod_step,
    .mm_control, .mm_a(a), .mm_b(b), .mm_m(m), .mm_r, .mm_done, .mm_count);

  always #5 clk = ~clk;

  // mechanism counters
  int n_mod_a1, n_mod_a0, n_mod_r1, n_mod_r0, n_mm_a1, n_mm_a0, n_mm_r1, n_mm_r0;
  int n_step_switch, n_reg_load, n_acc_clear_step1, n_halt_to_s0, n_mod_pulses, n_mm_pulses;
  logic prev_step, prev_mod_done, prev_mm_done;

  always @(negedge clk) if (rst_n) begin
    if (mod_count) begin
      n_mod_pulses++;
      if (dut.u_modmul.a0) n_mod_a1++; else n_mod_a0++;
      if (dut.u_modmul.r0) n_mod_r1++; else n_mod_r0++;
    end
    if (mm_count) begin
      n_mm_pulses++;
      if (dut.u_mont.a0) n_mm_a1++; else n_mm_a0++;
      if (dut.u_mont.r0) n_mm_r1++; else n_mm_r0++;
    end
    if (mod_step && !prev_step) n_step_switch++;
    if (dut.u_modmul.load_R) n_reg_load++;
    if (dut.u_modmul.reset && mod_step) n_acc_clear_step1++;
    if (prev_mod_done && !mod_done) n_halt_to_s0++;
    if (prev_mm_done && !mm_done) n_halt_to_s0++;
    prev_step = mod_step;
    prev_mod_done = mod_done;
    prev_mm_done = mm_done;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic wide_t modred(wide_t x, wide_t md);
    wide_t rr = '0;
    for (int i = LW-1; i >= 0; i--) begin
      rr = (rr << 1) | wide_t'(x[i]);
      if (rr >= md) rr -= md;
    end
    return rr;
  endfunction

  function automatic wide_t mulmod(wide_t x, wide_t y, wide_t md);
    wide_t rr = '0;
    wide_t xr = modred(x, md);
    for (int i = LW-1; i >= 0; i--) begin
      rr = rr << 1;
      if (rr >= md) rr -= md;
      if (y[i]) begin
        rr += xr;
        if (rr >= md) rr -= md;
      end
    end
    return rr;
  endfunction

  function automatic wide_t pow2mod(int k, wide_t md);
    wide_t rr = modred(wide_t'(1), md);
    for (int i = 0; i < k; i++) begin
      rr = rr << 1;
      if (rr >= md) rr -= md;
    end
    return rr;
  endfunction

  function automatic wide_t mont_model(wide_t x, wide_t y, wide_t md);
    wide_t rr = '0;
    for (int i = 0; i < W; i++) begin
      if (x[i]) rr += y;
      if (rr[0]) rr += md;
      rr >>= 1;
    end
    return rr;
  endfunction

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v;
    for (int i = 0; i < W; i += 32) v = (v << 32) | W'($urandom);
    return v;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (a=%h b=%h m=%h)", what, a, b, m);
    end
  endtask

  task automatic one(logic [W-1:0] av, logic [W-1:0] bv, logic [W-1:0] mv);
    int cyc = 0, mm_cyc = -1;
    wide_t md, exp_mm, exp_mod, ab;
    md = wide_t'(mv);
    a = av; b = bv; m = mv;
    c = W'(pow2mod(2*W, md));
    @(negedge clk);
    mod_control = 1'b1;
    mm_control  = 1'b1;
    do begin
      @(negedge clk);
      cyc++;
      if (mm_done && mm_cyc < 0) mm_cyc = cyc;
    end while (!mod_done && cyc < 10*W);
    exp_mm  = mont_model(wide_t'(av), wide_t'(bv), md);
    exp_mod = mont_model(wide_t'(c), exp_mm, md);
    ab      = mulmod(wide_t'(av), wide_t'(bv), md);
    check(wide_t'(mod_r) == exp_mod, "modular result differs from two-pass model");
    check(wide_t'(mod_r) < 3*md, "modular result not below 3M");
    check(modred(wide_t'(mod_r), md) == ab, "modular result not congruent to A*B mod M");
    check(wide_t'(mm_r) == exp_mm, "Montgomery result differs from model");
    check(wide_t'(mm_r) < 2*md, "Montgomery result not below 2M");
    check(mulmod(wide_t'(mm_r), pow2mod(W, md), md) == ab, "Montgomery result * 2^W not congruent to A*B");
    check(cyc == 3 + 6*W, $sformatf("modular latency %0d", cyc));
    check(mm_cyc == 2 + 3*W, $sformatf("Montgomery latency %0d", mm_cyc));
    mod_control = 1'b0;
    mm_control  = 1'b0;
    @(negedge clk);
    check(!mod_done && !mm_done, "units did not return to S0");
  endtask

  initial begin
    logic [W-1:0] mv;
    rst_n = 1'b0; mod_control = 1'b0; mm_control = 1'b0;
    a = '0; b = '0; m = '1; c = '0;
    prev_step = 1'b0; prev_mod_done = 1'b0; prev_mm_done = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3; t++) begin
      mv = rnd() | W'(1);
      mv[W-1] = 1'b1;
      one(W'(modred(wide_t'(rnd()), wide_t'(mv))), W'(modred(wide_t'(rnd()), wide_t'(mv))), mv);
    end
    one('1 - W'(1), '1 - W'(1), '1);
    one(W'(2), W'(1), W'(3));
    one('0, '0, W'(101));
    repeat (2) @(negedge clk);
    check(n_mod_pulses == 6 * 2 * W, $sformatf("modular iteration pulses %0d", n_mod_pulses));
    check(n_mm_pulses == 6 * W, $sformatf("Montgomery iteration pulses %0d", n_mm_pulses));
    $display("mechanisms: mod a0=1 %0d, a0=0 %0d, r0=1 %0d, r0=0 %0d; mm a0=1 %0d, a0=0 %0d, r0=1 %0d, r0=0 %0d",
             n_mod_a1, n_mod_a0, n_mod_r1, n_mod_r0, n_mm_a1, n_mm_a0, n_mm_r1, n_mm_r0);
    $display("mechanisms: step switches %0d, REGISTER loads %0d, step-1 accumulator clears %0d, halt->S0 %0d",
             n_step_switch, n_reg_load, n_acc_clear_step1, n_halt_to_s0);
    check(n_mod_a1 > 0, "modular: no iteration added the multiplicand");
    check(n_mod_a0 > 0, "modular: no iteration with a0 = 0");
    check(n_mod_r1 > 0, "modular: no iteration added M");
    check(n_mod_r0 > 0, "modular: no iteration with r0 = 0");
    check(n_mm_a1 > 0, "Montgomery: no iteration added B");
    check(n_mm_a0 > 0, "Montgomery: no iteration with a0 = 0");
    check(n_mm_r1 > 0, "Montgomery: no iteration added M");
    check(n_mm_r0 > 0, "Montgomery: no iteration with r0 = 0");
    check(n_step_switch == 6, "step 0 -> step 1 switch count");
    check(n_reg_load == 6 * W, "REGISTER load count");
    check(n_acc_clear_step1 == 6, "accumulator clear at step 1");
    check(n_halt_to_s0 == 12, "return from halt to S0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
