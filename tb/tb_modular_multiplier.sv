// tb_modular_multiplier: self-checking test of the modular multiplier.
// At WIDTH = 12, for corner and random odd moduli M, operands A, B < M and
// C = 2^(2*WIDTH) mod M:
//  - r must equal two passes of a bit-serial software model of the radix-2
//    Montgomery algorithm, first (A, B), then (C, first result),
//  - r must be below 3M and congruent to A*B mod M (checked with separate
//    shift-and-subtract modular arithmetic),
//  - done must rise 3 + 6*WIDTH clock edges after control, with exactly
//    2*WIDTH 'count' pulses and 'step' high at the end.
module tb_modular_multiplier;
  localparam int unsigned W  = 12;
  localparam int unsigned LW = 2*W + 4;
  typedef logic [LW-1:0] wide_t;

  logic clk = 1'b0;
  logic rst_n, control, done, count;
  logic step;
  logic [W-1:0] a, b, m, c;
  logic [W+1:0] r;
  int checks = 0, failures = 0;
  int pulses;

  modular_multiplier #(.WIDTH(W)) dut (.clk, .rst_n, .control, .a, .b, .m, .c, .r, .done, .count, .step);

  always #5 clk = ~clk;
  always @(negedge clk) if (count) pulses++;

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

  task automatic one(logic [W-1:0] av, logic [W-1:0] bv, logic [W-1:0] mv);
    int cyc = 0;
    wide_t exp_r, rw;
    a = av; b = bv; m = mv;
    c = W'(pow2mod(2*W, wide_t'(mv)));
    pulses = 0;
    @(negedge clk);
    control = 1'b1;
    do begin
      @(negedge clk);
      cyc++;
    end while (!done && cyc < 10*W);
    rw = wide_t'(r);
    exp_r = mont_model(wide_t'(c), mont_model(wide_t'(av), wide_t'(bv), wide_t'(mv)), wide_t'(mv));
    checks++;
    if (rw != exp_r) begin
      failures++;
      $display("r mismatch a=%h b=%h m=%h r=%h exp=%h", av, bv, mv, r, exp_r);
    end
    checks++;
    if (rw >= 3*wide_t'(mv)) begin
      failures++;
      $display("r=%h not below 3M (m=%h)", r, mv);
    end
    checks++;
    if (modred(rw, wide_t'(mv)) != mulmod(wide_t'(av), wide_t'(bv), wide_t'(mv))) begin
      failures++;
      $display("r not congruent to a*b: a=%h b=%h m=%h r=%h", av, bv, mv, r);
    end
    checks++;
    if (cyc != 3 + 6*W || pulses != 2*W || !step) begin
      failures++;
      $display("latency %0d (exp %0d), count pulses %0d (exp %0d), step %0b", cyc, 3+6*W, pulses, 2*W, step);
    end
    control = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    logic [W-1:0] mv;
    rst_n = 1'b0; control = 1'b0; a = '0; b = '0; m = '1; c = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    one('0, '0, W'(1));
    one(W'(5), W'(7), W'(11));
    one('1 - W'(1), '1 - W'(1), '1);         // largest odd modulus, A = B = M-1
    one('1 - W'(1), W'(1), '1);
    one(W'(1), W'(1), W'(3));
    for (int t = 0; t < 300; t++) begin
      mv = rnd() | W'(1);
      if (t % 3 == 0) mv[W-1] = 1'b1;
      one(W'(modred(wide_t'(rnd()), wide_t'(mv))), W'(modred(wide_t'(rnd()), wide_t'(mv))), mv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
