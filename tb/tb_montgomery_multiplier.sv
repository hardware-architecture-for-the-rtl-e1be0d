// tb_montgomery_multiplier: self-checking test of the Montgomery multiplier.
// At WIDTH = 16, for corner and random odd moduli M and operands A, B < M:
//  - r must equal a bit-serial software model of the radix-2 algorithm
//    (R = 0; for each bit a_i: R += a_i*B; if R odd R += M; R /= 2),
//  - r must be below 2M and r*2^WIDTH must be congruent to A*B mod M
//    (checked with separate shift-and-subtract modular arithmetic),
//  - done must rise 2 + 3*WIDTH clock edges after control, with exactly
//    WIDTH 'count' pulses.
module tb_montgomery_multiplier;
  localparam int unsigned W  = 16;
  localparam int unsigned LW = 2*W + 4;
  typedef logic [LW-1:0] wide_t;

  logic clk = 1'b0;
  logic rst_n, control, done, count;
  logic [W-1:0] a, b, m;
  logic [W+1:0] r;
  int checks = 0, failures = 0;
  int pulses;

  montgomery_multiplier #(.WIDTH(W)) dut (.clk, .rst_n, .control, .a, .b, .m, .r, .done, .count);

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
    pulses = 0;
    @(negedge clk);
    control = 1'b1;
    do begin
      @(negedge clk);
      cyc++;
    end while (!done && cyc < 10*W);
    rw = wide_t'(r);
    exp_r = mont_model(wide_t'(av), wide_t'(bv), wide_t'(mv));
    checks++;
    if (rw != exp_r) begin
      failures++;
      $display("r mismatch a=%h b=%h m=%h r=%h exp=%h", av, bv, mv, r, exp_r);
    end
    checks++;
    if (rw >= 2*wide_t'(mv)) begin
      failures++;
      $display("r=%h not below 2M (m=%h)", r, mv);
    end
    checks++;
    if (mulmod(rw, pow2mod(W, wide_t'(mv)), wide_t'(mv)) != mulmod(wide_t'(av), wide_t'(bv), wide_t'(mv))) begin
      failures++;
      $display("r*2^W not congruent to a*b: a=%h b=%h m=%h r=%h", av, bv, mv, r);
    end
    checks++;
    if (cyc != 2 + 3*W || pulses != W) begin
      failures++;
      $display("latency %0d (exp %0d), count pulses %0d (exp %0d)", cyc, 2+3*W, pulses, W);
    end
    control = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    logic [W-1:0] mv;
    rst_n = 1'b0; control = 1'b0; a = '0; b = '0; m = '1;
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
