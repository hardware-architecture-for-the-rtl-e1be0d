// tb_modmul_controller: self-checking test of the ten-state controller.
// Expected output sequence once control rises (step and enable_R are high
// from S5 on):
//   S1 {load_SR1, load_BM}
//   WIDTH x ( S2 {load_SR2, count}, S3 {enable_SR1, enable_SR2}, S4 {load_R} )
//   S5 {reset, load_SR1}
//   WIDTH x ( S6 {load_SR2, count}, S7 {enable_SR1, enable_SR2}, S8 {} )
//   S9 {done}, held while control stays high.
// In S0 only reset and resetR are high. Compared cycle by cycle for two
// widths; this also checks the 3 + 6*WIDTH cycle latency.
module tb_modmul_controller;
  logic clk = 1'b0;
  logic rst_n, control;
  int checks = 0, failures = 0;

  // {reset, resetR, step, load_SR1, load_SR2, load_R, enable_SR1, enable_SR2,
  //  enable_R, count, load_BM, done}
  logic [11:0] o4, o7;
  logic [11:0] exp_seq [$];

  localparam logic [11:0] ST   = 12'b0010_0000_1000;  // step + enable_R
  localparam logic [11:0] IDLE = 12'b1100_0000_0000;

  modmul_controller #(.WIDTH(4)) dut4 (
    .clk, .rst_n, .control, .reset(o4[11]), .resetR(o4[10]), .step(o4[9]),
    .load_SR1(o4[8]), .load_SR2(o4[7]), .load_R(o4[6]), .enable_SR1(o4[5]),
    .enable_SR2(o4[4]), .enable_R(o4[3]), .count(o4[2]), .load_BM(o4[1]), .done(o4[0]));
  modmul_controller #(.WIDTH(7)) dut7 (
    .clk, .rst_n, .control, .reset(o7[11]), .resetR(o7[10]), .step(o7[9]),
    .load_SR1(o7[8]), .load_SR2(o7[7]), .load_R(o7[6]), .enable_SR1(o7[5]),
    .enable_SR2(o7[4]), .enable_R(o7[3]), .count(o7[2]), .load_BM(o7[1]), .done(o7[0]));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void build(int w);
    exp_seq.delete();
    exp_seq.push_back(12'b0001_0000_0010);              // S1
    for (int i = 0; i < w; i++) begin
      exp_seq.push_back(12'b0000_1000_0100);            // S2
      exp_seq.push_back(12'b0000_0011_0000);            // S3
      exp_seq.push_back(12'b0000_0100_0000);            // S4
    end
    exp_seq.push_back(ST | 12'b1001_0000_0000);         // S5
    for (int i = 0; i < w; i++) begin
      exp_seq.push_back(ST | 12'b0000_1000_0100);       // S6
      exp_seq.push_back(ST | 12'b0000_0011_0000);       // S7
      exp_seq.push_back(ST);                            // S8
    end
    for (int i = 0; i < 3; i++) exp_seq.push_back(ST | 12'b0000_0000_0001);  // S9
  endfunction

  task automatic cmp(logic [11:0] got, logic [11:0] e, string tag, int idx);
    checks++;
    if (got !== e) begin
      failures++;
      $display("%s cycle %0d: got %b exp %b", tag, idx, got, e);
    end
  endtask

  task automatic run(int w, bit use7);
    repeat (100) @(negedge clk);   // let the other instance finish and idle
    build(w);
    control = 1'b1;
    foreach (exp_seq[k]) begin
      @(negedge clk);
      cmp(use7 ? o7 : o4, exp_seq[k], use7 ? "w7" : "w4", k);
    end
    control = 1'b0;
    @(negedge clk);
    cmp(use7 ? o7 : o4, IDLE, "back to S0", 0);
  endtask

  initial begin
    rst_n = 1'b0; control = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) begin
      @(negedge clk);
      cmp(o4, IDLE, "idle", 0);
      cmp(o7, IDLE, "idle", 0);
    end
    run(4, 1'b0);
    run(7, 1'b1);
    run(4, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
