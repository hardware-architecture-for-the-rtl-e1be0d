// tb_mont_controller: self-checking test of the six-state controller.
// After reset the controller must sit in S0 (only 'reset' high) while
// control is low. Once control rises the expected output sequence is
//   S1 {load_SR1, load_BM}
//   WIDTH x ( S2 {load_SR2, count}, S3 {enable_SR1, enable_SR2}, S4 {} )
//   S5 {done}, held while control stays high,
// and dropping control returns it to S0. The sequence is built here from
// that description and compared cycle by cycle, for two widths, which also
// checks the 2 + 3*WIDTH cycle latency.
module tb_mont_controller;
  logic clk = 1'b0;
  logic rst_n, control;
  int checks = 0, failures = 0;

  // output bundle: {reset, load_SR1, load_BM, load_SR2, count, enable_SR1, enable_SR2, done}
  logic [7:0] o5, o9;
  logic [7:0] exp_seq [$];

  mont_controller #(.WIDTH(5)) dut5 (
    .clk, .rst_n, .control, .reset(o5[7]), .load_SR1(o5[6]), .load_BM(o5[5]),
    .load_SR2(o5[4]), .count(o5[3]), .enable_SR1(o5[2]), .enable_SR2(o5[1]), .done(o5[0]));
  mont_controller #(.WIDTH(9)) dut9 (
    .clk, .rst_n, .control, .reset(o9[7]), .load_SR1(o9[6]), .load_BM(o9[5]),
    .load_SR2(o9[4]), .count(o9[3]), .enable_SR1(o9[2]), .enable_SR2(o9[1]), .done(o9[0]));

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
    exp_seq.push_back(8'b0110_0000);               // S1
    for (int i = 0; i < w; i++) begin
      exp_seq.push_back(8'b0001_1000);             // S2
      exp_seq.push_back(8'b0000_0110);             // S3
      exp_seq.push_back(8'b0000_0000);             // S4
    end
    for (int i = 0; i < 4; i++) exp_seq.push_back(8'b0000_0001);  // S5 held
  endfunction

  task automatic cmp(logic [7:0] got, logic [7:0] e, string tag, int idx);
    checks++;
    if (got !== e) begin
      failures++;
      $display("%s cycle %0d: got %b exp %b", tag, idx, got, e);
    end
  endtask

  task automatic run(int w, bit use9);
    repeat (100) @(negedge clk);   // let the other instance finish and idle
    build(w);
    control = 1'b1;
    foreach (exp_seq[k]) begin
      @(negedge clk);
      cmp(use9 ? o9 : o5, exp_seq[k], use9 ? "w9" : "w5", k);
    end
    control = 1'b0;
    @(negedge clk);
    cmp(use9 ? o9 : o5, 8'b1000_0000, "back to S0", 0);
    @(negedge clk);
    cmp(use9 ? o9 : o5, 8'b1000_0000, "idle S0", 0);
  endtask

  initial begin
    rst_n = 1'b0; control = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) begin
      @(negedge clk);
      cmp(o5, 8'b1000_0000, "idle", 0);
      cmp(o9, 8'b1000_0000, "idle", 0);
    end
    run(5, 1'b0);
    run(9, 1'b1);
    run(5, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
