// tb_adder: self-checking test of the adder.
// Random and carry-chain corner operands at DW = 67; the expected sum is
// formed in a wider variable and truncated, so it is independent of the
// unit's own width handling.
module tb_adder;
  localparam int unsigned DW = 67;
  logic clk = 1'b0;
  logic [DW-1:0] x, y, s;
  logic [DW:0]   ref_sum;
  int checks = 0, failures = 0;

  adder #(.DW(DW)) dut (.x, .y, .s);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(logic [DW-1:0] xa, logic [DW-1:0] ya);
    x = xa; y = ya;
    @(posedge clk);
    ref_sum = {1'b0, xa} + {1'b0, ya};
    checks++;
    if (s !== ref_sum[DW-1:0]) begin
      failures++;
      $display("mismatch %h + %h = %h", xa, ya, s);
    end
  endtask

  initial begin
    check_one('1, 67'd1);
    check_one({1'b0, {(DW-1){1'b1}}}, 67'd1);
    check_one('0, '0);
    for (int i = 0; i < 300; i++)
      check_one({$urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
