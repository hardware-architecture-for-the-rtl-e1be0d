// tb_operand_register: self-checking test of the clear/load register.
// Random clear, load and data each cycle; a reference model kept in the
// testbench predicts q after every rising edge.
module tb_operand_register;
  localparam int unsigned DW = 40;
  logic clk = 1'b0;
  logic clear, load;
  logic [DW-1:0] d, q, model;
  int checks = 0, failures = 0;

  operand_register #(.DW(DW)) dut (.clk, .clear, .load, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 1'b1; load = 1'b0; d = '0; model = '0;
    @(negedge clk);
    for (int i = 0; i < 500; i++) begin
      clear = ($urandom % 8) == 0;
      load  = $urandom[0];
      d     = {$urandom, $urandom};
      if (clear)     model = '0;
      else if (load) model = d;
      @(negedge clk);
      checks++;
      if (q !== model) begin
        failures++;
        $display("mismatch cycle %0d q=%h exp=%h", i, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
