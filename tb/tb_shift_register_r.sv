// tb_shift_register_r: self-checking test of the accumulator shift register.
// Random clear/load/shift commands each cycle against a reference model
// with the priority clear > load > shift and zero fill on the shift.
module tb_shift_register_r;
  localparam int unsigned DW = 45;
  logic clk = 1'b0;
  logic clear, load, shift;
  logic [DW-1:0] d, q, model;
  int checks = 0, failures = 0;

  shift_register_r #(.DW(DW)) dut (.clk, .clear, .load, .shift, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 1'b1; load = 1'b0; shift = 1'b0; d = '0; model = '0;
    @(negedge clk);
    for (int i = 0; i < 1000; i++) begin
      clear = ($urandom % 16) == 0;
      load  = ($urandom % 4) == 0;
      shift = $urandom[0];
      d     = DW'({$urandom, $urandom});
      if (clear)      model = '0;
      else if (load)  model = d;
      else if (shift) model = model >> 1;
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
