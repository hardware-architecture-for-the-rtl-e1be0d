// tb_mux2: self-checking test of the two-input multiplexer.
// Drives random data and both select values at DW = 67 (wider than one
// 64-bit word) and compares y with the selected input.
module tb_mux2;
  localparam int unsigned DW = 67;
  logic clk = 1'b0;
  logic sel;
  logic [DW-1:0] d0, d1, y;
  int checks = 0, failures = 0;

  mux2 #(.DW(DW)) dut (.sel, .d0, .d1, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      d0 = {$urandom, $urandom, $urandom};
      d1 = {$urandom, $urandom, $urandom};
      sel = i[0];
      @(posedge clk);
      checks++;
      if (y !== (sel ? d1 : d0)) begin
        failures++;
        $display("mismatch sel=%0b y=%h", sel, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
