// tb_mux4: self-checking test of the four-input multiplexer.
// Random data on all four inputs, every select code in turn, y compared
// with the input the code names.
module tb_mux4;
  localparam int unsigned DW = 67;
  logic clk = 1'b0;
  logic [1:0] sel;
  logic [DW-1:0] d [4];
  logic [DW-1:0] y;
  int checks = 0, failures = 0;

  mux4 #(.DW(DW)) dut (.sel, .d0(d[0]), .d1(d[1]), .d2(d[2]), .d3(d[3]), .y);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      foreach (d[k]) d[k] = {$urandom, $urandom, $urandom};
      sel = 2'(i);
      @(posedge clk);
      checks++;
      if (y !== d[sel]) begin
        failures++;
        $display("mismatch sel=%0d y=%h", sel, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
