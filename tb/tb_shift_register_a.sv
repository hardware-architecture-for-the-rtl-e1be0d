// tb_shift_register_a: self-checking test of the multiplier shift register.
// Loads random words and shifts them out, checking that a0 presents bit i
// of the loaded word after i shifts and 0 once the word is exhausted; load
// while shifting must win.
module tb_shift_register_a;
  localparam int unsigned WIDTH = 37;
  logic clk = 1'b0;
  logic load, shift, a0;
  logic [WIDTH-1:0] d, word;
  int checks = 0, failures = 0;

  shift_register_a #(.WIDTH(WIDTH)) dut (.clk, .load, .shift, .d, .a0);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(logic e, string what);
    checks++;
    if (a0 !== e) begin
      failures++;
      $display("mismatch %s: a0=%0b exp=%0b", what, a0, e);
    end
  endtask

  initial begin
    load = 1'b0; shift = 1'b0; d = '0;
    @(negedge clk);
    for (int t = 0; t < 40; t++) begin
      word = WIDTH'({$urandom, $urandom});
      d = word; load = 1'b1; shift = (t % 2 == 1);   // load has priority
      @(negedge clk);
      load = 1'b0;
      for (int i = 0; i <= WIDTH + 1; i++) begin
        // a hold cycle every few bits: contents must not move
        if ((i % 5) == 2) begin
          shift = 1'b0;
          @(negedge clk);
          expect_bit((i < WIDTH) ? word[i] : 1'b0, "hold");
        end
        expect_bit((i < WIDTH) ? word[i] : 1'b0, "shift");
        shift = 1'b1;
        @(negedge clk);
        shift = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
