// tb_clk_div2: checks that the divided clock toggles on every rising edge
// of the input clock, i.e. half the frequency with 50 % duty cycle.
module tb_clk_div2;
  logic clk = 1'b0;
  logic clk_out;
  int   checks = 0, failures = 0;
  logic prev;
  int   rises = 0;

  clk_div2 dut (.clk, .clk_out);

  always #10 clk = ~clk;
  bit counting = 0;
  always @(posedge clk_out) if (counting) rises++;

  initial begin
    @(posedge clk); #1;
    prev = clk_out;
    counting = 1;
    repeat (200) begin
      @(posedge clk); #1;
      checks++;
      if (clk_out == prev) begin
        failures++;
        $display("FAIL: clk_out did not toggle at %0t", $time);
      end
      prev = clk_out;
    end
    checks++;
    if (rises != 100) begin
      failures++;
      $display("FAIL: %0d rising edges in 200 cycles, expected 100", rises);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
