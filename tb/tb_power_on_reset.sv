// tb_power_on_reset: checks that the power-on reset is held for exactly
// 65536 clock cycles after start-up (the full 16-bit count, default
// parameters) and then stays released.
module tb_power_on_reset;
  logic clk = 1'b0;
  logic reset_n;
  int   checks = 0, failures = 0;
  int   cycles = 0;

  power_on_reset dut (.clk, .reset_n);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1 check(reset_n == 1'b0, "reset asserted at start");
    while (reset_n == 1'b0 && cycles < 70000) begin
      @(posedge clk);
      cycles++;
      #1;
    end
    check(cycles == 65536, $sformatf("reset length %0d, expected 65536", cycles));
    repeat (1000) begin
      @(posedge clk); #1;
      if (reset_n != 1'b1) begin
        check(1'b0, "reset released for good");
        break;
      end
    end
    check(reset_n == 1'b1, "still released after 1000 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(20 * 200000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
