// tb_rotary_avalon: turns the knob and plays the CPU's interrupt handler.
// Checks one interrupt per detent, the direction codes read back (2 for
// clockwise, 1 for counter-clockwise), clear-on-write, no interrupt for a
// broken sequence, and the LED state display.
module tb_rotary_avalon;
  import pong_pkg::*;

  localparam int HOLD = 30;

  logic        clk = 1'b0, rst_n = 1'b0;
  avalon_req_t req;
  logic [15:0] readdata;
  logic        irq;
  logic        rot_a = 1'b0, rot_b = 1'b0;
  logic [17:0] leds;
  int          checks = 0, failures = 0;
  int          irq_rises = 0;
  logic        irq_q = 1'b0;

  rotary_avalon #(.HOLD_CYCLES(HOLD)) dut (.clk, .rst_n, .req, .readdata, .irq, .rot_a, .rot_b, .leds);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (irq && !irq_q) irq_rises++;
    irq_q <= irq;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic bus_write(input logic [15:0] d);
    req = '{chipselect: 1'b1, read: 1'b0, write: 1'b1, address: 5'd0, writedata: d};
    @(posedge clk); #1;
    req = '0;
  endtask

  task automatic bus_read(output logic [15:0] d);
    req = '{chipselect: 1'b1, read: 1'b1, write: 1'b0, address: 5'd0, writedata: 16'h0};
    @(posedge clk); #1;
    req = '0;
    d = readdata;
  endtask

  task automatic code(input logic [1:0] ab, input int n);
    {rot_a, rot_b} = ab;
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic detent(input bit cw);
    if (cw) begin code(2'b01, 6); code(2'b11, 6); code(2'b10, 6); end
    else    begin code(2'b10, 6); code(2'b11, 6); code(2'b01, 6); end
    code(2'b00, 6);
  endtask

  logic [15:0] d;
  int          n;

  initial begin
    req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    #1;
    repeat (3) @(posedge clk); #1;
    check(irq == 1'b0, "no interrupt after reset");
    check(leds == 18'h1, "LEDs show S0");
    bus_read(d);
    check(d == 16'd0, "reads 0 before any detent");

    // clockwise detent: interrupt, read 2, clear
    n = irq_rises;
    detent(1'b1);
    check(irq == 1'b1, "interrupt after clockwise detent");
    bus_read(d);
    check(d == 16'd2, $sformatf("clockwise reads %0d, expected 2", d));
    bus_write(16'h0);
    check(irq == 1'b0, "write clears interrupt");
    code(2'b00, HOLD + 10);
    check(irq == 1'b0 && irq_rises == n + 1, "exactly one interrupt per detent");
    bus_read(d);
    check(d == 16'd2, "direction remembered after the hold");

    // counter-clockwise detent
    detent(1'b0);
    check(irq == 1'b1, "interrupt after counter-clockwise detent");
    bus_read(d);
    check(d == 16'd1, $sformatf("counter-clockwise reads %0d, expected 1", d));
    bus_write(16'h0);
    code(2'b00, HOLD + 10);
    check(irq_rises == n + 2, "two interrupts for two detents");

    // interrupt stays until cleared
    detent(1'b1);
    code(2'b00, HOLD * 3);
    check(irq == 1'b1, "interrupt held until the CPU writes");
    bus_write(16'h0);

    // broken sequence
    code(2'b01, 6); code(2'b10, 6); code(2'b00, HOLD + 10);
    check(irq == 1'b0 && irq_rises == n + 3, "no interrupt for a broken sequence");

    // LED display follows the decoder
    code(2'b10, 5);
    check(leds == 18'h10, $sformatf("LEDs show S4 (%h)", leds));
    code(2'b00, 10);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
