// tb_rotary_fsm: drives A/B code sequences into the rotary decoder and
// checks which ones produce a clockwise or counter-clockwise detection,
// the exact length of the held output (HOLD_CYCLES), the decode latency
// and the one-hot state display.
module tb_rotary_fsm;
  import pong_pkg::*;

  localparam int HOLD = 40;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       a = 1'b0, b = 1'b0;
  rot_dir_t   dir;
  logic [7:0] state_onehot;
  int         checks = 0, failures = 0;

  rotary_fsm #(.HOLD_CYCLES(HOLD)) dut (.clk, .rst_n, .a, .b, .dir, .state_onehot);

  always #5 clk = ~clk;

  // Pulse monitor
  int       pulses = 0, width = 0, last_width = 0;
  rot_dir_t last_dir = ROT_NONE, prev = ROT_NONE;
  bit       onehot_bad = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (dir != ROT_NONE) width++;
      if (dir != ROT_NONE && prev == ROT_NONE) begin
        pulses++;
        last_dir = dir;
      end
      if (dir == ROT_NONE && prev != ROT_NONE) last_width = width;
      if (dir == ROT_NONE) width = 0;
      prev = dir;
      if ($countones(state_onehot) != 1 || state_onehot[7]) onehot_bad = 1;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic code(input logic [1:0] ab, input int n);
    {a, b} = ab;
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic settle();
    code(2'b00, HOLD + 20);
  endtask

  task automatic expect_pulse(input int n_before, input rot_dir_t d, input string what);
    check(pulses == n_before + 1, $sformatf("%s: %0d pulses, expected %0d", what, pulses - n_before, 1));
    check(last_dir == d, $sformatf("%s: direction %0d", what, last_dir));
    check(last_width == HOLD, $sformatf("%s: held %0d cycles, expected %0d", what, last_width, HOLD));
  endtask

  int p;
  int lat;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    check(state_onehot == 8'b0000_0001, "idle in S0");

    // clockwise detent 01 11 10 00
    p = pulses;
    code(2'b01, 5); code(2'b11, 5); code(2'b10, 5); settle();
    expect_pulse(p, ROT_CW, "clockwise");

    // counter-clockwise detent 10 11 01 00
    p = pulses;
    code(2'b10, 5); code(2'b11, 5); code(2'b01, 5); settle();
    expect_pulse(p, ROT_CCW, "counter-clockwise");

    // long-held codes still decode
    p = pulses;
    code(2'b01, 300); code(2'b11, 300); code(2'b10, 300); settle();
    expect_pulse(p, ROT_CW, "slow clockwise");

    // incomplete or wrong sequences produce nothing
    p = pulses;
    code(2'b01, 5); code(2'b00, 5); settle();
    code(2'b01, 5); code(2'b10, 5); code(2'b00, 5); settle();
    code(2'b10, 5); code(2'b01, 5); code(2'b11, 5); code(2'b00, 5); settle();
    code(2'b11, 5); code(2'b10, 5); code(2'b00, 5); settle();
    check(pulses == p, $sformatf("bad sequences gave %0d pulses", pulses - p));

    // contact bounce: 01 11 01 11 10 recovers and decodes clockwise
    p = pulses;
    code(2'b01, 5); code(2'b11, 5); code(2'b01, 5); code(2'b11, 5); code(2'b10, 5); settle();
    expect_pulse(p, ROT_CW, "bounced clockwise");

    // latency: last code to output = 2 synchroniser + 1 state + 1 output
    code(2'b10, 5); code(2'b11, 5);
    {a, b} = 2'b01;
    lat = 0;
    while (dir == ROT_NONE && lat < 20) begin
      @(posedge clk); #1;
      lat++;
    end
    check(dir == ROT_CCW && lat == 4, $sformatf("latency %0d cycles, expected 4", lat));
    settle();

    // state display passes S1 and S2
    code(2'b01, 4); #1;
    check(state_onehot == 8'b0000_0010, "S1 shown");
    code(2'b11, 4); #1;
    check(state_onehot == 8'b0000_0100, "S2 shown");
    settle();
    check(!onehot_bad, "state display one-hot");

    // synchronous reset clears a held output
    code(2'b01, 5); code(2'b11, 5); code(2'b10, 8);
    check(dir == ROT_CW, "output held n_before reset");
    rst_n = 1'b0; @(posedge clk); #1;
    check(dir == ROT_NONE && state_onehot == 8'b1, "reset clears output and state");
    rst_n = 1'b1;
    settle();

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
