// tb_vga_raster: runs the display controller for three frames and checks
// it from the outside.
//
// The testbench rebuilds the pixel position from HS and VS only (visible
// area starts 144 pixel clocks after HS falls and 35 lines after VS falls)
// and stores one whole frame.  It checks the sync pulse widths and
// periods, the frame interrupt period and its clear-on-write, the register
// reset values and read-back, and selected pixels whose colours are worked
// out by hand from the sprite formulas: ball centre, transparent ball
// corner over a wall tile, shadow balls at half and quarter brightness, a
// shadow ball in front of a paddle and transparent over it, paddle tips,
// body and centre bar, wall rim, a shown and a lost life, and black floor.
module tb_vga_raster;
  import pong_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  avalon_req_t req;
  logic [15:0] readdata;
  logic        irq;
  logic        VGA_CLK, VGA_HS, VGA_VS, VGA_BLANK, VGA_SYNC;
  logic [9:0]  VGA_R, VGA_G, VGA_B;
  int          checks = 0, failures = 0;

  vga_raster dut (.clk, .rst_n, .req, .readdata, .irq, .VGA_CLK, .VGA_HS, .VGA_VS,
                  .VGA_BLANK, .VGA_SYNC, .VGA_R, .VGA_G, .VGA_B);

  always #10 clk = ~clk;   // 50 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic bus_write(input logic [3:0] a, input logic [15:0] d);
    req = '{chipselect: 1'b1, read: 1'b0, write: 1'b1, address: {1'b0, a}, writedata: d};
    @(posedge clk); #1;
    req = '0;
  endtask

  task automatic bus_read(input logic [3:0] a, output logic [15:0] d);
    req = '{chipselect: 1'b1, read: 1'b1, write: 1'b0, address: {1'b0, a}, writedata: 16'h0};
    @(posedge clk); #1;
    req = '0;
    d = readdata;
  endtask

  // ------------------------------------------------ raster reconstruction
  int          hpos = 0, vpos = 0;
  logic        hs_q = 1'b1, vs_line_q = 1'b1;
  int          hs_low = 0, hs_low_len = -1, line_len = -1, hcnt_since = 0;
  int          vs_low_lines = 0, vs_low_len = -1, frame_lines = -1, lines_since = 0;
  bit          capture = 0, captured = 0;
  logic [29:0] fb [480][640];
  int          blank_colour = 0;

  always @(posedge VGA_CLK) begin
    if (rst_n) begin
      if (!VGA_HS && hs_q) begin                // start of a line
        line_len   = hcnt_since;
        hcnt_since = 0;
        hpos       = 0;
        if (!VGA_VS && vs_line_q) begin         // start of a frame
          frame_lines = lines_since + 1;
          lines_since = 0;
          vpos        = 0;
          if (capture) begin
            captured = 1;
            capture  = 0;
          end
        end else begin
          vpos++;
          lines_since++;
        end
        if (!VGA_VS) vs_low_lines++;
        else if (vs_low_lines != 0) begin
          vs_low_len   = vs_low_lines;
          vs_low_lines = 0;
        end
        vs_line_q = VGA_VS;
      end else begin
        hpos++;
      end
      hcnt_since++;
      if (!VGA_HS) hs_low++;
      else if (hs_low != 0) begin
        hs_low_len = hs_low;
        hs_low = 0;
      end
      hs_q = VGA_HS;
      if (hpos >= 144 && hpos < 784 && vpos >= 35 && vpos < 515) begin
        if (capture) fb[vpos - 35][hpos - 144] = {VGA_R, VGA_G, VGA_B};
      end else if ({VGA_R, VGA_G, VGA_B} != '0) begin
        blank_colour++;
      end
    end
  end

  // ----------------------------------------------------- frame interrupt
  longint irq_t0 = 0, irq_period = 0;
  int     irq_rises = 0;
  logic   irq_q = 1'b0;
  longint cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (irq && !irq_q) begin
      irq_rises++;
      if (irq_t0 != 0) irq_period = cyc - irq_t0;
      irq_t0 = cyc;
    end
    irq_q <= irq;
  end

  function automatic logic [29:0] px(input int x, input int y);
    return fb[y][x];
  endfunction

  function automatic logic [29:0] rgb(input int r, input int g, input int b);
    return {10'(r), 10'(g), 10'(b)};
  endfunction

  task automatic expect_px(input int x, input int y, input logic [29:0] c, input string what);
    check(px(x, y) == c, $sformatf("%s at (%0d,%0d): got %h %h %h, expected %h %h %h", what, x, y,
          px(x, y)[29:20], px(x, y)[19:10], px(x, y)[9:0], c[29:20], c[19:10], c[9:0]));
  endtask

  logic [15:0] d;
  logic [15:0] reset_vals [16] = '{16'h100, 0, 0, 0, 16'h16B, 16'hA0, 2, 2, 2, 2, 2, 2,
                                   16'h10, 0, 16'hF, 0};

  initial begin
    req = '0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    #1;
    for (int i = 0; i < 16; i++) begin
      bus_read(4'(i), d);
      check(d == reset_vals[i], $sformatf("reset value of register %0d: %h", i, d));
    end
    check(VGA_SYNC == 1'b0, "VGA_SYNC tied low");

    // first frame ends: interrupt
    wait (irq);
    @(posedge clk); #1;
    bus_write(REG_BALL_H, 16'd100);   bus_write(REG_BALL_V, 16'd200);
    check(irq == 1'b0, "register write clears the interrupt");
    bus_write(REG_BALL1_H, 16'd300);  bus_write(REG_BALL1_V, 16'd300);
    bus_write(REG_BALL2_H, 16'd610);  bus_write(REG_BALL2_V, 16'd160);
    bus_write(REG_LPAD_H, 16'd0);     bus_write(REG_LPAD_V, 16'd150);
    bus_write(REG_RPAD_H, 16'd619);   bus_write(REG_RPAD_V, 16'd150);
    bus_write(REG_L1, 16'd3);
    bus_read(REG_BALL2_H, d);
    check(d == 16'd610, "read back a written register");
    bus_read(REG_L1, d);
    check(d == 16'd3, "read back a life register");
    capture = 1;
    wait (captured);
    @(posedge clk); #1;

    // timing
    check(line_len == 800, $sformatf("line length %0d pixel clocks", line_len));
    check(hs_low_len == 96, $sformatf("HS low for %0d pixel clocks", hs_low_len));
    check(frame_lines == 525, $sformatf("frame of %0d lines", frame_lines));
    check(vs_low_len == 2, $sformatf("VS low for %0d lines", vs_low_len));
    check(blank_colour == 0, $sformatf("%0d coloured pixels outside the window", blank_colour));

    // pixels
    expect_px(108, 208, rgb(1021, 640, 640), "ball centre");
    expect_px(100, 200, rgb(100, 400, 720), "transparent ball corner over wall");
    expect_px(308, 308, rgb(510, 320, 320), "shadow ball 1 centre");
    expect_px(619, 168, rgb(253, 160, 160), "shadow ball 2 over right paddle");
    expect_px(624, 175, rgb(1000, 64, 64), "right paddle through transparent shadow");
    expect_px(10, 210, rgb(600, 600, 600), "left paddle centre bar");
    expect_px(0, 150, rgb(0, 1000, 1000), "left paddle tip");
    expect_px(3, 180, rgb(1000, 64, 64), "left paddle body");
    expect_px(20, 269, rgb(0, 1000, 1000), "left paddle bottom tip");
    expect_px(21, 210, rgb(0, 0, 0), "just right of left paddle");
    expect_px(10, 270, rgb(0, 0, 0), "just below left paddle");
    expect_px(160, 64, rgb(40, 200, 420), "wall tile rim");
    expect_px(207, 20, rgb(0, 0, 0), "lost life l1 not drawn");
    expect_px(239, 20, rgb(1000, 60, 60), "life l2 heart");
    expect_px(239, 2, rgb(0, 0, 0), "heart tile background");
    expect_px(13 * 32 + 15, 20, rgb(1000, 60, 60), "life r1 heart");
    expect_px(320, 240, rgb(0, 0, 0), "black floor");
    expect_px(9 * 32 + 5, 12 * 32 + 5, rgb(100, 400, 720), "bottom tip of the wall heart");
    expect_px(10 * 32 + 5, 13 * 32 + 5, rgb(0, 0, 0), "below the wall heart");

    // interrupt period: one per frame of 800x525 pixels, 2 clocks each
    bus_write(REG_BALL_H, 16'd101);
    wait (irq_rises >= 3);
    check(irq_period == 840000, $sformatf("interrupt period %0d clocks", irq_period));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
