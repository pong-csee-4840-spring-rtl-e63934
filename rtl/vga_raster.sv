// vga_raster: the Pong display controller, an Avalon slave that draws the
// playfield on a 640x480 VGA monitor.
//
// The CPU only tells the controller where things are; all pixels are made
// in hardware.  Sixteen 16-bit registers (word addresses 0..15) hold the
// top-left corner of the ball (0,1), the left paddle (2,3), the right
// paddle (4,5), the two shadow balls that trail the ball (12,13 and 14,15),
// and six life registers (6..8 left player l1..l3, 9..11 right player
// r1..r3): a life register holding 2 shows a heart, any other value (the
// game writes 3 for a lost life) leaves its tile empty.  All registers read
// back, with one cycle of read latency.
//
// For every pixel the controller picks, in order of priority: the ball
// (16x16, where its image is not transparent), shadow ball 1, shadow ball 2
// (both 16x16, drawn where non-transparent), the left paddle, the right
// paddle (21x120 each, opaque), and finally the background.  The screen is
// cut into 20x15 tiles of 32x32 pixels; a fixed map places wall tiles that
// outline a large heart, and the six life tiles sit in tile row 0, columns
// 6,7,8 (l1,l2,l3) and 11,12,13 (r3,r2,r1).  Everything else is black.
//
// Timing: one 50 MHz clock.  The pixel rate is half of it (pix_en toggles
// every cycle, and VGA_CLK is that toggle), so the 800x525 raster of
// vga_timing gives 59.5 Hz.  Colour and sync are registered once, so they
// leave the block aligned, one pixel after the counters.  irq rises on the
// last pixel of each frame and stays high until the CPU writes any
// register; the game redraws its objects in that interrupt so the picture
// does not tear.  HS and VS are active low; VGA_BLANK is the inverse of
// (hsync or vsync) as in the course's raster, and the colour outputs are
// forced to zero outside the 640x480 window.
//
// Follows the game's controller: timing numbers, register map and reset
// positions, sprite sizes and priority, tile grid, life encoding and the
// frame interrupt.  This design's choices: exact pixel colours of the
// images (computed in pong_pkg), the clean sprite window x in
// [H, H+width), the clock enable instead of a divided clock, read-back of
// all registers, and colour blanking outside the visible window.
module vga_raster
  import pong_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  avalon_req_t req,
  output logic [15:0] readdata,
  output logic        irq,
  output logic        VGA_CLK,
  output logic        VGA_HS,
  output logic        VGA_VS,
  output logic        VGA_BLANK,
  output logic        VGA_SYNC,
  output logic [9:0]  VGA_R,
  output logic [9:0]  VGA_G,
  output logic [9:0]  VGA_B
);

  logic [15:0] regs [16];
  logic        pix_en;

  // ------------------------------------------------------------ registers
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      regs[REG_BALL_H]  <= 16'h0100;  regs[REG_BALL_V]  <= 16'h0000;
      regs[REG_LPAD_H]  <= 16'h0000;  regs[REG_LPAD_V]  <= 16'h0000;
      regs[REG_RPAD_H]  <= 16'h016B;  regs[REG_RPAD_V]  <= 16'h00A0;
      regs[REG_L1]      <= 16'd2;     regs[REG_L2]      <= 16'd2;
      regs[REG_L3]      <= 16'd2;     regs[REG_R1]      <= 16'd2;
      regs[REG_R2]      <= 16'd2;     regs[REG_R3]      <= 16'd2;
      regs[REG_BALL1_H] <= 16'h0010;  regs[REG_BALL1_V] <= 16'h0000;
      regs[REG_BALL2_H] <= 16'h000F;  regs[REG_BALL2_V] <= 16'h0000;
      readdata <= '0;
    end else if (req.chipselect) begin
      if (req.write)     regs[req.address[3:0]] <= req.writedata;
      else if (req.read) readdata <= regs[req.address[3:0]];
    end
  end

  // ---------------------------------------------------------------- raster
  logic [9:0] hcount, vcount, x, y;
  logic       hsync, vsync, active, end_of_frame;

  always_ff @(posedge clk) begin
    if (!rst_n) pix_en <= 1'b0;
    else        pix_en <= ~pix_en;
  end

  vga_timing u_timing (
    .clk, .rst_n, .pix_en, .hcount, .vcount, .hsync, .vsync,
    .active, .x, .y, .end_of_frame
  );

  always_ff @(posedge clk) begin
    if (!rst_n)                        irq <= 1'b0;
    else if (pix_en && end_of_frame)   irq <= 1'b1;
    else if (req.chipselect && req.write) irq <= 1'b0;
  end

  // ---------------------------------------------------------------- sprites
  // Offset of the pixel from a sprite's corner; 16-bit wrap-around makes a
  // pixel left of or above the corner look far away.
  function automatic logic [15:0] offs(input logic [9:0] p, input logic [15:0] corner);
    return {6'b0, p} - corner;
  endfunction

  logic [15:0] bx, by, b1x, b1y, b2x, b2y, lx, ly, rx, ry;
  logic        in_ball, in_ball1, in_ball2, in_lpad, in_rpad;
  rgb_t        ball_c, ball1_c, ball2_c, lpad_c, rpad_c, bg_c, pix_c;
  logic        bg_on;

  always_comb begin
    bx  = offs(x, regs[REG_BALL_H]);   by  = offs(y, regs[REG_BALL_V]);
    b1x = offs(x, regs[REG_BALL1_H]);  b1y = offs(y, regs[REG_BALL1_V]);
    b2x = offs(x, regs[REG_BALL2_H]);  b2y = offs(y, regs[REG_BALL2_V]);
    lx  = offs(x, regs[REG_LPAD_H]);   ly  = offs(y, regs[REG_LPAD_V]);
    rx  = offs(x, regs[REG_RPAD_H]);   ry  = offs(y, regs[REG_RPAD_V]);

    in_ball  = (bx  < 16'(BALL_W)) && (by  < 16'(BALL_H));
    in_ball1 = (b1x < 16'(BALL_W)) && (b1y < 16'(BALL_H));
    in_ball2 = (b2x < 16'(BALL_W)) && (b2y < 16'(BALL_H));
    in_lpad  = (lx  < 16'(PAD_W))  && (ly  < 16'(PAD_H));
    in_rpad  = (rx  < 16'(PAD_W))  && (ry  < 16'(PAD_H));

    ball_c  = ball_pixel(bx[3:0], by[3:0]);
    ball1_c = shadow_pixel(b1x[3:0], b1y[3:0], 1);
    ball2_c = shadow_pixel(b2x[3:0], b2y[3:0], 2);
    lpad_c  = paddle_pixel(lx[4:0], ly[6:0]);
    rpad_c  = paddle_pixel(rx[4:0], ry[6:0]);
  end

  // ------------------------------------------------------------ background
  logic [3:0]  trow;
  logic [4:0]  tcol;
  logic [1:0]  tcode;
  logic [15:0] life;

  always_comb begin
    trow = y[8:5];
    tcol = x[9:5];
    life = '0;
    tcode = TILE_EMPTY;
    if (trow == 4'd0) begin
      unique case (tcol)
        5'd6:    life = regs[REG_L1];
        5'd7:    life = regs[REG_L2];
        5'd8:    life = regs[REG_L3];
        5'd11:   life = regs[REG_R3];
        5'd12:   life = regs[REG_R2];
        5'd13:   life = regs[REG_R1];
        default: life = '0;
      endcase
      tcode = (life == 16'(TILE_HEART)) ? TILE_HEART : TILE_EMPTY;
    end else if (tcol < 5'(TILES_X)) begin
      tcode = wall_row(trow)[tcol] ? TILE_WALL : TILE_EMPTY;
    end

    bg_on = 1'b1;
    unique case (tcode)
      TILE_WALL:  bg_c = wall_pixel(x[4:0], y[4:0]);
      TILE_HEART: bg_c = heart_inside(x[4:0], y[4:0]) ? rgb_t'{r: 10'd1000, g: 10'd60, b: 10'd60}
                                                      : rgb_t'('0);
      default: begin
        bg_c  = '0;
        bg_on = 1'b0;
      end
    endcase

    if      (in_ball  && ball_c.r  >= 10'd2) pix_c = ball_c;
    else if (in_ball1 && ball1_c.r != 10'd0) pix_c = ball1_c;
    else if (in_ball2 && ball2_c.r != 10'd0) pix_c = ball2_c;
    else if (in_lpad)                        pix_c = lpad_c;
    else if (in_rpad)                        pix_c = rpad_c;
    else if (bg_on)                          pix_c = bg_c;
    else                                     pix_c = '0;
  end

  // ---------------------------------------------------------------- output
  logic hsync_q, vsync_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      {VGA_R, VGA_G, VGA_B} <= '0;
      hsync_q <= 1'b1;
      vsync_q <= 1'b1;
    end else if (pix_en) begin
      {VGA_R, VGA_G, VGA_B} <= active ? pix_c : rgb_t'('0);
      hsync_q <= hsync;
      vsync_q <= vsync;
    end
  end

  assign VGA_CLK   = pix_en;
  assign VGA_HS    = ~hsync_q;
  assign VGA_VS    = ~vsync_q;
  assign VGA_BLANK = ~(hsync_q | vsync_q);
  assign VGA_SYNC  = 1'b0;

  rw_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    req.chipselect |-> !(req.read && req.write));

endmodule
