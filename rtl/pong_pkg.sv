// pong_pkg: types and constants shared by the Pong peripherals.
//
// Holds the Avalon slave request bundle used by every peripheral, the
// rotary direction code read by the CPU, the 640x480 VGA timing numbers,
// the VGA register map, and the sprite and tile images of the playfield.
//
// The images are computed from small formulas rather than stored pixel by
// pixel: the ball is a shaded red disc (16x16), the two shadow balls are the
// same disc at half and quarter brightness, the paddle is a 21x120 capsule
// with cyan tips, a red body and a grey centre bar, the wall tile is a blue
// 32x32 square, and the life tile is a red heart.  Their sizes and the
// 20x15 tile layout follow the game; their exact pixel colours are this
// design's own.
package pong_pkg;

  // ---------------------------------------------------------------- Avalon
  // One slave-side request as presented by the bus fabric.  Word addressed,
  // 16-bit data, zero wait states (readdata is registered and valid on the
  // cycle after read is sampled).
  typedef struct packed {
    logic        chipselect;
    logic        read;
    logic        write;
    logic [4:0]  address;
    logic [15:0] writedata;
  } avalon_req_t;

  // ---------------------------------------------------------------- rotary
  // Direction word returned by the rotary controller.  The game software
  // moves the right paddle up for CCW (1) and down for CW (2).
  typedef enum logic [1:0] {
    ROT_NONE = 2'b00,
    ROT_CCW  = 2'b01,
    ROT_CW   = 2'b10
  } rot_dir_t;

  // ------------------------------------------------------------ VGA timing
  localparam int unsigned HTOTAL       = 800;
  localparam int unsigned HSYNC        = 96;
  localparam int unsigned HBACK_PORCH  = 48;
  localparam int unsigned HACTIVE      = 640;
  localparam int unsigned HFRONT_PORCH = 16;
  localparam int unsigned VTOTAL       = 525;
  localparam int unsigned VSYNC        = 2;
  localparam int unsigned VBACK_PORCH  = 33;
  localparam int unsigned VACTIVE      = 480;
  localparam int unsigned VFRONT_PORCH = 10;

  // -------------------------------------------------- VGA register map
  typedef enum logic [3:0] {
    REG_BALL_H   = 4'd0,  REG_BALL_V   = 4'd1,
    REG_LPAD_H   = 4'd2,  REG_LPAD_V   = 4'd3,
    REG_RPAD_H   = 4'd4,  REG_RPAD_V   = 4'd5,
    REG_L1       = 4'd6,  REG_L2       = 4'd7,  REG_L3 = 4'd8,
    REG_R1       = 4'd9,  REG_R2       = 4'd10, REG_R3 = 4'd11,
    REG_BALL1_H  = 4'd12, REG_BALL1_V  = 4'd13,
    REG_BALL2_H  = 4'd14, REG_BALL2_V  = 4'd15
  } vga_reg_t;

  // Sprite and tile sizes in pixels.
  localparam int unsigned BALL_W = 16;
  localparam int unsigned BALL_H = 16;
  localparam int unsigned PAD_W  = 21;
  localparam int unsigned PAD_H  = 120;
  localparam int unsigned TILE   = 32;
  localparam int unsigned TILES_X = 20;
  localparam int unsigned TILES_Y = 15;

  // Tile codes of the background map.  A life register holding TILE_HEART
  // shows a heart; any other value (the software writes 3) leaves it empty.
  localparam logic [1:0] TILE_EMPTY = 2'd0;
  localparam logic [1:0] TILE_WALL  = 2'd1;
  localparam logic [1:0] TILE_HEART = 2'd2;

  typedef struct packed {
    logic [9:0] r;
    logic [9:0] g;
    logic [9:0] b;
  } rgb_t;

  // Wall tiles of the background, one 20-bit mask per tile row (bit c is
  // tile column c).  Row 0 carries the six life tiles instead, see
  // vga_raster.  The wall draws a large heart, symmetric about column 9.
  function automatic logic [19:0] wall_row(input logic [3:0] row);
    unique case (row)
      4'd2:    return 20'b0000_0011_1000_1110_0000; // 5,6,7 11,12,13
      4'd3:    return 20'b0000_0100_0101_0001_0000; // 4,8 10,14
      4'd4:    return 20'b0000_1000_0010_0000_1000; // 3,9,15
      4'd5:    return 20'b0001_0000_0000_0000_0100; // 2,16
      4'd6:    return 20'b0000_1000_0000_0000_1000; // 3,15
      4'd7:    return 20'b0000_0100_0000_0001_0000; // 4,14
      4'd8:    return 20'b0000_0010_0000_0010_0000; // 5,13
      4'd9:    return 20'b0000_0001_0000_0100_0000; // 6,12
      4'd10:   return 20'b0000_0000_1000_1000_0000; // 7,11
      4'd11:   return 20'b0000_0000_0101_0000_0000; // 8,10
      4'd12:   return 20'b0000_0000_0010_0000_0000; // 9
      default: return 20'b0;
    endcase
  endfunction

  // Ball: disc of radius 8 centred in the 16x16 box.  Red falls off from
  // the centre, with a small white highlight.  Outside the disc all three
  // components are zero, which the raster treats as transparent.
  function automatic rgb_t ball_pixel(input logic [3:0] x, input logic [3:0] y);
    int dx, dy, d2;
    rgb_t p;
    dx = 2 * int'(x) - 15;
    dy = 2 * int'(y) - 15;
    d2 = dx * dx + dy * dy;            // 2 .. 450, disc is d2 <= 256
    p = '0;
    if (d2 <= 256) begin
      p.r = 10'(1023 - d2);
      p.g = (d2 <= 40) ? 10'd640 : 10'd64;
      p.b = (d2 <= 40) ? 10'd640 : 10'd0;
    end
    return p;
  endfunction

  // Shadow balls: the ball at reduced brightness (shift 1 or 2).
  function automatic rgb_t shadow_pixel(input logic [3:0] x, input logic [3:0] y,
                                        input int unsigned shift);
    rgb_t p;
    p = ball_pixel(x, y);
    p.r = p.r >> shift;
    p.g = p.g >> shift;
    p.b = p.b >> shift;
    return p;
  endfunction

  // Paddle: cyan tips (6 rows each end), red body, grey centre bar with
  // dark bands, as in the game's screen.
  function automatic rgb_t paddle_pixel(input logic [4:0] x, input logic [6:0] y);
    rgb_t p;
    if (y < 7'd6 || y >= 7'(PAD_H - 6))
      p = '{r: 10'd0, g: 10'd1000, b: 10'd1000};
    else if (y == 7'd24 || y == 7'(PAD_H - 25))
      p = '{r: 10'd0, g: 10'd0, b: 10'd0};
    else if (x >= 5'd7 && x <= 5'd13 && y > 7'd24 && y < 7'(PAD_H - 25))
      p = '{r: 10'd600, g: 10'd600, b: 10'd600};
    else
      p = '{r: 10'd1000, g: 10'd64, b: 10'd64};
    return p;
  endfunction

  // Wall tile: blue square with a darker one-pixel rim.
  function automatic rgb_t wall_pixel(input logic [4:0] x, input logic [4:0] y);
    rgb_t p;
    if (x == 5'd0 || y == 5'd0 || x == 5'd31 || y == 5'd31)
      p = '{r: 10'd40, g: 10'd200, b: 10'd420};
    else
      p = '{r: 10'd100, g: 10'd400, b: 10'd720};
    return p;
  endfunction

  // Life tile: heart made of two discs of radius 8 and a triangle below
  // them, on a black ground.  Returns 1 where the pixel is part of the
  // heart.
  function automatic logic heart_inside(input logic [4:0] x, input logic [4:0] y);
    int hx, hy, cl, cr;
    hx = 2 * int'(x) - 31;             // -31 .. 31
    hy = 2 * int'(y);                  //   0 .. 62
    cl = (hx + 13) * (hx + 13) + (hy - 20) * (hy - 20);
    cr = (hx - 13) * (hx - 13) + (hy - 20) * (hy - 20);
    if (cl <= 256 || cr <= 256) return 1'b1;
    if (hy >= 20 && hy <= 56) begin
      if ((hx < 0 ? -hx : hx) * 36 <= (56 - hy) * 29) return 1'b1;
    end
    return 1'b0;
  endfunction

endpackage
