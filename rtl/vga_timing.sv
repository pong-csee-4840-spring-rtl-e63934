// vga_timing: 640x480 @ 60 Hz raster counters and sync decode.
//
// Counts pixels (hcount, 0..799) and lines (vcount, 0..524) once per pixel
// clock enable.  Each line starts with 96 pixels of horizontal sync, then
// 48 of back porch, 640 visible pixels and 16 of front porch; each frame
// starts with 2 lines of vertical sync, 33 of back porch, 480 visible lines
// and 10 of front porch.  Outputs are decoded combinationally from the
// counters: hsync/vsync are active high here (the pins are inverted by the
// raster), active marks a visible pixel, x/y are its coordinates, and
// end_of_frame is high on the last pixel of the last line.  pix_en is a
// clock enable (25 MHz from a 50 MHz clock).
module vga_timing
  import pong_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       pix_en,
  output logic [9:0] hcount,
  output logic [9:0] vcount,
  output logic       hsync,
  output logic       vsync,
  output logic       active,
  output logic [9:0] x,
  output logic [9:0] y,
  output logic       end_of_frame
);

  localparam int unsigned HSTART = HSYNC + HBACK_PORCH;   // 144
  localparam int unsigned VSTART = VSYNC + VBACK_PORCH;   // 35

  logic end_of_line;

  assign end_of_line  = (hcount == 10'(HTOTAL - 1));
  assign end_of_frame = end_of_line && (vcount == 10'(VTOTAL - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hcount <= '0;
      vcount <= '0;
    end else if (pix_en) begin
      if (end_of_line) begin
        hcount <= '0;
        vcount <= (vcount == 10'(VTOTAL - 1)) ? '0 : vcount + 1'b1;
      end else begin
        hcount <= hcount + 1'b1;
      end
    end
  end

  assign hsync  = (hcount < 10'(HSYNC));
  assign vsync  = (vcount < 10'(VSYNC));
  assign active = (hcount >= 10'(HSTART)) && (hcount < 10'(HSTART + HACTIVE)) &&
                  (vcount >= 10'(VSTART)) && (vcount < 10'(VSTART + VACTIVE));
  assign x      = hcount - 10'(HSTART);
  assign y      = vcount - 10'(VSTART);

endmodule
