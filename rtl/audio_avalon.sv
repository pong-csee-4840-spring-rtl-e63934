// audio_avalon: Avalon slave that lets the CPU make the game's sound.
//
// A write to any address starts a sound: it raises the start flag, which
// stays high until the next read.  The game writes once and then reads a
// few times, so every write gives one rising edge of start, and the
// serial driver plays one burst of the stored sound for each.  The written
// value is kept and returned by reads (it has no other use).
//
// The codec's master clock AUD_XCK is the system clock divided by four
// (12.5 MHz from 50 MHz), made by a two-bit counter.  Inside are the serial
// driver (wm8731_driver, in sine test mode, which is how the game uses it)
// and the I2C configuration block (i2c_av_config), which sets the codec up
// once after reset.  Reads have one cycle of latency.
//
// Follows the game's audio controller: start on write, clear on read,
// read-back register, XCK divider, test-mode tone and the two sub-blocks.
// This design's own: running the driver on the system clock with its own
// dividers instead of on the divided clock, and the split open-drain I2C
// data pin (i2c_sdat_oe / i2c_sdat_in).
module audio_avalon
  import pong_pkg::*;
#(
  parameter int unsigned CLOCK_DIVIDER = 1024,
  parameter int unsigned PLAY_SAMPLES  = 4096,
  parameter int unsigned I2C_QUARTER   = 125
) (
  input  logic        clk,
  input  logic        rst_n,
  input  avalon_req_t req,
  output logic [15:0] readdata,
  output logic        AUD_XCK,
  output logic        AUD_BCLK,
  output logic        AUD_DACLRCK,
  output logic        AUD_ADCLRCK,
  output logic        AUD_DACDAT,
  output logic        I2C_SCLK,
  output logic        i2c_sdat_oe,
  input  logic        i2c_sdat_in,
  output logic        playing,
  output logic        config_done
);

  logic [1:0]  xck_div;
  logic        signal_start;
  logic [15:0] stored;
  logic        audio_request;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      xck_div      <= '0;
      signal_start <= 1'b0;
      stored       <= '0;
      readdata     <= '0;
    end else begin
      xck_div <= xck_div + 1'b1;
      if (req.chipselect && req.write) begin
        signal_start <= 1'b1;
        stored       <= req.writedata;
      end else if (req.chipselect && req.read) begin
        signal_start <= 1'b0;
        readdata     <= stored;
      end
    end
  end

  assign AUD_XCK = xck_div[1];

  wm8731_driver #(
    .CLOCK_DIVIDER(CLOCK_DIVIDER),
    .PLAY_SAMPLES (PLAY_SAMPLES)
  ) u_driver (
    .clk, .rst_n,
    .test_mode    (1'b1),
    .signal_start,
    .data         (16'h0000),
    .audio_request,
    .playing,
    .AUD_BCLK, .AUD_DACLRCK, .AUD_ADCLRCK, .AUD_DACDAT
  );

  i2c_av_config #(.QUARTER(I2C_QUARTER)) u_i2c (
    .clk, .rst_n,
    .scl    (I2C_SCLK),
    .sda_oe (i2c_sdat_oe),
    .sda_in (i2c_sdat_in),
    .done   (config_done)
  );

  rw_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    req.chipselect |-> !(req.read && req.write));

endmodule
