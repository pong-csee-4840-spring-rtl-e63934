// pong_top: the hardware of a two-player Pong game on an FPGA board with a
// soft CPU.
//
// The game logic (ball motion, bounces, the computer-controlled paddle,
// lives and levels) runs as software on a CPU; this top holds everything
// around it.  The CPU's data master enters on the avm_* port and reaches
// four peripherals through avalon_fabric:
//
//   vga_raster      draws ball, two shadow balls, paddles, wall tiles and
//                   lives on a 640x480 monitor, interrupts once per frame
//   rotary_avalon   decodes the rotary knob that moves the right paddle,
//                   interrupts once per detent
//   audio_avalon    plays the bounce sound through the audio codec and
//                   configures the codec over I2C
//   dm9000a_bridge  index/data access to the Ethernet chip that receives
//                   the second player's key presses, passes its interrupt
//
// power_on_reset makes the system reset from the 50 MHz clock (held for
// 65536 cycles after configuration) and brings it out on reset_n for the
// CPU; clk_div2 makes the Ethernet chip's 25 MHz clock.  cpu_irq carries the
// three interrupts (bit 0 VGA frame, 1 rotary, 2 Ethernet).
//
// Board pins keep their board names.  Bidirectional pins are split:
// ENET_DATA into enet_data_out/_oe/_in and I2C_SDAT into i2c_sdat_oe
// (pull low) and i2c_sdat_in; the rotary knob's contacts A and B enter on
// rot_a and rot_b (GPIO_1[24] and GPIO_1[25] on the board).
//
// Parameters are the game's numbers; the testbench shortens them.
module pong_top
  import pong_pkg::*;
#(
  parameter int unsigned POR_WIDTH     = 16,
  parameter int unsigned HOLD_CYCLES   = 10000,
  parameter int unsigned CLOCK_DIVIDER = 1024,
  parameter int unsigned PLAY_SAMPLES  = 4096,
  parameter int unsigned I2C_QUARTER   = 125
) (
  input  logic        CLOCK_50,
  output logic        reset_n,
  // CPU data master
  input  logic        avm_read,
  input  logic        avm_write,
  input  logic [7:0]  avm_address,
  input  logic [15:0] avm_writedata,
  output logic [15:0] avm_readdata,
  output logic        avm_waitrequest,
  output logic [2:0]  cpu_irq,
  // rotary controller
  input  logic        rot_a,
  input  logic        rot_b,
  output logic [17:0] LEDR,
  // VGA DAC
  output logic        VGA_CLK,
  output logic        VGA_HS,
  output logic        VGA_VS,
  output logic        VGA_BLANK,
  output logic        VGA_SYNC,
  output logic [9:0]  VGA_R,
  output logic [9:0]  VGA_G,
  output logic [9:0]  VGA_B,
  // audio codec
  output logic        AUD_XCK,
  output logic        AUD_BCLK,
  output logic        AUD_DACLRCK,
  output logic        AUD_ADCLRCK,
  output logic        AUD_DACDAT,
  output logic        I2C_SCLK,
  output logic        i2c_sdat_oe,
  input  logic        i2c_sdat_in,
  output logic        audio_playing,
  output logic        audio_config_done,
  // Ethernet controller
  output logic        ENET_CLK,
  output logic        ENET_CMD,
  output logic        ENET_CS_N,
  output logic        ENET_RD_N,
  output logic        ENET_WR_N,
  output logic        ENET_RST_N,
  output logic [15:0] enet_data_out,
  output logic        enet_data_oe,
  input  logic [15:0] enet_data_in,
  input  logic        ENET_INT
);

  logic        clk;
  logic        rst_n;
  avalon_req_t s_req [4];
  logic [15:0] s_readdata [4];
  logic        s_waitrequest [4];
  logic        vga_irq, rotary_irq, enet_irq;

  assign clk = CLOCK_50;

  power_on_reset #(.WIDTH(POR_WIDTH)) u_por (.clk, .reset_n(rst_n));
  assign reset_n = rst_n;

  clk_div2 u_enet_clk (.clk, .clk_out(ENET_CLK));

  avalon_fabric u_fabric (
    .clk, .rst_n,
    .m_read(avm_read), .m_write(avm_write), .m_address(avm_address),
    .m_writedata(avm_writedata), .m_readdata(avm_readdata),
    .m_waitrequest(avm_waitrequest),
    .s_req, .s_readdata, .s_waitrequest,
    .vga_irq, .rotary_irq, .enet_irq, .irq(cpu_irq)
  );

  vga_raster u_vga (
    .clk, .rst_n, .req(s_req[0]), .readdata(s_readdata[0]), .irq(vga_irq),
    .VGA_CLK, .VGA_HS, .VGA_VS, .VGA_BLANK, .VGA_SYNC, .VGA_R, .VGA_G, .VGA_B
  );
  assign s_waitrequest[0] = 1'b0;

  rotary_avalon #(.HOLD_CYCLES(HOLD_CYCLES)) u_rotary (
    .clk, .rst_n, .req(s_req[1]), .readdata(s_readdata[1]), .irq(rotary_irq),
    .rot_a, .rot_b, .leds(LEDR)
  );
  assign s_waitrequest[1] = 1'b0;

  audio_avalon #(
    .CLOCK_DIVIDER(CLOCK_DIVIDER),
    .PLAY_SAMPLES (PLAY_SAMPLES),
    .I2C_QUARTER  (I2C_QUARTER)
  ) u_audio (
    .clk, .rst_n, .req(s_req[2]), .readdata(s_readdata[2]),
    .AUD_XCK, .AUD_BCLK, .AUD_DACLRCK, .AUD_ADCLRCK, .AUD_DACDAT,
    .I2C_SCLK, .i2c_sdat_oe, .i2c_sdat_in,
    .playing(audio_playing), .config_done(audio_config_done)
  );
  assign s_waitrequest[2] = 1'b0;

  dm9000a_bridge u_enet (
    .clk, .rst_n, .req(s_req[3]), .readdata(s_readdata[3]),
    .waitrequest(s_waitrequest[3]), .irq(enet_irq),
    .ENET_CMD, .ENET_CS_N, .ENET_RD_N, .ENET_WR_N, .ENET_RST_N,
    .enet_data_out, .enet_data_oe, .enet_data_in, .ENET_INT
  );

endmodule
