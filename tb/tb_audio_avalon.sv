// tb_audio_avalon: plays the game's sound routine (one write, then a run
// of reads) against the audio controller.  Checks the codec master clock
// (system clock / 4), read-back of the written word, that each write plays
// one burst of PLAY_SAMPLES sample periods while reads do not restart it,
// that sound actually appears on the serial data line, and that the codec
// configuration over I2C completes (the I2C line is pulled low by the
// testbench, so every acknowledge is seen).
module tb_audio_avalon;
  import pong_pkg::*;

  localparam int DIV  = 128;
  localparam int PLAY = 4;

  logic        clk = 1'b0, rst_n = 1'b0;
  avalon_req_t req;
  logic [15:0] readdata;
  logic        AUD_XCK, AUD_BCLK, AUD_DACLRCK, AUD_ADCLRCK, AUD_DACDAT;
  logic        I2C_SCLK, i2c_sdat_oe, playing, config_done;
  int          checks = 0, failures = 0;

  audio_avalon #(.CLOCK_DIVIDER(DIV), .PLAY_SAMPLES(PLAY), .I2C_QUARTER(2)) dut (
    .clk, .rst_n, .req, .readdata, .AUD_XCK, .AUD_BCLK, .AUD_DACLRCK, .AUD_ADCLRCK,
    .AUD_DACDAT, .I2C_SCLK, .i2c_sdat_oe, .i2c_sdat_in(1'b0), .playing, .config_done
  );

  always #10 clk = ~clk;

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

  longint cyc = 0, xck_rise = 0, xck_period = 0, play_len = 0, play_start = 0;
  int     bursts = 0, ones = 0;
  logic   xck_q = 1'b0, play_q = 1'b0;
  always @(posedge clk) begin
    cyc++;
    if (AUD_XCK && !xck_q) begin
      xck_period = cyc - xck_rise;
      xck_rise   = cyc;
    end
    if (rst_n && playing && !play_q) begin
      bursts++;
      play_start = cyc;
    end
    if (rst_n && !playing && play_q) play_len = cyc - play_start;
    if (playing && AUD_DACDAT) ones++;
    xck_q  <= AUD_XCK;
    play_q <= playing;
  end

  logic [15:0] d;

  initial begin
    req = '0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (50) @(posedge clk); #1;
    check(xck_period == 4, $sformatf("XCK period %0d clocks", xck_period));
    check(bursts == 0, "silent after reset");

    // the game's sound(): one write, then 60 reads
    bus_write(16'h00A5);
    for (int i = 0; i < 60; i++) begin
      bus_read(d);
      if (i == 0) check(d == 16'h00A5, $sformatf("read back %h", d));
    end
    repeat (DIV * (PLAY + 3)) @(posedge clk);
    check(bursts == 1, $sformatf("%0d bursts for one write", bursts));
    check(play_len > DIV * (PLAY - 1) && play_len <= DIV * PLAY + 1,
          $sformatf("burst lasted %0d clocks, expected %0d..%0d", play_len, DIV * (PLAY - 1) + 1, DIV * PLAY + 1));
    check(ones > 0, "sound bits on AUD_DACDAT");

    // reads alone do not start a sound; a new write does
    for (int i = 0; i < 5; i++) bus_read(d);
    repeat (DIV * 3) @(posedge clk);
    check(bursts == 1, "reads do not start a sound");
    bus_write(16'h0001);
    bus_read(d);
    repeat (DIV * (PLAY + 3)) @(posedge clk);
    check(bursts == 2, "second write plays again");

    wait (config_done);
    check(config_done, "codec configured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
