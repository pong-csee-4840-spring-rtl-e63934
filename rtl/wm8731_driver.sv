// wm8731_driver: serial DAC driver that plays a sound through the board's
// audio codec.
//
// The codec runs as a slave in left-justified 16-bit mode.  This block
// makes its bit clock and left/right clock and shifts out one 16-bit sample
// per channel per sample period.  A sample period is CLOCK_DIVIDER cycles
// of clk (a power of two, at least 128): with 1024 at 50 MHz the sample
// rate is 48.8 kHz, and changing CLOCK_DIVIDER changes the sample rate,
// which must match the rate the sound data was prepared for.
//
// Frame format, counted by a free-running counter cnt of log2(CLOCK_DIVIDER)
// bits: BCLK has CLOCK_DIVIDER/64 clocks per period, so a sample period holds
// 64 bit clocks, 32 per channel.  LRCK is high for the left half and low
// for the right half.  Both channels carry the same sample, MSB first,
// starting at the first BCLK of the half, followed by 16 zero bits.  DACDAT
// and LRCK change only on BCLK falling edges, so the codec samples on the
// rising edge.
//
// Sound source: with test_mode high the samples come from a sine table of
// SINE_POINTS entries at half full scale (a 1.02 kHz tone at the default
// rate); with test_mode low they come from the data input, and
// audio_request pulses for one clock at the start of each sample period to
// ask for the next one.  A rising edge of signal_start plays PLAY_SAMPLES
// sample periods of sound; outside a burst the samples are zero.  playing is
// high during a burst.
//
// What follows the game's audio path: a stored sound played on a start
// command from the CPU, a sine test mode, the request/data handshake and a
// sample rate set by one clock divider.  This design's own: the frame
// format details, burst length, sine size and amplitude (the table is
// computed with Bhaskara's sine approximation).
module wm8731_driver #(
  parameter int unsigned CLOCK_DIVIDER = 1024,
  parameter int unsigned SINE_POINTS   = 48,
  parameter int unsigned PLAY_SAMPLES  = 4096
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        test_mode,
  input  logic        signal_start,
  input  logic [15:0] data,
  output logic        audio_request,
  output logic        playing,
  output logic        AUD_BCLK,
  output logic        AUD_DACLRCK,
  output logic        AUD_ADCLRCK,
  output logic        AUD_DACDAT
);

  localparam int unsigned CW   = $clog2(CLOCK_DIVIDER);   // counter width
  localparam int unsigned BW   = CW - 6;                  // clocks per BCLK = 2**BW
  localparam int unsigned AMPL = 16383;

  // Bhaskara I: sin(d) ~ 4d(180-d) / (40500 - d(180-d)) for 0 <= d <= 180.
  function automatic logic [SINE_POINTS*16-1:0] sine_table();
    logic [SINE_POINTS*16-1:0] t;
    longint d, p, v;
    t = '0;
    for (int i = 0; i < SINE_POINTS; i++) begin
      d = (longint'(i) * 360 * 1000) / longint'(SINE_POINTS);        // millidegrees
      if (d > 180000) d = d - 180000;
      p = (d * (180000 - d)) / 1000;                        // in degrees*1000
      v = (4 * p * AMPL) / (40500000 - p);
      if ((longint'(i) * 360 * 1000) / longint'(SINE_POINTS) > 180000) v = -v;
      t[i*16 +: 16] = 16'(v);
    end
    return t;
  endfunction

  localparam logic [SINE_POINTS*16-1:0] SINE = sine_table();

  logic [CW-1:0]  cnt;
  logic [$clog2(SINE_POINTS)-1:0] sine_idx;
  logic [$clog2(PLAY_SAMPLES+1)-1:0] remaining;
  logic [15:0]    sample;
  logic           start_q;
  logic           sample_tick;
  logic [4:0]     bit_in_half;

  assign sample_tick = (cnt == '1);                // last clock of a period
  assign bit_in_half = cnt[CW-2 -: 5];             // 0..31 within a channel

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt           <= '0;
      sine_idx      <= '0;
      remaining     <= '0;
      sample        <= '0;
      start_q       <= 1'b0;
      audio_request <= 1'b0;
    end else begin
      cnt           <= cnt + 1'b1;
      start_q       <= signal_start;
      audio_request <= sample_tick;
      if (signal_start && !start_q) begin
        remaining <= ($bits(remaining))'(PLAY_SAMPLES);
        sine_idx  <= '0;
      end else if (sample_tick) begin
        if (remaining != '0) begin
          remaining <= remaining - 1'b1;
          sample    <= test_mode ? SINE[sine_idx*16 +: 16] : data;
          sine_idx  <= (sine_idx == ($bits(sine_idx))'(SINE_POINTS - 1)) ? '0 : sine_idx + 1'b1;
        end else begin
          sample    <= '0;
        end
      end
    end
  end

  assign playing = (remaining != '0);

  // Serial outputs, registered.  cnt has already advanced, so they follow
  // the counter value of the previous cycle: one clock of skew shared by
  // all three lines.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      AUD_BCLK    <= 1'b0;
      AUD_DACLRCK <= 1'b1;
      AUD_DACDAT  <= 1'b0;
    end else begin
      AUD_BCLK    <= cnt[BW-1];
      AUD_DACLRCK <= ~cnt[CW-1];
      AUD_DACDAT  <= (bit_in_half < 5'd16) ? sample[4'd15 - bit_in_half[3:0]] : 1'b0;
    end
  end

  assign AUD_ADCLRCK = AUD_DACLRCK;

  initial begin
    assert (CLOCK_DIVIDER >= 128 && (CLOCK_DIVIDER & (CLOCK_DIVIDER - 1)) == 0)
      else $error("wm8731_driver: CLOCK_DIVIDER must be a power of two >= 128");
  end

endmodule
