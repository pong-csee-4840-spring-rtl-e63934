// tb_wm8731_driver: receives the serial audio stream the way the codec
// does (left-justified, MSB first, sampled on BCLK rising edges, LRCK high
// for left) and checks the frame timing (BCLK and LRCK periods set by
// CLOCK_DIVIDER), that nothing plays before a start, that a start plays
// exactly PLAY_SAMPLES samples of a sine whose values are computed here
// with the real sine function, that both channels carry the same sample,
// and the data-input mode with its audio_request handshake.
module tb_wm8731_driver;
  localparam int DIV    = 256;
  localparam int PLAY   = 6;
  localparam int POINTS = 48;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        test_mode = 1'b1, signal_start = 1'b0;
  logic [15:0] data = 16'h0;
  logic        audio_request, playing;
  logic        AUD_BCLK, AUD_DACLRCK, AUD_ADCLRCK, AUD_DACDAT;
  int          checks = 0, failures = 0;

  wm8731_driver #(.CLOCK_DIVIDER(DIV), .SINE_POINTS(POINTS), .PLAY_SAMPLES(PLAY)) dut (
    .clk, .rst_n, .test_mode, .signal_start, .data, .audio_request, .playing,
    .AUD_BCLK, .AUD_DACLRCK, .AUD_ADCLRCK, .AUD_DACDAT
  );

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------- receiver
  logic [31:0] shreg = '0;
  int          nbits = 0;
  logic        lr_q = 1'b1;
  logic signed [15:0] left_s [$];
  logic signed [15:0] right_s [$];
  int          bclk_cnt = 0, bclk_per_half = -1;
  longint      cyc = 0, last_bclk = 0, bclk_period = 0, last_lr = 0, lr_period = 0;
  logic        bclk_q = 1'b0;
  bit          have_left = 0;
  int          lr_mismatch = 0;

  always @(posedge clk) begin
    cyc++;
    if (AUD_BCLK && !bclk_q) begin
      bclk_period = cyc - last_bclk;
      last_bclk   = cyc;
      if (AUD_DACLRCK != lr_q) begin         // first bit of a new half
        if (nbits == 32) begin
          if (lr_q) begin
            left_s.push_back(shreg[31:16]);
            have_left = 1;
          end else begin
            right_s.push_back(shreg[31:16]);
            if (have_left && shreg[31:16] != left_s[$]) lr_mismatch++;
          end
        end
        if (AUD_DACLRCK) begin
          lr_period = cyc - last_lr;
          last_lr   = cyc;
        end
        bclk_per_half = nbits;
        nbits = 0;
        lr_q  = AUD_DACLRCK;
      end
      shreg = {shreg[30:0], AUD_DACDAT};
      nbits++;
    end
    bclk_q = AUD_BCLK;
  end

  function automatic int sine_ref(input int i);
    real v;
    v = 16383.0 * $sin(2.0 * 3.14159265358979 * i / POINTS);
    return $rtoi(v < 0 ? v - 0.5 : v + 0.5);
  endfunction

  int k, nz, first, diff, requests;
  bit same;

  always @(posedge clk) if (audio_request) begin
    requests++;
    data <= data + 16'h0101;
  end

  initial begin
    requests = 0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (DIV * 4) @(posedge clk);
    check(bclk_period == DIV / 64, $sformatf("BCLK period %0d clocks", bclk_period));
    check(lr_period == DIV, $sformatf("LRCK period %0d clocks", lr_period));
    check(bclk_per_half == 32, $sformatf("%0d bit clocks per channel", bclk_per_half));
    check(AUD_ADCLRCK == AUD_DACLRCK, "ADC LRCK follows DAC LRCK");
    check(!playing, "idle before start");

    // start a burst in test mode
    left_s.delete(); right_s.delete(); have_left = 0;
    @(posedge clk); #1;
    signal_start = 1'b1;
    repeat (3) @(posedge clk); #1;
    signal_start = 1'b0;
    check(playing, "playing after start");
    repeat (DIV * (PLAY + 6)) @(posedge clk);
    check(!playing, "burst finished");

    nz = 0; first = -1;
    foreach (left_s[i]) if (left_s[i] != 0) begin
      nz++;
      if (first < 0) first = i;
    end
    // sine point 0 is zero, so PLAY-1 non-zero samples follow it
    check(nz == PLAY - 1, $sformatf("%0d non-zero samples, expected %0d", nz, PLAY - 1));
    check(first >= 1 && first <= 3, $sformatf("first sound in sample period %0d", first));
    if (first >= 1) begin
      check(left_s[first - 1] == 0, "burst starts at sine point 0");
      for (k = 1; k < PLAY; k++) begin
        diff = int'(left_s[first + k - 1]) - sine_ref(k);
        check(diff >= -40 && diff <= 40,
              $sformatf("sine point %0d: %0d, expected about %0d", k, left_s[first + k - 1], sine_ref(k)));
      end
    end
    check(lr_mismatch == 0 && right_s.size() > PLAY, $sformatf("left and right channels equal (%0d mismatches, %0d right)", lr_mismatch, right_s.size()));

    // data input mode: a burst plays the requested words
    test_mode = 1'b0;
    left_s.delete(); right_s.delete(); have_left = 0;
    requests = 0;
    @(posedge clk); #1;
    signal_start = 1'b1;
    @(posedge clk); #1;
    signal_start = 1'b0;
    repeat (DIV * (PLAY + 6)) @(posedge clk);
    check(requests >= PLAY, $sformatf("%0d audio requests", requests));
    nz = 0; first = -1;
    foreach (left_s[i]) if (left_s[i] != 0) begin
      nz++;
      if (first < 0) first = i;
    end
    check(nz == PLAY, $sformatf("data mode: %0d samples played, expected %0d", nz, PLAY));
    if (first >= 0 && first + PLAY <= left_s.size()) begin
      same = 1;
      for (k = 1; k < PLAY; k++)
        if (16'(left_s[first + k] - left_s[first + k - 1]) != 16'h0101) same = 0;
      check(same, "data mode plays consecutive words");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (DIV * 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
