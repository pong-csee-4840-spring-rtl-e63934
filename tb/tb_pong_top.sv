// tb_pong_top: end-to-end run of the whole game hardware with every
// parameter at its default.
//
// The testbench plays the CPU: a polling loop stands in for the game's
// three interrupt handlers and its sound routine, using the same register
// traffic (VGA registers rewritten at each frame interrupt, rotary
// direction read and cleared, Ethernet key code fetched through the
// DM9000A index/data ports, sound started by a write followed by reads).
// Around the design sit a register model of the Ethernet chip that
// delivers key presses, a rotary knob, an I2C line that acknowledges
// everything, and a VGA monitor that rebuilds each frame from HS/VS.
//
// Scripted events: knob turned clockwise and counter-clockwise, keys
// w, s, k and l from the network player, a ball bounce with sound, and a
// lost life.  After every frame the picture is compared with the positions
// the CPU wrote for it (paddle tips, pixels above them, ball centre, first
// life tile).  Each mechanism is counted and must happen at least once:
// power-on reset release, frame interrupt, rotary clockwise, rotary
// counter-clockwise, Ethernet key up, key down, mode switch, sound burst,
// codec configuration, lost life shown, Ethernet clock.
module tb_pong_top;
  logic        CLOCK_50 = 1'b0;
  logic        reset_n;
  logic        avm_read = 0, avm_write = 0;
  logic [7:0]  avm_address = '0;
  logic [15:0] avm_writedata = '0;
  logic [15:0] avm_readdata;
  logic        avm_waitrequest;
  logic [2:0]  cpu_irq;
  logic        rot_a = 0, rot_b = 0;
  logic [17:0] LEDR;
  logic        VGA_CLK, VGA_HS, VGA_VS, VGA_BLANK, VGA_SYNC;
  logic [9:0]  VGA_R, VGA_G, VGA_B;
  logic        AUD_XCK, AUD_BCLK, AUD_DACLRCK, AUD_ADCLRCK, AUD_DACDAT;
  logic        I2C_SCLK, i2c_sdat_oe, audio_playing, audio_config_done;
  logic        ENET_CLK, ENET_CMD, ENET_CS_N, ENET_RD_N, ENET_WR_N, ENET_RST_N;
  logic [15:0] enet_data_out, enet_data_in;
  logic        enet_data_oe;
  logic        ENET_INT = 0;

  pong_top dut (.*, .i2c_sdat_in(1'b0));

  always #10 CLOCK_50 = ~CLOCK_50;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // --------------------------------------------------------- mechanisms
  int n_por = 0, n_frame_irq = 0, n_rot_cw = 0, n_rot_ccw = 0, n_key_up = 0,
      n_key_down = 0, n_mode = 0, n_sound = 0, n_config = 0, n_life = 0, n_enet_clk = 0;

  // --------------------------------------------------- Ethernet chip model
  logic [7:0]  e_index = '0;
  logic [7:0]  key_byte = '0;
  always @(posedge CLOCK_50) begin
    if (!ENET_WR_N && !ENET_CS_N) begin
      if (!ENET_CMD) e_index = enet_data_out[7:0];
      else if (e_index == 8'hFE && enet_data_out[0]) ENET_INT = 1'b0;   // ISR clear
    end
  end
  assign enet_data_in = (!ENET_RD_N && e_index == 8'hF2) ? {8'h00, key_byte} : 16'h0000;

  logic enet_clk_q = 0;
  always @(posedge CLOCK_50) begin
    if (ENET_CLK && !enet_clk_q) n_enet_clk++;
    enet_clk_q <= ENET_CLK;
  end

  // ------------------------------------------------------------ CPU model
  task automatic bus_write(input logic [7:0] a, input logic [15:0] d);
    avm_write = 1; avm_address = a; avm_writedata = d;
    #1;
    while (avm_waitrequest) begin @(posedge CLOCK_50); #1; end
    @(posedge CLOCK_50); #1;
    avm_write = 0;
  endtask

  task automatic bus_read(input logic [7:0] a, output logic [15:0] d);
    avm_read = 1; avm_address = a;
    #1;
    while (avm_waitrequest) begin @(posedge CLOCK_50); #1; end
    @(posedge CLOCK_50); #1;
    avm_read = 0;
    d = avm_readdata;
  endtask

  // game state kept by the "software"
  int y_lpad = 150, y_rpad = 150, x_ball = 200, y_ball = 232;
  int lives_left = 3;
  bit ai_control = 1;
  bit sound_req = 0;
  // values the last frame was drawn with
  int s_lpad, s_rpad, s_xb, s_yb, s_l1;
  int p_lpad, p_rpad, p_xb, p_yb, p_l1;
  bit shown_valid = 0, pending_valid = 0;

  task automatic vga_handler();
    int l1;
    x_ball = (x_ball >= 400) ? 200 : x_ball + 3;
    l1 = (lives_left < 3) ? 3 : 2;
    bus_write(8'h00, 16'(x_ball));  bus_write(8'h01, 16'(y_ball));
    bus_write(8'h0C, 16'(x_ball - 5)); bus_write(8'h0D, 16'(y_ball));
    bus_write(8'h0E, 16'(x_ball - 10)); bus_write(8'h0F, 16'(y_ball));
    bus_write(8'h02, 16'd0);        bus_write(8'h03, 16'(y_lpad));
    bus_write(8'h04, 16'd619);      bus_write(8'h05, 16'(y_rpad));
    bus_write(8'h06, 16'(l1));
    p_lpad = y_lpad; p_rpad = y_rpad; p_xb = x_ball; p_yb = y_ball; p_l1 = l1;
    pending_valid = 1;
    n_frame_irq++;
  endtask

  task automatic rotary_handler();
    logic [15:0] d;
    bus_read(8'h20, d);
    if (d == 16'd1) begin
      if (y_rpad > 0) y_rpad -= 10;
      n_rot_ccw++;
    end else if (d == 16'd2) begin
      if (y_rpad < 360) y_rpad += 10;
      n_rot_cw++;
    end else begin
      check(1'b0, $sformatf("rotary read %0d", d));
    end
    bus_write(8'h20, 16'h0);
  endtask

  task automatic ethernet_handler();
    logic [15:0] d;
    bus_write(8'h60, 16'h00F2);
    bus_read(8'h61, d);
    unique case (d[7:0])
      8'h77: begin if (y_lpad > 0) y_lpad -= 10; n_key_up++; end
      8'h73: begin if (y_lpad < 360) y_lpad += 10; n_key_down++; end
      8'h6B: begin if (!ai_control) n_mode++; ai_control = 1; end
      8'h6C: begin if (ai_control) n_mode++; ai_control = 0; end
      default: check(1'b0, $sformatf("unexpected key %h", d[7:0]));
    endcase
    bus_write(8'h60, 16'h00FE);
    bus_write(8'h61, 16'h003F);
  endtask

  task automatic sound();
    logic [15:0] d;
    bus_write(8'h40, 16'h0);
    for (int i = 0; i < 60; i++) bus_read(8'h40, d);
  endtask

  bit cpu_run = 0;
  initial begin
    wait (cpu_run);
    forever begin
      @(posedge CLOCK_50); #1;
      if (cpu_irq[1])      rotary_handler();
      else if (cpu_irq[2]) ethernet_handler();
      else if (cpu_irq[0]) vga_handler();
      else if (sound_req) begin
        sound();
        sound_req = 0;
      end
    end
  end

  // ----------------------------------------------------------- VGA monitor
  int          hpos = 0, vpos = 0;
  logic        hs_q = 1, vs_q = 1;
  logic [29:0] fb [480][640];

  function automatic logic [29:0] px(input int x, input int y);
    return fb[y][x];
  endfunction

  localparam logic [29:0] CYAN = {10'd0, 10'd1000, 10'd1000};
  localparam logic [29:0] BALL = {10'd1021, 10'd640, 10'd640};
  localparam logic [29:0] HEART = {10'd1000, 10'd60, 10'd60};

  task automatic check_frame();
    check(px(629, s_rpad) == CYAN, $sformatf("right paddle tip at y=%0d", s_rpad));
    if (s_rpad > 0) check(px(629, s_rpad - 1) != CYAN, "nothing above the right paddle");
    check(px(10, s_lpad) == CYAN, $sformatf("left paddle tip at y=%0d", s_lpad));
    if (s_lpad > 0) check(px(10, s_lpad - 1) != CYAN, "nothing above the left paddle");
    check(px(s_xb + 8, s_yb + 8) == BALL, $sformatf("ball centre at (%0d,%0d)", s_xb + 8, s_yb + 8));
    if (s_l1 == 2) check(px(207, 20) == HEART, "first life shown");
    else begin
      check(px(207, 20) == 30'd0, "lost life not shown");
      n_life++;
    end
  endtask

  always @(posedge VGA_CLK) begin
    if (reset_n) begin
      if (!VGA_HS && hs_q) begin
        hpos = 0;
        if (!VGA_VS && vs_q) begin
          vpos = 0;
          // the handler of this frame interrupt has not finished yet, so
          // p_* still hold the values the finished frame was drawn with
          if (pending_valid) begin
            s_lpad = p_lpad; s_rpad = p_rpad; s_xb = p_xb; s_yb = p_yb; s_l1 = p_l1;
            if (shown_valid) check_frame();
            shown_valid = 1;
          end
        end else vpos++;
        vs_q = VGA_VS;
      end else hpos++;
      hs_q = VGA_HS;
      if (hpos >= 144 && hpos < 784 && vpos >= 35 && vpos < 515)
        fb[vpos - 35][hpos - 144] = {VGA_R, VGA_G, VGA_B};
    end
  end

  // ---------------------------------------------------------- stimulus
  task automatic code(input logic [1:0] ab);
    {rot_a, rot_b} = ab;
    repeat (200) @(posedge CLOCK_50);
  endtask

  task automatic detent(input bit cw);
    if (cw) begin code(2'b01); code(2'b11); code(2'b10); end
    else    begin code(2'b10); code(2'b11); code(2'b01); end
    code(2'b00);
    repeat (12000) @(posedge CLOCK_50);
  endtask

  task automatic key(input logic [7:0] k);
    key_byte = k;
    ENET_INT = 1'b1;
    wait (!ENET_INT);
    repeat (100) @(posedge CLOCK_50);
  endtask

  task automatic wait_frames(input int n);
    int f;
    f = n_frame_irq;
    wait (n_frame_irq >= f + n);
  endtask

  longint cyc = 0, burst_cycles = 0;
  int     dac_ones = 0;
  logic   play_q = 0;
  always @(posedge CLOCK_50) begin
    cyc++;
    if (audio_playing) begin
      burst_cycles++;
      if (AUD_DACDAT) dac_ones++;
    end
    if (audio_playing && !play_q && reset_n) n_sound++;
    play_q <= audio_playing;
  end

  int rst_cycles = 0;
  int rotary_y0, lpad_y0;

  initial begin
    while (!reset_n) begin
      @(posedge CLOCK_50); #1;
      rst_cycles++;
    end
    check(rst_cycles == 65536, $sformatf("power-on reset lasted %0d cycles", rst_cycles));
    n_por++;
    check(ENET_RST_N == 1'b1, "Ethernet chip out of reset");
    cpu_run = 1;

    wait_frames(2);
    rotary_y0 = y_rpad;
    detent(1'b1);
    detent(1'b1);
    detent(1'b0);
    check(y_rpad == rotary_y0 + 10, $sformatf("right paddle moved to %0d", y_rpad));
    check(LEDR[0] == 1'b1, "rotary FSM back in S0");

    lpad_y0 = y_lpad;
    key(8'h77); key(8'h77); key(8'h73);
    key(8'h6C); key(8'h6B);
    check(y_lpad == lpad_y0 - 10, $sformatf("left paddle moved to %0d", y_lpad));
    check(ai_control == 1, "back in one-player mode");

    // ball bounce: sound
    sound_req = 1;
    wait (!sound_req);
    wait_frames(2);

    // a life is lost
    lives_left = 2;
    wait_frames(3);

    wait (audio_config_done);
    n_config++;
    wait (!audio_playing);
    check(burst_cycles > 64'(1024 * 4095) && burst_cycles <= 64'(1024 * 4096 + 1),
          $sformatf("sound lasted %0d cycles", burst_cycles));
    check(dac_ones > 1000, "sound on the codec data line");

    check(n_por > 0,       "mechanism: power-on reset release");
    check(n_frame_irq > 0, "mechanism: frame interrupt");
    check(n_rot_cw > 1,    "mechanism: rotary clockwise");
    check(n_rot_ccw > 0,   "mechanism: rotary counter-clockwise");
    check(n_key_up > 0,    "mechanism: network key up");
    check(n_key_down > 0,  "mechanism: network key down");
    check(n_mode > 1,      "mechanism: mode switch");
    check(n_sound > 0,     "mechanism: sound burst");
    check(n_config > 0,    "mechanism: codec configuration");
    check(n_life > 0,      "mechanism: lost life shown");
    check(n_enet_clk > 1000, "mechanism: Ethernet clock");
    $display("mechanisms: por=%0d frames=%0d cw=%0d ccw=%0d up=%0d down=%0d mode=%0d sound=%0d config=%0d life=%0d",
             n_por, n_frame_irq, n_rot_cw, n_rot_ccw, n_key_up, n_key_down, n_mode, n_sound, n_config, n_life);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000_000) @(posedge CLOCK_50);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
