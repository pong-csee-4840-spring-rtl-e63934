// tb_i2c_av_config: an I2C slave model listens to the configuration block.
// It decodes START and STOP conditions and bytes on SCL rising edges,
// acknowledges each byte (except on purpose once, to force a retry), and
// checks the sequence of register writes against the codec table, the
// device address, the retry after the missing acknowledge, the bit rate
// and the done flag.
module tb_i2c_av_config;
  localparam int Q = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic scl, sda_oe, sda_in, done;
  int   checks = 0, failures = 0;

  i2c_av_config #(.QUARTER(Q)) dut (.clk, .rst_n, .scl, .sda_oe, .sda_in, .done);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic slave_pull = 1'b0;
  logic sda;
  assign sda    = !(sda_oe || slave_pull);
  assign sda_in = sda;

  logic [15:0] expected [10] = '{16'h001A, 16'h021A, 16'h047B, 16'h067B, 16'h08F8,
                                 16'h0A06, 16'h0C00, 16'h0E01, 16'h1002, 16'h1201};

  // ------------------------------------------------------------ slave model
  bit          in_frame = 0;
  int          nbit = 0;
  logic [7:0]  cur = '0;
  logic [7:0]  bytes [$];
  logic [23:0] frames [$];
  int          acked_frames = 0, nacked = 0;
  bit          nack_this = 0, nack_done = 0, frame_ok = 1;
  int          starts = 0, stops = 0;
  logic        scl_q = 1'b1, sda_q = 1'b1;
  longint      cyc = 0, last_rise = 0, scl_period = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n && scl && scl_q && !sda && sda_q) begin // START
      starts++;
      in_frame = 1;
      nbit = 0;
      bytes.delete();
      frame_ok = 1;
      // refuse the 4th word once
      nack_this = (frames.size() == 3) && !nack_done;
    end
    if (rst_n && scl && scl_q && sda && !sda_q) begin  // STOP
      stops++;
      in_frame = 0;
      if (bytes.size() == 3) begin
        if (frame_ok) frames.push_back({bytes[0], bytes[1], bytes[2]});
        else          nacked++;
      end
    end
    if (scl && !scl_q) begin                          // SCL rising
      scl_period = cyc - last_rise;
      last_rise  = cyc;
      if (in_frame) begin
        if (nbit < 8) cur = {cur[6:0], sda};
        nbit++;
        if (nbit == 9) begin
          bytes.push_back(cur);
          nbit = 0;
        end
      end
    end
    if (!scl && scl_q && in_frame) begin              // SCL falling
      // acknowledge during the 9th clock of each byte
      if (nbit == 8) begin
        slave_pull = !nack_this;
        if (nack_this) begin
          frame_ok  = 0;
          nack_done = 1;
        end
      end else begin
        slave_pull = 1'b0;
      end
    end
    scl_q = scl;
    sda_q = sda;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    check(!done, "not done after reset");
    wait (done);
    repeat (40) @(posedge clk);
    check(frames.size() == 10, $sformatf("%0d acknowledged writes, expected 10", frames.size()));
    check(nacked == 1, $sformatf("%0d refused writes, expected 1", nacked));
    check(starts == 11 && stops == 11, $sformatf("%0d starts and %0d stops", starts, stops));
    for (int i = 0; i < 10 && i < frames.size(); i++) begin
      check(frames[i][23:16] == 8'h34, $sformatf("write %0d device address %h", i, frames[i][23:16]));
      check(frames[i][15:0] == expected[i], $sformatf("write %0d word %h, expected %h", i, frames[i][15:0], expected[i]));
    end
    check(scl_period == 4 * Q, $sformatf("SCL period %0d clocks, expected %0d", scl_period, 4 * Q));
    check(scl == 1'b1 && sda == 1'b1, "bus idle when done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
