// tb_dm9000a_bridge: a small register model of the Ethernet chip (index
// port and data port, 256 registers) sits on the bridge's chip bus.  The
// testbench writes and reads chip registers through the two-word Avalon
// window and checks the values, the ENET_CMD level of each port, the
// setup / strobe / hold timing (one clock each, four clocks per access with
// waitrequest), that data is driven only for writes, the interrupt path
// and the reset pin.
module tb_dm9000a_bridge;
  import pong_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  avalon_req_t req;
  logic [15:0] readdata;
  logic        waitrequest, irq;
  logic        ENET_CMD, ENET_CS_N, ENET_RD_N, ENET_WR_N, ENET_RST_N;
  logic [15:0] enet_data_out, enet_data_in;
  logic        enet_data_oe;
  logic        ENET_INT = 1'b0;
  int          checks = 0, failures = 0;

  dm9000a_bridge dut (.clk, .rst_n, .req, .readdata, .waitrequest, .irq,
    .ENET_CMD, .ENET_CS_N, .ENET_RD_N, .ENET_WR_N, .ENET_RST_N,
    .enet_data_out, .enet_data_oe, .enet_data_in, .ENET_INT);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ chip model
  logic [7:0]  index = '0;
  logic [15:0] chip_reg [256];
  int          bad_timing = 0, strobes = 0, oe_on_read = 0;
  int          cs_run = 0;
  always @(posedge clk) begin
    if (!ENET_CS_N) cs_run++;
    else            cs_run = 0;
    if (!ENET_WR_N || !ENET_RD_N) begin
      strobes++;
      if (cs_run != 2) bad_timing++;              // one setup cycle before
    end
    if (!ENET_RD_N && enet_data_oe) oe_on_read++;
    if (!ENET_WR_N && !ENET_CS_N) begin
      if (!ENET_CMD) index = enet_data_out[7:0];
      else           chip_reg[index] = enet_data_out;
    end
  end
  assign enet_data_in = (!ENET_RD_N && !ENET_CS_N) ?
                        (ENET_CMD ? chip_reg[index] : 16'h00EE) : 16'hDEAD;

  int waits;
  task automatic access(input bit wr, input bit port, input logic [15:0] wd, output logic [15:0] rd);
    req = '{chipselect: 1'b1, read: !wr, write: wr, address: {4'b0, port}, writedata: wd};
    waits = 0;
    #1;
    while (waitrequest) begin
      @(posedge clk); #1;
      waits++;
    end
    @(posedge clk); #1;
    req = '0;
    rd = readdata;
  endtask

  logic [15:0] d;
  int          hold_ok;

  initial begin
    req = '0;
    foreach (chip_reg[i]) chip_reg[i] = 16'(i * 3);
    @(posedge clk); #1;
    check(ENET_RST_N == 1'b0, "chip held in reset during system reset");
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    #1;
    check(ENET_RST_N == 1'b1, "chip reset released");
    check(ENET_CS_N && ENET_RD_N && ENET_WR_N, "bus idle");

    // select register 0x28 and read it (DM9000A vendor ID low byte)
    access(1'b1, 1'b0, 16'h0028, d);
    check(waits == 3, $sformatf("write took %0d wait cycles, expected 3", waits));
    check(index == 8'h28, "index port written with ENET_CMD low");
    access(1'b0, 1'b1, 16'h0, d);
    check(waits == 3, $sformatf("read took %0d wait cycles, expected 3", waits));
    check(d == 16'(8'h28 * 3), $sformatf("data port read %h", d));

    // write a register through the data port and read it back
    access(1'b1, 1'b0, 16'h00F2, d);
    access(1'b1, 1'b1, 16'h1234, d);
    check(chip_reg[8'hF2] == 16'h1234, "data port written with ENET_CMD high");
    access(1'b0, 1'b1, 16'h0, d);
    check(d == 16'h1234, $sformatf("read back %h", d));

    // back-to-back accesses and the hold cycle
    hold_ok = 1;
    access(1'b1, 1'b0, 16'h0005, d);
    check(ENET_CS_N == 1'b1 || !ENET_CMD, "CS released or index still selected after write");
    access(1'b0, 1'b1, 16'h0, d);
    check(d == 16'(5 * 3), "second read");
    check(bad_timing == 0, $sformatf("%0d strobes without a setup cycle", bad_timing));
    check(strobes == 7, $sformatf("%0d strobes for 7 accesses", strobes));
    check(oe_on_read == 0, "data pins not driven during reads");

    // interrupt pass-through, one clock of delay
    @(posedge clk); #1;
    ENET_INT = 1'b1;
    check(irq == 1'b0, "interrupt registered");
    @(posedge clk); #1;
    check(irq == 1'b1, "interrupt passed on");
    ENET_INT = 1'b0;
    @(posedge clk); #1;
    check(irq == 1'b0, "interrupt released");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
