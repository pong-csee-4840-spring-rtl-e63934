// tb_avalon_fabric: stub slaves answer with a value made of their own
// number and the address they received.  The testbench checks the address
// decode (one chipselect per region, none for the unmapped upper half),
// the address and data passed on, read data steered back from the right
// slave one cycle later, waitrequest forwarded only from the selected
// slave, zero from unmapped reads and the interrupt bundle.
module tb_avalon_fabric;
  import pong_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        m_read = 0, m_write = 0;
  logic [7:0]  m_address = '0;
  logic [15:0] m_writedata = '0;
  logic [15:0] m_readdata;
  logic        m_waitrequest;
  avalon_req_t s_req [4];
  logic [15:0] s_readdata [4];
  logic        s_waitrequest [4];
  logic        vga_irq = 0, rotary_irq = 0, enet_irq = 0;
  logic [2:0]  irq;
  int          checks = 0, failures = 0;

  avalon_fabric dut (.clk, .rst_n, .m_read, .m_write, .m_address, .m_writedata,
    .m_readdata, .m_waitrequest, .s_req, .s_readdata, .s_waitrequest,
    .vga_irq, .rotary_irq, .enet_irq, .irq);

  always #10 clk = ~clk;

  // stub slaves: registered readdata = {slave, 3'b0, address}
  logic [1:0] wait_left;
  always @(posedge clk) begin
    for (int i = 0; i < 4; i++)
      if (s_req[i].chipselect && s_req[i].read)
        s_readdata[i] <= {4'(i), 7'b0, s_req[i].address};
    if (s_req[3].chipselect && wait_left != 0) wait_left <= wait_left - 1'b1;
    else if (!s_req[3].chipselect)             wait_left <= 2'd2;
  end
  always_comb begin
    s_waitrequest[0] = 1'b0;
    s_waitrequest[1] = 1'b0;
    s_waitrequest[2] = 1'b0;
    s_waitrequest[3] = s_req[3].chipselect && (wait_left != 0);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int waits;
  task automatic rd(input logic [7:0] a, output logic [15:0] d);
    m_read = 1; m_address = a;
    #1;
    waits = 0;
    while (m_waitrequest) begin
      @(posedge clk); #1;
      waits++;
    end
    @(posedge clk); #1;
    m_read = 0;
    d = m_readdata;
  endtask

  logic [15:0] d;
  int cs_count;

  initial begin
    for (int i = 0; i < 4; i++) s_readdata[i] = '0;
    wait_left = 2'd2;
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1;
    // decode
    for (int a = 0; a < 256; a += 7) begin
      m_write = 1; m_address = 8'(a); m_writedata = 16'(a * 5);
      #1;
      cs_count = 0;
      for (int i = 0; i < 4; i++) if (s_req[i].chipselect) cs_count++;
      if (a < 128) begin
        check(cs_count == 1 && s_req[a / 32].chipselect, $sformatf("address %h selects slave %0d", a, a / 32));
        check(s_req[a / 32].address == 5'(a % 32) && s_req[a / 32].writedata == 16'(a * 5) &&
              s_req[a / 32].write, $sformatf("address %h passed on", a));
      end else begin
        check(cs_count == 0, $sformatf("address %h unmapped", a));
      end
      m_write = 0;
      #1;
    end
    @(posedge clk); #1;
    // read steering
    rd(8'h05, d);  check(d == 16'h0005, $sformatf("read VGA: %h", d));
    rd(8'h21, d);  check(d == 16'h1001, $sformatf("read rotary: %h", d));
    rd(8'h43, d);  check(d == 16'h2003, $sformatf("read audio: %h", d));
    check(waits == 0, "no wait states from audio");
    rd(8'h61, d);  check(d == 16'h3001, $sformatf("read Ethernet: %h", d));
    check(waits == 2, $sformatf("Ethernet wait states %0d", waits));
    rd(8'hC0, d);  check(d == 16'h0000, "unmapped read gives 0");
    #1 check(m_readdata == 16'h0000, "read data is zero when no read is returning");
    // interrupts
    vga_irq = 1; #1 check(irq == 3'b001, "VGA interrupt on bit 0");
    vga_irq = 0; rotary_irq = 1; #1 check(irq == 3'b010, "rotary interrupt on bit 1");
    rotary_irq = 0; enet_irq = 1; #1 check(irq == 3'b100, "Ethernet interrupt on bit 2");
    enet_irq = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
