// avalon_fabric: the system bus between the CPU's data master and the four
// game peripherals.
//
// The CPU side is a word-addressed Avalon master with 8 address bits,
// 16-bit data, waitrequest, and fixed read latency of one cycle (readdata
// is valid the cycle after the read is accepted).  address[7:5] selects
// the slave and address[4:0] is passed on:
//
//   0x00-0x1F  VGA raster controller (16 registers, aliased twice)
//   0x20-0x3F  rotary controller (one register, aliased)
//   0x40-0x5F  audio controller
//   0x60-0x7F  DM9000A Ethernet bridge (two ports, aliased)
//   0x80-0xFF  unmapped: writes are ignored, reads return 0
//
// Only the Ethernet bridge inserts wait states.  The slave of an accepted
// read is remembered for one cycle to steer its readdata back.  The
// interrupt lines are gathered into irq (bit 0 VGA, 1 rotary, 2 Ethernet).
//
// The bus itself is named in the system's block diagram; its address map
// and this simple decoder are this design's.
module avalon_fabric
  import pong_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // CPU master
  input  logic        m_read,
  input  logic        m_write,
  input  logic [7:0]  m_address,
  input  logic [15:0] m_writedata,
  output logic [15:0] m_readdata,
  output logic        m_waitrequest,
  // slaves: 0 VGA, 1 rotary, 2 audio, 3 Ethernet
  output avalon_req_t s_req [4],
  input  logic [15:0] s_readdata [4],
  input  logic        s_waitrequest [4],
  input  logic        vga_irq,
  input  logic        rotary_irq,
  input  logic        enet_irq,
  output logic [2:0]  irq
);

  logic [1:0] sel, rd_sel;
  logic       mapped, rd_pending;

  assign sel    = m_address[6:5];
  assign mapped = !m_address[7];

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      s_req[i].chipselect = mapped && (sel == 2'(i)) && (m_read || m_write);
      s_req[i].read       = m_read;
      s_req[i].write      = m_write;
      s_req[i].address    = m_address[4:0];
      s_req[i].writedata  = m_writedata;
    end
    m_waitrequest = mapped && (m_read || m_write) && s_waitrequest[sel];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_sel     <= '0;
      rd_pending <= 1'b0;
    end else begin
      rd_pending <= m_read && mapped && !m_waitrequest;
      rd_sel     <= sel;
    end
  end

  assign m_readdata = rd_pending ? s_readdata[rd_sel] : 16'h0000;
  assign irq        = {enet_irq, rotary_irq, vga_irq};

  one_command: assert property (@(posedge clk) disable iff (!rst_n)
    !(m_read && m_write));

endmodule
