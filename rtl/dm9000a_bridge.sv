// dm9000a_bridge: Avalon slave that gives the CPU access to the DM9000A
// Ethernet controller, through which the player's keyboard reaches the game.
//
// The chip is not memory mapped: its registers are reached through two
// ports.  Word address 0 is the index port (ENET_CMD low): writing it
// selects a chip register.  Word address 1 is the data port (ENET_CMD
// high): reading or writing it accesses the register last selected.  So
// the slave has an address space of just two words, and the driver software
// does the rest.
//
// Each access is stretched to meet the chip's bus timing: one cycle of
// address/chip-select setup, one cycle with ENET_RD_N or ENET_WR_N low,
// and one cycle of hold, 20 ns each at 50 MHz.  waitrequest is high until
// the hold cycle, so an access takes four clocks, counting the one in
// which the request arrives.  Read data is captured at the end of the
// strobe cycle and appears on readdata in the cycle after the access
// completes, like the other slaves.  The 16-bit data bus is split into
// enet_data_out / enet_data_oe / enet_data_in; the pad is driven only
// during a write.
//
// ENET_INT is registered once and given to the CPU as irq.  ENET_RST_N is
// the system's power-on reset, which holds the chip in reset until the
// supplies are stable.  ENET_CLK (25 MHz) comes from clk_div2 outside.
//
// Follows the game's Ethernet bridge: two-word index/data address space,
// 20 ns setup/strobe/hold, reset from the power-on reset controller.  The
// waitrequest sequencer and the registered interrupt are this design's way
// of meeting that timing.
module dm9000a_bridge
  import pong_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  avalon_req_t req,
  output logic [15:0] readdata,
  output logic        waitrequest,
  output logic        irq,
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

  typedef enum logic [1:0] {IDLE, SETUP, STROBE, HOLD} state_t;

  state_t state;
  logic   is_write;
  logic   access;

  assign access      = req.chipselect && (req.read || req.write);
  assign waitrequest = access && (state != HOLD);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state         <= IDLE;
      is_write      <= 1'b0;
      ENET_CMD      <= 1'b0;
      enet_data_out <= '0;
      readdata      <= '0;
      irq           <= 1'b0;
    end else begin
      irq <= ENET_INT;
      unique case (state)
        IDLE: if (access) begin
          state         <= SETUP;
          is_write      <= req.write;
          ENET_CMD      <= req.address[0];
          enet_data_out <= req.writedata;
        end
        SETUP:  state <= STROBE;
        STROBE: begin
          state <= HOLD;
          if (!is_write) readdata <= enet_data_in;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign ENET_CS_N    = (state == IDLE);
  assign ENET_RD_N    = !(state == STROBE && !is_write);
  assign ENET_WR_N    = !(state == STROBE &&  is_write);
  assign enet_data_oe = (state != IDLE) && is_write;
  assign ENET_RST_N   = rst_n;

  // The master must hold its request while waitrequest is high.
  hold_request: assert property (@(posedge clk) disable iff (!rst_n)
    waitrequest |=> access);

endmodule
