// rotary_avalon: Avalon slave that connects the rotary paddle controller to
// the CPU.
//
// Wraps rotary_fsm.  When the decoder reports a detent (dir leaves
// ROT_NONE) the slave raises irq once and remembers the direction.  The
// interrupt handler reads the single register (any address) and gets
// 1 for counter-clockwise or 2 for clockwise (the last detected direction,
// 0 before the first one), then writes any value to clear irq.  A write in
// the same cycle as a new detection wins: the detection is then not
// signalled again, because irq is raised only on the rising edge of a
// detection.
//
// Reads have one cycle of latency (readdata is registered).  The FSM's
// state is shown on leds[7:0]; leds[17:8] are unused and driven low.
// Direction codes, the edge-triggered interrupt and clear-on-write follow
// the controller's register interface; the registered read and the
// remembered direction in a flip-flop rather than a level-held latch are
// this design's choices.
module rotary_avalon
  import pong_pkg::*;
#(
  parameter int unsigned HOLD_CYCLES = 10000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  avalon_req_t req,
  output logic [15:0] readdata,
  output logic        irq,
  input  logic        rot_a,
  input  logic        rot_b,
  output logic [17:0] leds
);

  rot_dir_t   dir, last_dir;
  logic       busy;             // a detection is being held on dir
  logic [7:0] state_onehot;

  rotary_fsm #(.HOLD_CYCLES(HOLD_CYCLES)) u_fsm (
    .clk, .rst_n, .a(rot_a), .b(rot_b), .dir, .state_onehot
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      irq      <= 1'b0;
      busy     <= 1'b0;
      last_dir <= ROT_NONE;
      readdata <= '0;
    end else begin
      if (dir != ROT_NONE) last_dir <= dir;
      if (req.chipselect && req.write) begin
        irq <= 1'b0;
      end else if (dir != ROT_NONE && !busy) begin
        irq  <= 1'b1;
      end
      busy <= (dir != ROT_NONE);
      if (req.chipselect && req.read)
        readdata <= {14'b0, (dir != ROT_NONE) ? dir : last_dir};
    end
  end

  assign leds = {10'b0, state_onehot};

  rw_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    req.chipselect |-> !(req.read && req.write));

endmodule
