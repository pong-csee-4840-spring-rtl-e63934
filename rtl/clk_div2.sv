// clk_div2: divide-by-two clock generator.
//
// The DM9000A Ethernet chip on the board has no crystal of its own, so its
// 25 MHz clock is made from the 50 MHz system clock: a flip-flop toggles on
// every rising edge of clk, giving a square wave of half the frequency and
// 50 % duty cycle.  clk_out rises on every second rising edge of clk.  The
// register starts at zero; there is no reset, so the clock runs while the
// rest of the system is still held in reset.  The zero start value is a
// declaration initialiser, the FPGA's power-up value.
module clk_div2 (
  input  logic clk,
  output logic clk_out
);

  logic q = 1'b0;

  always_ff @(posedge clk) q <= ~q;

  assign clk_out = q;

endmodule
