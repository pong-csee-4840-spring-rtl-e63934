// power_on_reset: holds the system in reset for a fixed time after the
// FPGA is configured.
//
// A free-running counter starts at zero when the device comes up (register
// initial value) and counts one per clock.  reset_n stays low until the
// counter has reached COUNT_MAX and is high from the next clock edge on,
// so reset lasts COUNT_MAX+1 cycles (65536 cycles, 1.3 ms at 50 MHz, with
// the default).  After that the counter stops.  The same signal resets the
// Nios system and drives the Ethernet chip's RST_N pin, keeping the chip in
// reset until its supplies have settled.
//
// The 16-bit counter and its all-ones end value follow the board's top
// level; the module has no reset input because it is the reset.  The
// start values are declaration initialisers on purpose: they are the
// FPGA's power-up register contents, so lint's note about a declaration
// initial value that a process also writes is expected here.
module power_on_reset #(
  parameter int unsigned WIDTH     = 16,
  parameter logic [WIDTH-1:0] COUNT_MAX = '1
) (
  input  logic clk,
  output logic reset_n
);

  logic [WIDTH-1:0] count = '0;
  logic             done  = 1'b0;

  always_ff @(posedge clk) begin
    if (count == COUNT_MAX) begin
      done <= 1'b1;
    end else begin
      done  <= 1'b0;
      count <= count + 1'b1;
    end
  end

  assign reset_n = done;

endmodule
