// rotary_fsm: decodes one detent of the rotary paddle controller.
//
// The knob has two contacts, A and B.  One detent clockwise produces the
// code sequence AB = 01, 11, 10 and back to 00; counter-clockwise produces
// 10, 11, 01, 00.  A seven-state Moore machine follows these sequences:
//
//   S0 --01--> S1 --11--> S2 --10--> S3 --> S0      (clockwise)
//   S0 --10--> S4 --11--> S5 --01--> S6 --> S0      (counter-clockwise)
//
// S1, S2, S4 and S5 stay put while their code repeats and fall back to S0
// on any other code; S3 and S6 return to S0 on the next clock.  Any state
// outside S0..S6 also returns to S0, so the machine can never lock up.
//
// Reaching S3 or S6 loads the direction (ROT_CW or ROT_CCW) into the output
// register, which then holds it for HOLD_CYCLES clock cycles (200 us at
// 50 MHz) before returning to ROT_NONE; a new detection restarts the hold.
// state_onehot shows the current state on LEDs (bit n for Sn).
//
// The states, transitions, direction codes and 10000-cycle hold follow the
// controller's specification.  The two-flip-flop synchroniser on A and B
// (SYNC_STAGES cycles of extra latency) and the synchronous reset are this
// design's additions.  Latency from the last code of a detent to dir:
// SYNC_STAGES + 2 cycles.
module rotary_fsm
  import pong_pkg::*;
#(
  parameter int unsigned HOLD_CYCLES = 10000,
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       a,
  input  logic       b,
  output rot_dir_t   dir,
  output logic [7:0] state_onehot
);

  typedef enum logic [2:0] {S0, S1, S2, S3, S4, S5, S6} state_t;

  logic [SYNC_STAGES-1:0] sync_a, sync_b;
  logic [1:0]             ab;
  state_t                 state, state_next;
  logic [$clog2(HOLD_CYCLES+1)-1:0] hold;

  always_ff @(posedge clk) begin
    sync_a <= {sync_a[SYNC_STAGES-2:0], a};
    sync_b <= {sync_b[SYNC_STAGES-2:0], b};
  end
  assign ab = {sync_a[SYNC_STAGES-1], sync_b[SYNC_STAGES-1]};

  always_comb begin
    unique case (state)
      S0:      state_next = (ab == 2'b01) ? S1 : (ab == 2'b10) ? S4 : S0;
      S1:      state_next = (ab == 2'b01) ? S1 : (ab == 2'b11) ? S2 : S0;
      S2:      state_next = (ab == 2'b11) ? S2 : (ab == 2'b10) ? S3 : S0;
      S4:      state_next = (ab == 2'b10) ? S4 : (ab == 2'b11) ? S5 : S0;
      S5:      state_next = (ab == 2'b11) ? S5 : (ab == 2'b01) ? S6 : S0;
      default: state_next = S0;          // S3, S6 and unused codes
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) state <= S0;
    else        state <= state_next;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dir          <= ROT_NONE;
      hold         <= '0;
      state_onehot <= 8'b0000_0001;
    end else begin
      state_onehot <= 8'(1) << state;
      if (state == S3 || state == S6) begin
        dir  <= (state == S3) ? ROT_CW : ROT_CCW;
        hold <= ($bits(hold))'(HOLD_CYCLES - 1);
      end else if (hold != '0) begin
        hold <= hold - 1'b1;
      end else begin
        dir  <= ROT_NONE;
      end
    end
  end

  initial begin
    assert (SYNC_STAGES >= 2) else $error("rotary_fsm: SYNC_STAGES must be at least 2");
    assert (HOLD_CYCLES >= 1) else $error("rotary_fsm: HOLD_CYCLES must be at least 1");
  end

endmodule
