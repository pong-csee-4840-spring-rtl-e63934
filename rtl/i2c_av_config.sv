// i2c_av_config: writes the audio codec's configuration over I2C after
// reset.
//
// The codec (device address 0x34 for a write) takes 16-bit control words:
// 7 bits of register number and 9 bits of value, sent as two bytes after
// the address byte.  After reset this block sends each word of a fixed
// table in turn as one I2C write: START, address byte, high byte, low byte,
// each followed by an acknowledge bit from the codec, then STOP.  A word
// whose acknowledges are not all low is sent again.  When the last word has
// been acknowledged, done goes high and the bus stays idle.
//
// The table sets line-in and headphone volumes, selects the DAC path,
// powers the codec up, selects left-justified 16-bit slave mode (which
// wm8731_driver produces), normal-mode sampling and finally activates the
// digital interface.
//
// Timing: one bit takes 4*QUARTER clock cycles (100 kHz SCL at 50 MHz with
// the default 125).  SDA is open-drain: sda_oe high pulls the line low, and
// sda_in is the line as seen on the pin.  SCL is driven push-pull.
//
// Only the block's role, codec configuration over I2C, comes from the game's
// audio path; the register table and the bus timing are this design's.
module i2c_av_config #(
  parameter int unsigned QUARTER = 125
) (
  input  logic clk,
  input  logic rst_n,
  output logic scl,
  output logic sda_oe,
  input  logic sda_in,
  output logic done
);

  localparam int unsigned NWORDS = 10;
  localparam logic [7:0]  DEV_ADDR = 8'h34;

  function automatic logic [15:0] cfg_word(input logic [3:0] i);
    unique case (i)
      4'd0:    return 16'h001A;   // R0  left line in, 0 dB
      4'd1:    return 16'h021A;   // R1  right line in, 0 dB
      4'd2:    return 16'h047B;   // R2  left headphone out
      4'd3:    return 16'h067B;   // R3  right headphone out
      4'd4:    return 16'h08F8;   // R4  analogue path: DAC selected
      4'd5:    return 16'h0A06;   // R5  digital path: de-emphasis 48 kHz
      4'd6:    return 16'h0C00;   // R6  power on
      4'd7:    return 16'h0E01;   // R7  left-justified, 16 bit, slave
      4'd8:    return 16'h1002;   // R8  sampling control, normal mode
      default: return 16'h1201;   // R9  activate interface
    endcase
  endfunction

  typedef enum logic [1:0] {ST_START, ST_BITS, ST_STOP, ST_DONE} state_t;

  state_t      state;
  logic [3:0]  word;
  logic [4:0]  slot;          // 0..26: 3 bytes of 8 data bits + 1 ack
  logic [1:0]  q;             // quarter of the current bit
  logic [$clog2(QUARTER)-1:0] div;
  logic        tick;
  logic        nack;
  logic [23:0] frame;
  logic        sda;           // value driven on SDA (1 = released)

  assign frame = {DEV_ADDR, cfg_word(word)};
  assign tick  = (div == ($bits(div))'(QUARTER - 1));

  // Bit of the frame in a slot: slots 8, 17 and 26 are acknowledge slots.
  function automatic logic slot_bit(input logic [23:0] f, input logic [4:0] s);
    logic [4:0] byte_i, bit_i;
    byte_i = s / 5'd9;
    bit_i  = s % 5'd9;
    if (bit_i == 5'd8) return 1'b1;
    return f[5'd23 - (byte_i * 5'd8 + bit_i)];
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= ST_START;
      word  <= '0;
      slot  <= '0;
      q     <= '0;
      div   <= '0;
      nack  <= 1'b0;
      scl   <= 1'b1;
      sda   <= 1'b1;
    end else begin
      div <= tick ? '0 : div + 1'b1;
      if (tick) begin
        q <= q + 1'b1;
        unique case (state)
          ST_START: begin
            // q0: both high; q1: SDA falls; q2: SCL falls; q3: wait
            unique case (q)
              2'd0: begin scl <= 1'b1; sda <= 1'b1; end
              2'd1: sda <= 1'b0;
              2'd2: scl <= 1'b0;
              default: begin
                state <= ST_BITS;
                slot  <= '0;
                nack  <= 1'b0;
              end
            endcase
          end
          ST_BITS: begin
            // q0: set SDA with SCL low; q1: SCL rises; q2: sample; q3: SCL falls
            unique case (q)
              2'd0: sda <= slot_bit(frame, slot);
              2'd1: scl <= 1'b1;
              2'd2: if (slot_bit(frame, slot) && sda_in && (slot % 5'd9 == 5'd8)) nack <= 1'b1;
              default: begin
                scl <= 1'b0;
                if (slot == 5'd26) state <= ST_STOP;
                else               slot  <= slot + 1'b1;
              end
            endcase
          end
          ST_STOP: begin
            // q0: SDA low; q1: SCL rises; q2: SDA rises; q3: next word
            unique case (q)
              2'd0: sda <= 1'b0;
              2'd1: scl <= 1'b1;
              2'd2: sda <= 1'b1;
              default: begin
                if (nack) begin
                  state <= ST_START;
                end else if (word == 4'(NWORDS - 1)) begin
                  state <= ST_DONE;
                end else begin
                  word  <= word + 1'b1;
                  state <= ST_START;
                end
              end
            endcase
          end
          default: begin
            scl <= 1'b1;
            sda <= 1'b1;
          end
        endcase
      end
    end
  end

  assign sda_oe = ~sda;
  assign done   = (state == ST_DONE);

endmodule
