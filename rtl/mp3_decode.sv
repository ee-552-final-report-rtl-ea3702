// MP3 interface: streams 16-bit song words to the MAS3507D decoder chip.
//
// The decoder takes its compressed data as a serial bit stream with a clock
// of about 1 MHz; a bit must be valid at the falling edge of that clock. The
// interface runs on the 25 MHz system clock and generates the decoder clock
// (mp3_chipclk) with clock_divide, switching it on only while bits are
// being shifted out.
//
// Handshake with the controller: mp3_ready is high while the interface waits
// for a word. The controller places the word on mp3_datain first, then
// raises mp3_enable. When mp3_enable is high and the decoder asks for data
// (mp3_demand high), the word is latched and mp3_ready falls on the next
// clock edge; the controller must then drop mp3_enable before mp3_ready
// returns. The high byte goes out first, each byte MSB first, so the bit
// order on mp3_dataout is bit 15 down to bit 0.
//
// State machine (7 states): START while reset (decoder chip held in reset,
// mp3_chipresetn low), WAIT (mp3_ready high), LOAD (word latched on entry, acknowledged by mp3_ready low), SHIFT1
// (load the high byte into the shift register), SEND1 (clock on, 8 bits),
// SHIFT2 (clock off, load the low byte), SEND2 (8 bits), back to WAIT.
// During SEND a rising clock edge shifts the next bit onto mp3_dataout and a
// falling edge counts it; after the 8th falling edge the clock stops.
//
// Timing: a word takes about 32*HALF_DIV + 6 system cycles from mp3_enable
// to mp3_ready (422 cycles, ~17 us, at the default). The states, the
// byte order, the clock gating and the edge roles follow the design
// description; state encodings, the counter and the reset release are this
// design's own. Only the serial output of the shift register is used; its
// parallel output sr_q is left unread (lint lists it as unused).
module mp3_decode #(
  parameter int unsigned HALF_DIV = 13   // chip clock = clk / (2*HALF_DIV)
) (
  input  logic        clk,
  input  logic        rst,             // mp3_reset, asynchronous, active high
  input  logic        mp3_enable,      // word on mp3_datain is valid
  input  logic [15:0] mp3_datain,
  input  logic        mp3_demand,      // decoder chip requests data
  output logic        mp3_ready,       // waiting for a word
  output logic        mp3_chipclk,     // ~1 MHz clock to the decoder
  output logic        mp3_chipresetn,  // decoder reset, active low
  output logic        mp3_dataout      // serial data, valid on chipclk fall
);

  typedef enum logic [2:0] {
    S_START, S_WAIT, S_LOAD, S_SHIFT1, S_SEND1, S_SHIFT2, S_SEND2
  } state_e;

  state_e      state;
  logic [15:0] word_q;
  logic [3:0]  bit_cnt;
  logic        clk_en, rise_tick, fall_tick;
  logic        sr_load;
  logic [7:0]  sr_d, sr_q;

  assign clk_en  = (state == S_SEND1) || (state == S_SEND2);
  assign sr_load = (state == S_SHIFT1) || (state == S_SHIFT2);
  assign sr_d    = (state == S_SHIFT1) ? word_q[15:8] : word_q[7:0];

  clock_divide #(.HALF_DIV(HALF_DIV)) u_div (
    .clk, .rst, .en(clk_en),
    .clk_out(mp3_chipclk), .rise_tick, .fall_tick
  );

  shift8bitreg u_sr (
    .clk, .rst, .load(sr_load), .shift(rise_tick), .d(sr_d),
    .q(sr_q), .sout(mp3_dataout)
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state          <= S_START;
      word_q         <= '0;
      bit_cnt        <= '0;
      mp3_chipresetn <= 1'b0;
    end else begin
      mp3_chipresetn <= 1'b1;
      unique case (state)
        S_START: state <= S_WAIT;
        S_WAIT:
          if (mp3_enable && mp3_demand) begin
            word_q <= mp3_datain;
            state  <= S_LOAD;
          end
        S_LOAD: state <= S_SHIFT1;
        S_SHIFT1: begin
          bit_cnt <= '0;
          state   <= S_SEND1;
        end
        S_SEND1:
          if (fall_tick) begin
            bit_cnt <= bit_cnt + 1'b1;
            if (bit_cnt == 4'd7) state <= S_SHIFT2;
          end
        S_SHIFT2: begin
          bit_cnt <= '0;
          state   <= S_SEND2;
        end
        S_SEND2:
          if (fall_tick) begin
            bit_cnt <= bit_cnt + 1'b1;
            if (bit_cnt == 4'd7) state <= S_WAIT;
          end
        default: state <= S_START;
      endcase
    end
  end

  assign mp3_ready = (state == S_WAIT);

endmodule
