// LCD command writer: sends one byte to an HD44780-type 16x2 character LCD
// over its 8-bit parallel bus and waits out the LCD's execution time.
//
// When valid is high in the idle state the byte and its register select
// (rs = 1 character / data register, rs = 0 command / instruction register)
// are latched, so the source may change them afterwards, and busy rises.
// The byte is put on lcd_data_out and lcd_nenable is raised for E_CYCLES;
// it then falls, and the LCD takes the byte on that falling edge. From the
// falling edge the writer waits EXEC_CYCLES (40 us) or, for the clear-display
// and return-home commands (0x01, 0x02, 0x03 with rs = 0), LONG_CYCLES
// (2 ms). done pulses for one cycle as busy falls. lcd_rw is always 0: the
// LCD is only written.
//
// Follows the design description: latching of the byte, the enable falling
// edge as the write strobe, the 40 us and 2 ms waits. The enable width and
// the choice of which commands need the long wait come from the usual
// HD44780 timing, not from the design description.
module lcd_out #(
  parameter int unsigned E_CYCLES    = 12,     // 480 ns at 25 MHz
  parameter int unsigned EXEC_CYCLES = 1000,   // 40 us at 25 MHz
  parameter int unsigned LONG_CYCLES = 50000   // 2 ms at 25 MHz
) (
  input  logic       clk,
  input  logic       rst,                 // asynchronous, active high
  input  logic       valid,
  input  logic       rs,
  input  logic [7:0] data,
  output logic       busy,
  output logic       done,
  output logic [7:0] lcd_data_out,
  output logic       lcd_register_select,
  output logic       lcd_rw,
  output logic       lcd_nenable
);

  typedef enum logic [1:0] {S_IDLE, S_ENABLE, S_EXEC} state_e;

  localparam int unsigned MAXC = (LONG_CYCLES > E_CYCLES) ? LONG_CYCLES : E_CYCLES;

  state_e state;
  logic [$clog2(MAXC+1)-1:0] cnt;

  assign lcd_rw = 1'b0;
  assign busy   = (state != S_IDLE);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state               <= S_IDLE;
      cnt                 <= '0;
      done                <= 1'b0;
      lcd_data_out        <= '0;
      lcd_register_select <= 1'b0;
      lcd_nenable         <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE:
          if (valid) begin
            lcd_data_out        <= data;
            lcd_register_select <= rs;
            lcd_nenable         <= 1'b1;
            cnt                 <= $bits(cnt)'(E_CYCLES - 1);
            state               <= S_ENABLE;
          end
        S_ENABLE:
          if (cnt == '0) begin
            lcd_nenable <= 1'b0;
            cnt <= (!lcd_register_select && lcd_data_out[7:2] == 6'd0 &&
                    lcd_data_out[1:0] != 2'd0) ? $bits(cnt)'(LONG_CYCLES - 1)
                                               : $bits(cnt)'(EXEC_CYCLES - 1);
            state <= S_EXEC;
          end else begin
            cnt <= cnt - 1'b1;
          end
        S_EXEC:
          if (cnt == '0) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            cnt <= cnt - 1'b1;
          end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
