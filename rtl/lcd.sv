// LCD interface: shows one of up to 32 stored screens on a 16x2 character
// LCD on request of the controller.
//
// The screens live in lcd_rom as a pointer table followed by byte
// sequences (see lcd_rom). After reset the interface waits INIT_CYCLES
// (15 ms) for the LCD's own power-up, then plays the initialisation
// sequence (ROM pointer 0). It then raises lcd_done and waits. A rising
// edge on lcd_mode_chg requests screen lcd_mode: lcd_done falls, the
// pointer at ROM word lcd_mode+1 is read, and the words from that address
// are sent one by one through lcd_out until the 0x100 end marker, after
// which lcd_done rises again. The edge, not the level, starts a screen, so
// the same mode can be requested twice in a row. A request that arrives
// while a screen is being written is kept and served afterwards. lcd_mode
// is captured at the rising edge of lcd_mode_chg; one request can wait,
// and a later one replaces it.
//
// States: INIT_WAIT, GET_MODE_ADDR (address the pointer), WAIT_MODE_ADDR
// (ROM read latency), LOAD_ADDR (take the pointer), WAIT_ADDR, DISPLAY_CHAR
// (end marker check, hand the word to lcd_out), WAIT_OUT (lcd_out busy),
// INC_ADDR, WAIT_FOR_MODE. Each word costs 4 cycles plus the lcd_out time
// (about 40 us; 2 ms for clear and home).
//
// Follows the design description: the state sequence, the 15 ms start-up
// wait, the initialisation as a mode 0 reachable only by reset, the mode
// index offset by one in the ROM, the rising-edge request and the lcd_done
// handshake. The request latch (one waiting request) is this design's own.
module lcd
  import porta_pkg::*;
#(
  parameter int unsigned INIT_CYCLES = 375000,  // 15 ms at 25 MHz
  parameter int unsigned E_CYCLES    = 12,
  parameter int unsigned EXEC_CYCLES = 1000,    // 40 us
  parameter int unsigned LONG_CYCLES = 50000,   // 2 ms
  parameter string       ROM_FILE    = "rtl/lcd_rom.hex"
) (
  input  logic                  clk,
  input  logic                  rst,           // asynchronous, active high
  input  logic [LCD_MODE_W-1:0] lcd_mode,
  input  logic                  lcd_mode_chg,
  output logic                  lcd_done,      // LCD_COMPLETE
  output logic [7:0]            lcd_data_out,
  output logic                  lcd_register_select,
  output logic                  lcd_rw,
  output logic                  lcd_nenable
);

  typedef enum logic [3:0] {
    INIT_WAIT, GET_MODE_ADDR, WAIT_MODE_ADDR, LOAD_ADDR, WAIT_ADDR,
    DISPLAY_CHAR, WAIT_OUT, INC_ADDR, WAIT_FOR_MODE
  } state_e;

  state_e      state;
  logic [7:0]  rom_addr;
  logic [11:0] rom_q;
  logic [7:0]  mode_index;
  logic        chg_q, pending;
  logic [LCD_MODE_W-1:0] pending_mode;
  logic        out_valid, out_busy, out_done;
  logic [$clog2(INIT_CYCLES+1)-1:0] init_cnt;

  lcd_rom #(.INIT_FILE(ROM_FILE)) u_rom (.clk, .addr(rom_addr), .q(rom_q));

  lcd_out #(
    .E_CYCLES(E_CYCLES), .EXEC_CYCLES(EXEC_CYCLES), .LONG_CYCLES(LONG_CYCLES)
  ) u_out (
    .clk, .rst, .valid(out_valid), .rs(rom_q[8]), .data(rom_q[7:0]),
    .busy(out_busy), .done(out_done),
    .lcd_data_out, .lcd_register_select, .lcd_rw, .lcd_nenable
  );

  assign out_valid = (state == DISPLAY_CHAR) && (rom_q != LCD_ROM_END) && !out_busy;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state      <= INIT_WAIT;
      rom_addr   <= '0;
      mode_index <= '0;
      init_cnt   <= '0;
      lcd_done   <= 1'b0;
      chg_q      <= 1'b0;
      pending    <= 1'b0;
      pending_mode <= '0;
    end else begin
      chg_q <= lcd_mode_chg;
      unique case (state)
        INIT_WAIT:
          if (init_cnt == $bits(init_cnt)'(INIT_CYCLES - 1)) begin
            mode_index <= '0;   // initialisation sequence
            state      <= GET_MODE_ADDR;
          end else begin
            init_cnt <= init_cnt + 1'b1;
          end
        GET_MODE_ADDR: begin
          rom_addr <= mode_index;
          state    <= WAIT_MODE_ADDR;
        end
        WAIT_MODE_ADDR: state <= LOAD_ADDR;
        LOAD_ADDR: begin
          rom_addr <= rom_q[7:0];
          state    <= WAIT_ADDR;
        end
        WAIT_ADDR: state <= DISPLAY_CHAR;
        DISPLAY_CHAR:
          if (rom_q == LCD_ROM_END) begin
            lcd_done <= 1'b1;
            state    <= WAIT_FOR_MODE;
          end else if (out_valid) begin
            state <= WAIT_OUT;
          end
        WAIT_OUT:
          if (out_done) state <= INC_ADDR;
        INC_ADDR: begin
          rom_addr <= rom_addr + 1'b1;
          state    <= WAIT_ADDR;
        end
        WAIT_FOR_MODE:
          if (pending) begin
            pending    <= 1'b0;
            lcd_done   <= 1'b0;
            mode_index <= 8'(pending_mode) + 8'd1;
            state      <= GET_MODE_ADDR;
          end
        default: state <= INIT_WAIT;
      endcase
      if (lcd_mode_chg && !chg_q) begin
        pending      <= 1'b1;
        pending_mode <= lcd_mode;
      end
    end
  end

endmodule
