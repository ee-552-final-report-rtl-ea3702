// Porta-AMP controller: downloads one song from the parallel port into the
// DRAM and then plays it from the DRAM through the MP3 interface.
//
// Sequence:
//   DOWNLOAD  - ask the PPI for a word (ppi_download pulse), wait for
//               ppi_ready, write the word to memory (ram_en, ram_rw = 0),
//               repeat. The PC marks the end of the file with ppi_dldone.
//   PLAY      - read the next word from memory (ram_en, ram_rw = 1); hand
//               it to the MP3 interface (mp3_en until mp3_ready falls);
//               repeat until the memory reports ram_no_data (end of song).
//   STOPPED   - idle; a new ppi_dldone (the PC sends a further file end)
//               starts the playback again from the start of the song.
// The LCD is told the state of the player with the modes of the screen
// table: power_on at reset, dling while downloading, completed when the
// file end arrives, play while playing and stop at the end. The wanted
// screen is kept in a register; it is sent (lcd_mode, then a one-cycle
// lcd_mode_chg) only while the LCD reports lcd_done, i.e. after its
// start-up and after the previous screen is written. If the wanted screen
// changes again before it could be sent, only the newest one is shown,
// except "completed": playback starts only after that screen is written.
//
// All handshakes are with one-cycle strobes towards blocks that show their
// state on a ready line: a strobe is issued only when that ready line is
// high, and the controller waits one cycle before it looks at the ready
// line again (the block lowers it in the cycle after the strobe).
//
// The download-then-play behaviour and the block connections follow the
// design description of the integrated player; the full user interface of
// the planned master controller (keypad commands, menus, several songs,
// deleting, streaming from the PC or CD-ROM) is not part of it. What
// happens after the end of the song, and which screens are shown, are this
// design's choice.
module porta_amp_ctrl
  import porta_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,            // asynchronous, active high
  // parallel port interface
  output logic                  ppi_download,
  input  logic                  ppi_ready,
  input  logic [15:0]           ppi_data,
  input  logic                  ppi_dldone,
  // memory management interface
  output logic                  ram_en,
  output logic                  ram_rw,         // 1 = read, 0 = write
  output logic [15:0]           ram_wdata,
  input  logic [15:0]           ram_rdata,
  input  logic                  ram_ready,
  input  logic                  ram_no_data,
  // MP3 interface
  output logic                  mp3_en,
  output logic [15:0]           mp3_data,
  input  logic                  mp3_ready,
  // LCD interface
  output logic [LCD_MODE_W-1:0] lcd_mode,
  output logic                  lcd_mode_chg,
  input  logic                  lcd_done,
  // status
  output logic                  playing
);

  typedef enum logic [3:0] {
    S_START,      // show the banner, start the first download request
    S_DL_REQ,     // ppi_download pulse
    S_DL_WAIT,    // waiting for a word or for the end of the file
    S_WR,         // write the word when the memory is ready
    S_WR_WAIT,    // write in progress
    S_RD,         // read the next word when the memory is ready
    S_RD_WAIT,    // read in progress
    S_MP3,        // offer the word to the MP3 interface
    S_MP3_ACK,    // wait until the MP3 interface took it
    S_SHOW_DONE,  // wait until the "completed" screen is written
    S_STOPPED
  } state_e;

  typedef enum logic [1:0] {
    L_IDLE,       // LCD showing lcd_mode (or starting up)
    L_SENT,       // request pulsed, waiting for lcd_done to fall
    L_BUSY        // LCD writing, waiting for lcd_done to rise
  } lcd_phase_e;

  state_e state;
  logic   strobe_gap;   // one cycle after a strobe
  logic   dl_done_seen;
  lcd_mode_e  want;
  logic       shown_valid;
  lcd_phase_e lph;

  assign playing = (state inside {S_RD, S_RD_WAIT, S_MP3, S_MP3_ACK});

  task automatic show(input lcd_mode_e m);
    want <= m;
  endtask

  logic lcd_settled;
  assign lcd_settled = (lph == L_IDLE) && lcd_done && shown_valid && (lcd_mode == want);

  // screen requests
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      lph          <= L_IDLE;
      lcd_mode     <= LCD_POWER_ON;
      lcd_mode_chg <= 1'b0;
      shown_valid  <= 1'b0;
    end else begin
      lcd_mode_chg <= 1'b0;
      unique case (lph)
        L_IDLE:
          if (lcd_done && (!shown_valid || lcd_mode != want)) begin
            lcd_mode     <= want;
            lcd_mode_chg <= 1'b1;
            shown_valid  <= 1'b1;
            lph          <= L_SENT;
          end
        L_SENT: if (!lcd_done) lph <= L_BUSY;
        L_BUSY: if (lcd_done)  lph <= L_IDLE;
        default: lph <= L_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state        <= S_START;
      ppi_download <= 1'b0;
      ram_en       <= 1'b0;
      ram_rw       <= 1'b1;
      ram_wdata    <= '0;
      mp3_en       <= 1'b0;
      mp3_data     <= '0;
      want         <= LCD_POWER_ON;
      strobe_gap   <= 1'b0;
      dl_done_seen <= 1'b0;
    end else begin
      ppi_download <= 1'b0;
      ram_en       <= 1'b0;
      strobe_gap   <= 1'b0;
      if (ppi_dldone) dl_done_seen <= 1'b1;

      unique case (state)
        S_START: begin
          show(LCD_POWER_ON);
          state <= S_DL_REQ;
        end
        S_DL_REQ: begin
          ppi_download <= 1'b1;
          strobe_gap   <= 1'b1;
          state        <= S_DL_WAIT;
        end
        S_DL_WAIT:
          if (!strobe_gap && ppi_ready) begin
            ram_wdata <= ppi_data;
            show(LCD_DLING);
            state <= S_WR;
          end else if (dl_done_seen || ppi_dldone) begin
            dl_done_seen <= 1'b0;
            show(LCD_COMPLETED);
            state <= S_SHOW_DONE;
          end
        S_WR:
          if (ram_ready) begin
            ram_en     <= 1'b1;
            ram_rw     <= 1'b0;
            strobe_gap <= 1'b1;
            state      <= S_WR_WAIT;
          end
        S_WR_WAIT:
          if (!strobe_gap && ram_ready) state <= S_DL_REQ;
        S_RD:
          if (ram_ready) begin
            ram_en     <= 1'b1;
            ram_rw     <= 1'b1;
            strobe_gap <= 1'b1;
            show(LCD_PLAY);
            state <= S_RD_WAIT;
          end
        S_RD_WAIT:
          if (!strobe_gap && ram_ready) begin
            if (ram_no_data) begin
              show(LCD_STOP);
              state <= S_STOPPED;
            end else begin
              mp3_data <= ram_rdata;
              state    <= S_MP3;
            end
          end
        S_MP3:
          if (mp3_ready) begin
            mp3_en <= 1'b1;
            state  <= S_MP3_ACK;
          end
        S_MP3_ACK:
          if (!mp3_ready) begin
            mp3_en <= 1'b0;
            state  <= S_RD;
          end
        S_SHOW_DONE:
          if (want == LCD_COMPLETED && lcd_settled) state <= S_RD;
        S_STOPPED:
          if (dl_done_seen || ppi_dldone) begin
            dl_done_seen <= 1'b0;
            state        <= S_RD;
          end
        default: state <= S_START;
      endcase
    end
  end

endmodule
