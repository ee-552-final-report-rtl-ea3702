// Shared types and constants of the Porta-AMP MP3 player.
//
// The player is built around a 25 MHz system clock. Song data moves through
// the design as 16-bit words: the parallel port assembles them from byte
// pairs, the memory manager stores them in a 16-bit wide EDO DRAM SIMM, and
// the MP3 interface serialises them MSB first to the decoder chip.
//
// The LCD screen numbers follow the mode table of the player's user
// interface (5-bit mode code, up to 32 screens). The numeric codes are the
// ones of that table; the names are those of the table's states.
package porta_pkg;

  localparam int unsigned WORD_W     = 16;  // song data word
  localparam int unsigned DRAM_AW    = 22;  // word address of the 8 MB SIMM
  localparam int unsigned DRAM_PINS  = 10;  // multiplexed address pins A0-A9
  localparam int unsigned OFFSET_W   = 10;  // framed address: offset part
  localparam int unsigned FRAME_W    = 12;  // framed address: frame part
  localparam int unsigned LCD_MODE_W = 5;   // width of lcd_mode

  // Screens of the 16x2 LCD, selected by lcd_mode.
  typedef enum logic [LCD_MODE_W-1:0] {
    LCD_POWER_ON     = 5'd0,   // start-up banner
    LCD_CMD_DEFAULT  = 5'd1,   // command menu
    LCD_SOURCE_REQ   = 5'd2,   // download/stream source question
    LCD_SOURCE_WAIT  = 5'd3,   // waiting for the source
    LCD_DLING        = 5'd4,   // downloading
    LCD_COMPLETED    = 5'd5,   // download or streaming complete
    LCD_SONG_DEFAULT = 5'd6,   // song ready to be played
    LCD_SONG_NAME    = 5'd7,   // song title line
    LCD_PLAY         = 5'd8,   // play icon
    LCD_PAUSE        = 5'd9,   // pause icon
    LCD_STOP         = 5'd10,  // stop icon
    LCD_DEL_WHAT     = 5'd11,  // delete prompt
    LCD_DEL_DONE     = 5'd12,  // deletion complete
    LCD_STREAMING    = 5'd13   // streaming
  } lcd_mode_e;

  // ROM word of the LCD screen table: bit 8 selects the data register
  // (character) when 1 and the instruction register when 0.
  localparam logic [11:0] LCD_ROM_END = 12'h100;  // end-of-screen marker

endpackage
