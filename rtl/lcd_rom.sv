// Screen ROM of the LCD interface, 256 words of 12 bits, synchronous read
// (the address is registered, data appears one cycle after the address).
//
// Word format: bit 8 = 1 for a character (LCD data register), 0 for a
// command (instruction register); bits 7..0 are the byte sent to the LCD;
// bits 11..9 are 0 and only make the words three hex digits wide. The word
// 0x100 (a null character) ends a screen.
//
// Layout (double addressing): word 0 holds the address of the LCD
// initialisation sequence; word m+1 holds the address of the screen for
// lcd_mode m; the screens follow from word 16. The LCD interface reads the
// pointer, then the screen from that address until 0x100. New screens are
// added by editing the table only.
//
// Contents (lcd_rom.hex): initialisation 0x38 (8-bit bus, two lines),
// 0x0C (display on), 0x01 (clear), 0x06 (cursor moves right). Screens:
// 0 "PortaAMP"; 1 "Command" / "1=DN 2=DT 3=S"; 2 "From?" / "1=CD 2=EPP";
// 3 "Waiting for TX"; 4 "Downloading"; 5 line 2 "Complete"; 6 "Song X";
// 7 line 1 "Song X"; 8 line 2 ">" (play); 9 line 2 "||" (pause); 10 line 2
// "[]" (stop); 11 "Delete?"; 12 line 2 "Deleted"; 13 "Streaming". Line 1
// starts at LCD address 0x80 (command 0x80, or 0x01 which also clears) and
// line 2 at 0xC0. The format, the end marker, the pointer table and the
// screen texts follow the design description as far as it gives them; the
// init bytes, the icon characters and the pointer of unused modes (the
// power-on screen) are this design's choice.
module lcd_rom #(
  parameter string INIT_FILE = "rtl/lcd_rom.hex"
) (
  input  logic        clk,
  input  logic [7:0]  addr,
  output logic [11:0] q
);

  logic [11:0] mem [256];

  initial $readmemh(INIT_FILE, mem);

  always_ff @(posedge clk) q <= mem[addr];

endmodule
