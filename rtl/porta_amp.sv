// Porta-AMP: FPGA core of a portable MP3 player.
//
// A song is sent from a PC over the parallel port (EPP write cycles), stored
// as 16-bit words in an 8 MB EDO DRAM SIMM, and then streamed from the DRAM
// to a MAS3507D MP3 decoder chip as a serial bit stream with a ~1 MHz clock
// generated here. A 4x4 keypad scanner and a 16x2 character LCD controller
// complete the user interface.
//
// Structure (one 25 MHz clock, one asynchronous active-high reset):
//   ppi            - EPP slave, de-rings the PC lines, assembles words
//   mem_mgmt_cont  - single-song memory manager with framed addressing and
//                    refresh, over
//   dram_int       - the SIMM's RAS/CAS/WE sequencer
//   mp3_decode     - serialiser and decoder clock generator
//   lcd            - screen sequencer with its ROM and byte writer
//   keytop         - keypad scanner
//   porta_amp_ctrl - download-then-play sequencer that ties them together
//                    and tells the LCD which screen to show
//
// Pins follow the FPGA pin list of the player. The SIMM's bidirectional
// data bus is split into dram_dq_o / dram_dq_oe / dram_dq_i, to be joined
// by a tristate pad. The keypad's key code and strobe are brought out as
// key_data / key_dvalid: the controller that would act on keys is not part
// of this design. IEEE 1284 mode negotiation is built but off by default
// (PPI_NEGOTIATE = 0: EPP mode from reset, status outputs at their EPP-mode
// levels, ppi_nastrobe unused); the CD-ROM interface is not implemented.
//
// Lint notes: reset is reported as used both asynchronously and on the
// clock because the DRAM bus assertion is disabled during reset; the
// memory-full flag and the playing status are internal and left unread.
module porta_amp
  import porta_pkg::*;
#(
  parameter int unsigned        PPI_SETTLE     = 8,
  parameter int unsigned        PPI_TIMEOUT    = 25000,
  parameter bit                 PPI_NEGOTIATE  = 1'b0,
  parameter logic [DRAM_AW-1:0] ADDR_MASK      = 22'h33_FCFF,
  parameter int unsigned        REFRESH_CYCLES = 250,
  parameter int unsigned        DRAM_DELAY     = 3,
  parameter int unsigned        DRAM_READ_HOLD = 4,
  parameter int unsigned        MP3_HALF_DIV   = 13,
  parameter int unsigned        KEY_SAMPLE     = 25000,
  parameter int unsigned        LCD_INIT       = 375000,
  parameter int unsigned        LCD_E          = 12,
  parameter int unsigned        LCD_EXEC       = 1000,
  parameter int unsigned        LCD_LONG       = 50000
) (
  input  logic        clock,
  input  logic        reset,
  // keypad
  input  logic [3:0]  key_row,
  output logic [3:0]  key_column,
  output logic [3:0]  key_data,
  output logic        key_dvalid,
  // LCD
  output logic [7:0]  lcd_data_out,
  output logic        lcd_register_select,
  output logic        lcd_rw,
  output logic        lcd_nenable,
  // parallel port
  input  logic [7:0]  ppi_data_in,
  input  logic        ppi_ninit,
  input  logic        ppi_ndstrobe,
  input  logic        ppi_nwrite,
  input  logic        ppi_nastrobe,
  output logic        ppi_nwait,
  output logic        ppi_intr,
  output logic        ppi_ackdreq,
  output logic        ppi_xflag,
  output logic        pi_davailn,
  output logic        ppi_timeout,
  // DRAM SIMM
  output logic        dram_wen,
  output logic        dram_casn,
  output logic [3:0]  dram_rasn,
  output logic [9:0]  dram_addresspath,
  output logic [15:0] dram_dq_o,
  output logic        dram_dq_oe,
  input  logic [15:0] dram_dq_i,
  // MP3 decoder chip
  input  logic        mp3_demand,
  output logic        mp3_chipclk,
  output logic        mp3_chipresetn,
  output logic        mp3_dataout
);

  // PPI <-> controller
  logic        ppi_download, ppi_ready, ppi_dldone;
  logic [15:0] ppi_data;
  // memory <-> controller
  logic        ram_en, ram_rw, ram_ready, ram_no_data, ram_full;
  logic [15:0] ram_wdata, ram_rdata;
  // memory manager <-> DRAM interface
  logic        dp_req, dp_rw, dp_refresh, dp_ready;
  logic [21:0] dp_addr;
  logic [15:0] dp_wdata, dp_rdata;
  // MP3 <-> controller
  logic        mp3_en, mp3_ready;
  logic [15:0] mp3_data;
  // LCD <-> controller
  logic [LCD_MODE_W-1:0] lcd_mode;
  logic        lcd_mode_chg, lcd_done;
  logic        playing;

  porta_amp_ctrl u_ctrl (
    .clk(clock), .rst(reset),
    .ppi_download, .ppi_ready, .ppi_data, .ppi_dldone,
    .ram_en, .ram_rw, .ram_wdata, .ram_rdata, .ram_ready, .ram_no_data,
    .mp3_en, .mp3_data, .mp3_ready,
    .lcd_mode, .lcd_mode_chg, .lcd_done, .playing
  );

  ppi #(.SETTLE(PPI_SETTLE), .TIMEOUT(PPI_TIMEOUT), .NEGOTIATE(PPI_NEGOTIATE)) u_ppi (
    .clk(clock), .rst(reset),
    .ppi_data_in, .ppi_ndstrobe, .ppi_nwrite, .ppi_ninit, .ppi_nastrobe, .ppi_nwait,
    .ppi_intr, .ppi_ackdreq, .ppi_xflag, .ppi_davailn(pi_davailn),
    .ppi_download, .ppi_ready, .ppi_data, .ppi_dldone, .ppi_timeout
  );

  mem_mgmt_cont #(.ADDR_MASK(ADDR_MASK), .REFRESH_CYCLES(REFRESH_CYCLES)) u_mem (
    .clk(clock), .rst(reset),
    .client_en(ram_en), .client_rw(ram_rw), .client_wdata(ram_wdata),
    .client_rdata(ram_rdata), .client_ready(ram_ready),
    .client_no_data(ram_no_data), .client_full(ram_full),
    .dpath_req(dp_req), .dpath_r_w(dp_rw), .dpath_refresh(dp_refresh),
    .dpath_addr(dp_addr), .dpath_wdata(dp_wdata),
    .dpath_ready(dp_ready), .dpath_rdata(dp_rdata)
  );

  dram_int #(.DELAY(DRAM_DELAY), .READ_HOLD(DRAM_READ_HOLD)) u_dram (
    .clk(clock), .rst(reset),
    .req(dp_req), .r_w(dp_rw), .refresh(dp_refresh), .addr(dp_addr),
    .wdata(dp_wdata), .ready(dp_ready), .rdata(dp_rdata),
    .dram_rasn, .dram_casn, .dram_wen, .dram_addr(dram_addresspath),
    .dram_dq_o, .dram_dq_oe, .dram_dq_i
  );

  mp3_decode #(.HALF_DIV(MP3_HALF_DIV)) u_mp3 (
    .clk(clock), .rst(reset),
    .mp3_enable(mp3_en), .mp3_datain(mp3_data), .mp3_demand,
    .mp3_ready, .mp3_chipclk, .mp3_chipresetn, .mp3_dataout
  );

  lcd #(
    .INIT_CYCLES(LCD_INIT), .E_CYCLES(LCD_E),
    .EXEC_CYCLES(LCD_EXEC), .LONG_CYCLES(LCD_LONG)
  ) u_lcd (
    .clk(clock), .rst(reset),
    .lcd_mode, .lcd_mode_chg, .lcd_done,
    .lcd_data_out, .lcd_register_select, .lcd_rw, .lcd_nenable
  );

  keytop #(.SAMPLE_CYCLES(KEY_SAMPLE)) u_key (
    .clk(clock), .rst(reset),
    .key_row, .key_column, .key_data, .key_dvalid
  );

endmodule
