// Self-checking test of the Porta-AMP controller against simple models of
// its four neighbours: a PPI that delivers a list of words with random
// delays, a memory that stores words in order and reports no data at the
// end (with random busy times), an MP3 interface with the ready/enable
// handshake and random word times, and a recorder of LCD requests.
// Checks: every downloaded word is written in order, then played in order;
// the end of the song stops the player; a second file end plays the song
// again; the LCD is asked for a screen only while it reports lcd_done and
// sees power_on, dling, then completed, play and finally stop.
module tb_porta_amp_ctrl;
  import porta_pkg::*;
  logic clk = 0, rst = 1;
  logic ppi_download, ppi_ready = 0, ppi_dldone = 0;
  logic [15:0] ppi_data = '0;
  logic ram_en, ram_rw, ram_ready = 1, ram_no_data = 0;
  logic [15:0] ram_wdata, ram_rdata = '0;
  logic mp3_en, mp3_ready = 1;
  logic [15:0] mp3_data;
  logic [LCD_MODE_W-1:0] lcd_mode;
  logic lcd_mode_chg, playing, lcd_done = 0;
  int checks = 0, failures = 0;

  porta_amp_ctrl dut (.*);

  always #20 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int N = 25;
  logic [15:0] song[N];
  logic [15:0] mem[$], played[$];
  int rd_ptr = 0;
  lcd_mode_e modes[$];

  // PPI model
  initial begin
    foreach (song[i]) song[i] = 16'($urandom);
    @(negedge rst);
    for (int i = 0; i < N; i++) begin
      @(posedge clk iff ppi_download);
      @(negedge clk) ppi_ready = 0;
      if (i == 0) repeat (300) @(negedge clk);   // banner has time to show
      repeat ($urandom_range(2, 30)) @(negedge clk);
      ppi_data = song[i]; ppi_ready = 1;
    end
    @(posedge clk iff ppi_download);
    @(negedge clk) ppi_ready = 0;
    repeat (40) @(negedge clk);
    ppi_dldone = 1; @(negedge clk); ppi_dldone = 0;
  end

  // memory model
  always @(posedge clk) if (!rst && ram_en) begin
    check(ram_ready, "memory command only when ready");
    #1 ram_ready = 0;
    repeat ($urandom_range(3, 20)) @(posedge clk);
    #1;
    if (!ram_rw) mem.push_back(ram_wdata);
    else if (rd_ptr < mem.size()) begin ram_rdata = mem[rd_ptr]; rd_ptr++; ram_no_data = 0; end
    else begin ram_no_data = 1; rd_ptr = 0; end
    ram_ready = 1;
  end

  // MP3 model
  always @(posedge clk) if (!rst && mp3_en && mp3_ready) begin
    played.push_back(mp3_data);
    #1 mp3_ready = 0;
    repeat ($urandom_range(10, 60)) @(posedge clk);
    #1 mp3_ready = 1;
  end

  // LCD model: busy for a random time after each request
  always @(posedge clk) if (!rst && lcd_mode_chg) begin
    check(lcd_done, "request only when the LCD is done");
    modes.push_back(lcd_mode_e'(lcd_mode));
    #1 lcd_done = 0;
    repeat ($urandom_range(5, 200)) @(posedge clk);
    #1 lcd_done = 1;
  end
  initial begin
    repeat (50) @(posedge clk);   // LCD start-up
    #1 lcd_done = 1;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    wait (played.size() == N);
    repeat (1000) @(negedge clk);
    check(mem.size() == N, $sformatf("%0d words written", mem.size()));
    foreach (mem[i]) check(mem[i] == song[i], $sformatf("stored word %0d", i));
    foreach (played[i]) check(played[i] == song[i], $sformatf("played word %0d: %h vs %h", i, played[i], song[i]));
    check(!playing, "stopped at the end of the song");
    check(modes.size() >= 4 && modes[0] == LCD_POWER_ON && modes[1] == LCD_DLING && LCD_COMPLETED inside {modes} &&
          modes[modes.size() - 1] == LCD_STOP && LCD_PLAY inside {modes},
          $sformatf("LCD screen sequence (%0d requests: %p)", modes.size(), modes));
    // replay
    @(negedge clk) ppi_dldone = 1; @(negedge clk) ppi_dldone = 0;
    wait (played.size() == 2 * N);
    repeat (300) @(negedge clk);
    for (int i = 0; i < N; i++) check(played[N + i] == song[i], $sformatf("replayed word %0d", i));
    check(mem.size() == N, "nothing written on replay");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
