// End-to-end test of the Porta-AMP core with every parameter at its
// default (25 MHz clock). Around the design: a PC that sends a 600-byte
// file over EPP with ringing on all lines and then pulses nInit low, an
// 8 MB EDO SIMM model, a decoder model that samples the serial stream at
// each falling edge of mp3_chipclk and now and then stops asking for data,
// a 4x4 keypad with one key press, and an LCD bus recorder.
//
// Checks: the song played to the decoder equals the file; the words sit
// in the SIMM at the framed, masked addresses; the LCD shows the start-up
// banner, "Downloading", "Complete", the play and the stop icon; the key
// is reported. Each mechanism of the design is counted and must occur:
// ringing filtered, PC held off, PPI timeout, DRAM writes, reads and
// refreshes, a refresh waiting for an access, the offset wrapping into the
// frame, end of song, decoder demand stall, LCD screens, key report.
module tb_porta_amp;
  logic clock = 0, reset = 1;
  logic [3:0]  key_row, key_column, key_data;
  logic        key_dvalid;
  logic [7:0]  lcd_data_out;
  logic        lcd_register_select, lcd_rw, lcd_nenable;
  logic [7:0]  ppi_data_in = '0;
  logic        ppi_ninit = 1, ppi_ndstrobe = 1, ppi_nwrite = 1, ppi_nastrobe = 1;
  logic        ppi_nwait, ppi_timeout;
  logic        ppi_intr, ppi_ackdreq, ppi_xflag, pi_davailn;
  logic        dram_wen, dram_casn, dram_dq_oe;
  logic [3:0]  dram_rasn;
  logic [9:0]  dram_addresspath;
  logic [15:0] dram_dq_o, dram_dq_i;
  logic        mp3_demand = 0, mp3_chipclk, mp3_chipresetn, mp3_dataout;
  int checks = 0, failures = 0;
  longint cyc = 0;

  porta_amp dut (.*);

  edo_simm_model simm (.rasn(dram_rasn), .casn(dram_casn), .wen(dram_wen),
    .addr(dram_addresspath), .dq_in(dram_dq_o), .dq_oe(dram_dq_oe), .dq_out(dram_dq_i));

  always #20 clock = !clock;   // 25 MHz
  always @(posedge clock) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100ms;
    failures++;
    $display("FAIL watchdog at cycle %0d: played %0d ctrl %s mem writes %0d", cyc, played.size(),
             dut.u_ctrl.state.name(), simm.writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_ring = 0, n_holdoff = 0, n_timeout = 0, n_ref_delay = 0, n_nodata = 0;
  int n_stall = 0, n_key = 0, n_screens = 0;
  bit frame_moved = 0;
  int stb_low_unacked = 0;

  always @(posedge clock) if (!reset) begin
    // PC strobe waiting without acknowledge
    if (!ppi_ndstrobe && !ppi_nwait) stb_low_unacked++;
    else begin
      if (stb_low_unacked > 40) n_holdoff++;
      stb_low_unacked = 0;
    end
    // refresh due while a DRAM access is still running: it has to wait
    if (dut.u_mem.ref_due && !dut.u_mem.dpath_refresh &&
        (dut.u_mem.dpath_req || !dut.u_mem.dpath_ready))
      n_ref_delay++;
    if (dut.u_mem.wr_addr.frame != 0) frame_moved = 1;
    if (dut.u_mp3.mp3_ready && dut.mp3_en && !mp3_demand) n_stall++;
    if (key_dvalid) n_key++;
    if (dut.u_lcd.lcd_done && !$past(dut.u_lcd.lcd_done)) n_screens++;
  end
  bit to_q = 0;
  always @(posedge clock) if (!reset) begin
    if (ppi_timeout && !to_q) n_timeout++;
    to_q <= ppi_timeout;
  end
  always @(posedge dut.ram_no_data) n_nodata++;

  // ---------------- PC with EPP port ----------------
  localparam int NBYTES = 600;
  logic [7:0] file[NBYTES];

  task automatic ring(ref logic line, input logic level);
    line = level;
    repeat (2) begin
      #(20 + $urandom_range(0, 40));
      line = !level;
      #(5 + $urandom_range(0, 10));
      line = level;
      n_ring++;
    end
  endtask

  // returns 0 if the PC gave up on this byte (held the strobe too long)
  task automatic epp_write(input logic [7:0] b, input bit stall, output bit ok);
    while (ppi_nwait) #10;
    // the PC driver also requires nAck, Select and nError high
    check(ppi_intr && ppi_xflag && pi_davailn, "EPP status lines high");
    ppi_nwrite = 0;
    ppi_data_in = b;
    ring(ppi_ndstrobe, 0);
    while (!ppi_nwait) #10;
    if (stall) #1100us;    // PC stops in mid cycle: the peripheral times out
    #40;
    ring(ppi_ndstrobe, 1);
    while (ppi_nwait) #10;
    ppi_nwrite = 1;
    ok = !stall;
  endtask

  initial begin : pc
    bit ok;
    bit stalled;
    stalled = 0;
    foreach (file[i]) file[i] = 8'($urandom);
    #20ms;     // the user starts the transfer after the player has come up
    for (int i = 0; i < NBYTES; i++) begin
      epp_write(file[i], i == 101 && !stalled, ok);
      if (!ok) begin
        // the peripheral dropped the word: send it again from its first byte
        stalled = 1;
        i = i - 1 - (i % 2);
        continue;
      end
      #($urandom_range(100, 600));
    end
    #5us;
    ring(ppi_ninit, 0);     // end of file
    #20us;
    ring(ppi_ninit, 1);
  end

  // ---------------- MP3 decoder ----------------
  logic [15:0] rx_sr;
  int rx_bits = 0;
  logic [15:0] played[$];
  always @(negedge mp3_chipclk) if (!reset) begin
    rx_sr = {rx_sr[14:0], mp3_dataout};
    if (++rx_bits == 16) begin played.push_back(rx_sr); rx_bits = 0; end
  end
  initial begin : decoder_demand
    #100us;
    forever begin
      mp3_demand = 1;
      #($urandom_range(50, 200) * 1us);
      mp3_demand = 0;     // decoder buffer full for a while
      #($urandom_range(5, 40) * 1us);
    end
  end

  // ---------------- keypad ----------------
  int pressed = -1;
  always_comb begin
    key_row = 4'hF;
    if (pressed >= 0 && !key_column[3 - (pressed % 4)]) key_row[pressed / 4] = 1'b0;
  end
  initial begin
    #3ms pressed = 6;
    #8ms pressed = -1;
  end

  // ---------------- LCD ----------------
  string screen_text = "";
  always @(negedge lcd_nenable) if (!reset && lcd_register_select)
    screen_text = {screen_text, string'(lcd_data_out)};

  function automatic bit has(input string s, input string sub);
    for (int i = 0; i + sub.len() <= s.len(); i++)
      if (s.substr(i, i + sub.len() - 1) == sub) return 1;
    return 0;
  endfunction

  function automatic logic [21:0] deposit(input int i, input logic [21:0] mask);
    logic [21:0] r = '0;
    int j = 0;
    for (int b = 0; b < 22; b++) if (mask[b]) begin r[b] = i[j]; j++; end
    return r;
  endfunction

  initial begin
    int nw;
    repeat (3) @(negedge clock);
    reset = 0;
    repeat (3) @(negedge clock);
    check(mp3_chipresetn, "decoder released from reset");
    wait (played.size() == NBYTES / 2);
    wait (!dut.u_ctrl.playing);        // stopped at the end of the song
    wait (dut.u_lcd.lcd_done);
    repeat (2000) @(negedge clock);
    nw = NBYTES / 2;
    for (int i = 0; i < nw; i++) begin
      logic [15:0] w;
      w = simm.peek(int'(deposit(i, 22'h33_FCFF)));
      check(played[i] == {file[2*i], file[2*i+1]}, $sformatf("played word %0d", i));
      check(w == {file[2*i], file[2*i+1]},
            $sformatf("SIMM word %0d", i));
    end
    check(played.size() == nw, "no extra words played");
    check(simm.errors == 0, "SIMM protocol");
    check(has(screen_text, "PortaAMP"), "banner shown");
    check(has(screen_text, "Downloading"), "download screen shown");
    check(has(screen_text, "Complete"), "complete screen shown");
    check(has(screen_text, ">"), "play icon shown");
    check(has(screen_text, "[]"), "stop icon shown");
    check(key_data == 4'd6, $sformatf("key 6 reported as %0d", key_data));
    $display("mechanisms: ring %0d holdoff %0d timeout %0d wr %0d rd %0d refresh %0d ref_delay %0d frame %0d nodata %0d stall %0d screens %0d keys %0d",
             n_ring, n_holdoff, n_timeout, simm.writes, simm.reads, simm.refreshes, n_ref_delay,
             frame_moved, n_nodata, n_stall, n_screens, n_key);
    check(n_ring > 0, "ringing filtered");
    check(n_holdoff > 0, "PC held off");
    check(n_timeout == 1, "PPI timeout");
    check(simm.writes == nw, "DRAM writes");
    check(simm.reads == nw, "DRAM reads");
    check(simm.refreshes > 100, "DRAM refreshes");
    check(n_ref_delay > 0, "refresh waited for an access");
    check(frame_moved, "offset wrapped into frame");
    check(n_nodata == 1, "end of song");
    check(n_stall > 0, "decoder demand stall");
    check(n_screens >= 6, "LCD screens");
    check(n_key == 1, "key report");
    $display("finished at cycle %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
