// Self-checking test of mp3_decode. A model of the decoder chip's serial
// input samples mp3_dataout at every falling edge of mp3_chipclk and
// rebuilds the words, which are compared with the words sent. Also checked:
// chip reset held during reset and never afterwards, no transfer while the
// chip does not ask for data, mp3_ready handshake, clock period and duty,
// the clock stopped between words, and the cycles per word.
module tb_mp3_decode;
  localparam int HALF = 13;
  logic clk = 0, rst = 1;
  logic mp3_enable = 0, mp3_demand = 0;
  logic [15:0] mp3_datain = '0;
  logic mp3_ready, mp3_chipclk, mp3_chipresetn, mp3_dataout;
  int checks = 0, failures = 0;
  int cyc = 0;

  mp3_decode dut (.*);

  always #20 clk = !clk;   // 25 MHz
  always @(posedge clk) cyc++;

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

  // decoder serial input model
  logic [15:0] rx_sr;
  int          rx_bits = 0;
  logic [15:0] rx_q[$];
  always @(negedge mp3_chipclk) if (!rst) begin
    rx_sr = {rx_sr[14:0], mp3_dataout};
    rx_bits++;
    if (rx_bits == 16) begin rx_q.push_back(rx_sr); rx_bits = 0; end
  end

  // clock shape: every high and low phase inside a byte lasts HALF cycles
  int t_edge = 0; bit last_ck = 0; int bad_phase = 0, phases = 0;
  always @(posedge clk) if (!rst) begin
    if (mp3_chipclk != last_ck) begin
      if (mp3_chipclk == 0) begin
        phases++;
        if (cyc - t_edge != HALF) bad_phase++;
      end
      t_edge = cyc;
    end
    last_ck = mp3_chipclk;
  end

  always @(posedge clk) if (!rst && !mp3_chipresetn && cyc > 10) begin
    failures++; $display("FAIL chip reset asserted during operation");
  end

  initial begin
    logic [15:0] words[6];
    int t0, dt;
    words[0] = 16'h55AA; words[1] = 16'h0F3C;
    for (int i = 2; i < 6; i++) words[i] = 16'($urandom);
    repeat (3) @(posedge clk);
    check(!mp3_chipresetn, "chip held in reset");
    @(negedge clk) rst = 0;
    repeat (3) @(negedge clk);
    check(mp3_chipresetn, "chip reset released");
    check(mp3_ready, "ready after reset");
    // enable without demand: must wait
    mp3_datain = words[0];
    mp3_enable = 1;
    repeat (50) @(negedge clk);
    check(mp3_ready && !mp3_chipclk, "waits for decoder demand");
    mp3_demand = 1;
    for (int w = 0; w < 6; w++) begin
      mp3_datain = words[w];
      mp3_enable = 1;
      t0 = cyc;
      @(negedge clk);
      while (mp3_ready) @(negedge clk);
      mp3_enable = 0;
      mp3_datain = 16'hDEAD;  // word must already be latched
      while (!mp3_ready) begin
        @(negedge clk);
      end
      dt = cyc - t0;
      check(dt >= 32*HALF && dt <= 32*HALF + 10, $sformatf("cycles per word %0d", dt));
      check(!mp3_chipclk, "clock stopped between words");
      repeat (5) @(negedge clk);
    end
    check(rx_q.size() == 6, $sformatf("received %0d words", rx_q.size()));
    foreach (rx_q[i]) check(rx_q[i] == words[i], $sformatf("word %0d: %h vs %h", i, rx_q[i], words[i]));
    check(phases == 6*16 && bad_phase == 0, $sformatf("clock high phases %0d bad %0d", phases, bad_phase));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
