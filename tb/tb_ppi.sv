// Self-checking test of the parallel port interface with a model of a PC
// EPP port whose handshake and data lines ring after every edge (several
// full-swing glitches within 200 ns). Checks: words assembled from byte
// pairs, high byte first; ppi_ready low while a word is in progress and
// high after the second byte; a PC strobe is not acknowledged until a word
// is requested; no extra bytes from ringing; ppi_dldone on ppi_ninit falling;
// ppi_timeout when the PC stops in the middle of a cycle, and recovery;
// the EPP status lines (intr, xflag, davailn) read high before
// every byte, as the PC driver requires.
module tb_ppi;
  logic clk = 0, rst = 1;
  logic [7:0] ppi_data_in = '0;
  logic ppi_ndstrobe = 1, ppi_nwrite = 1, ppi_ninit = 1, ppi_nastrobe = 1;
  logic ppi_nwait, ppi_download = 0, ppi_ready, ppi_dldone, ppi_timeout;
  logic ppi_intr, ppi_ackdreq, ppi_xflag, ppi_davailn;
  logic [15:0] ppi_data;
  int checks = 0, failures = 0, cyc = 0;

  ppi #(.TIMEOUT(200)) dut (.*);

  always #20 clk = !clk;
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

  // drive a line to a new level with ringing
  task automatic ring(ref logic line, input logic level);
    line = level;
    repeat (3) begin
      #(15 + $urandom_range(0, 30));
      line = !level;
      #(5 + $urandom_range(0, 10));
      line = level;
    end
  endtask

  // PC side: one EPP data write
  // like the PC driver: wait until the status byte reads "not busy" with
  // nAck (intr), Select (xflag) and nError (davailn) high
  task automatic epp_write(input logic [7:0] b);
    while (ppi_nwait) #10;
    check(ppi_intr && ppi_xflag && ppi_davailn, "EPP status lines high");
    ppi_nwrite = 0;
    ppi_data_in = 8'($urandom);   // data lines ring too
    #60 ppi_data_in = b;
    ring(ppi_ndstrobe, 0);
    while (!ppi_nwait) #10;
    #40;
    ring(ppi_ndstrobe, 1);
    while (ppi_nwait) #10;
    ppi_nwrite = 1;
    ppi_data_in = 8'($urandom);
  endtask

  int dl_pulses = 0;
  always @(posedge clk) if (!rst && ppi_dldone) dl_pulses++;

  logic [7:0] bytes[$];
  initial begin : pc
    #500;
    for (int i = 0; i < 20; i++) begin
      logic [7:0] b;
      b = 8'($urandom);
      bytes.push_back(b);
      epp_write(b);
      #($urandom_range(0, 400));
    end
    #2000;
    ring(ppi_ninit, 0);
    #3000;
    ring(ppi_ninit, 1);
  end

  initial begin : ctrl
    int got = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    // nothing requested yet: PC must be held off
    repeat (100) @(negedge clk);
    check(!ppi_nwait && !ppi_ndstrobe, "PC strobe not acknowledged while no word requested");
    check(!ppi_ready, "ready low after reset");
    for (int w = 0; w < 10; w++) begin
      @(negedge clk); ppi_download = 1;
      @(negedge clk); ppi_download = 0;
      check(!ppi_ready, "ready low while a word is received");
      while (!ppi_ready) @(negedge clk);
      check(ppi_data == {bytes[2*w], bytes[2*w+1]},
            $sformatf("word %0d: %h vs %h%h", w, ppi_data, bytes[2*w], bytes[2*w+1]));
      check(!ppi_nwait, "no acknowledge between words");
      repeat ($urandom_range(0, 60)) @(negedge clk);
      check(ppi_ready && ppi_data == {bytes[2*w], bytes[2*w+1]}, "word held until next request");
      got++;
    end
    while (dl_pulses == 0 && cyc < 50000) @(negedge clk);
    repeat (200) @(negedge clk);
    check(dl_pulses == 1, $sformatf("one dldone pulse, got %0d", dl_pulses));
    check(bytes.size() == 20 && got == 10, "all bytes transferred");
    // timeout: PC strobes, then stops
    @(negedge clk); ppi_download = 1;
    @(negedge clk); ppi_download = 0;
    ppi_nwrite = 0; ppi_data_in = 8'h3C;
    ring(ppi_ndstrobe, 0);
    while (!ppi_nwait) @(negedge clk);
    repeat (260) @(negedge clk);
    check(ppi_timeout, "timeout flagged");
    check(!ppi_nwait, "nwait released after timeout");
    ring(ppi_ndstrobe, 1);
    ppi_nwrite = 1;
    repeat (30) @(negedge clk);
    fork
      begin epp_write(8'hA1); epp_write(8'h5E); end
    join_none
    while (!ppi_ready) @(negedge clk);
    check(ppi_data == 16'hA15E, $sformatf("recovered word %h", ppi_data));
    @(negedge clk); ppi_download = 1;
    @(negedge clk); ppi_download = 0;
    check(!ppi_timeout, "timeout cleared by the next request");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
