// Self-checking test of the parallel port interface with IEEE 1284 mode
// negotiation enabled (NEGOTIATE = 1), against a PC model with ringing
// lines. Follows the negotiation test cases of the interface:
//  1. on a request (nDStrobe low, nAStrobe high) xflag, intr, davailn and
//     ackdreq read 1, 0, 1, 1;
//  2. after nDStrobe and nWrite return high, xflag goes low for an
//     extensibility byte other than 0x40;
//  3. at least 500 ns pass between ackdreq falling and intr rising;
//  4. the PC can negotiate again with the next byte;
//  5. xflag stays high for 0x40;
//  6. EPP write cycles are then answered and words assembled.
// Also checked: before EPP mode is agreed no EPP strobe is acknowledged,
// and the negotiation itself does not produce a word.
module tb_ppi_negotiate;
  logic clk = 0, rst = 1;
  logic [7:0] ppi_data_in = 8'h00;
  logic ppi_ndstrobe = 1, ppi_nwrite = 1, ppi_ninit = 1, ppi_nastrobe = 1;
  logic ppi_nwait, ppi_download = 0, ppi_ready, ppi_dldone, ppi_timeout;
  logic ppi_intr, ppi_ackdreq, ppi_xflag, ppi_davailn;
  logic [15:0] ppi_data;
  int checks = 0, failures = 0, cyc = 0;

  localparam int NEG_DELAY = 13;   // 520 ns

  ppi #(.TIMEOUT(200), .NEGOTIATE(1'b1), .NEG_DELAY(NEG_DELAY)) dut (.*);

  always #20 clk = !clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ring(ref logic line, input logic level);
    line = level;
    repeat (3) begin
      #(15 + $urandom_range(0, 30));
      line = !level;
      #(5 + $urandom_range(0, 10));
      line = level;
    end
  endtask

  // time from ackdreq falling to intr rising, in ns
  realtime t_ack_fall;
  real     gap_ns = 0.0;
  always @(negedge ppi_ackdreq) if (!rst) t_ack_fall = $realtime;
  always @(posedge ppi_intr)    if (!rst) gap_ns = $realtime - t_ack_fall;

  // one negotiation with extensibility byte ext; returns xflag after it
  task automatic negotiate(input logic [7:0] ext, output logic xf);
    ppi_data_in = ext;
    ppi_nastrobe = 1;
    ring(ppi_ndstrobe, 0);                 // request
    #1us;
    check({ppi_xflag, ppi_intr, ppi_davailn, ppi_ackdreq} == 4'b1011,
          $sformatf("request levels 1,0,1,1 (got %b)",
                    {ppi_xflag, ppi_intr, ppi_davailn, ppi_ackdreq}));
    ring(ppi_nwrite, 0);                   // hand over the byte
    #500;
    ring(ppi_nwrite, 1);
    ring(ppi_ndstrobe, 1);
    check(ppi_xflag, "xflag still high while the strobes return");
    wait (ppi_intr);
    xf = ppi_xflag;
    check(gap_ns >= 500.0, $sformatf("ackdreq low to intr high %0.0f ns", gap_ns));
    check(!ppi_ackdreq, "ackdreq low after the negotiation");
    #1us;
  endtask

  task automatic epp_write(input logic [7:0] b);
    while (ppi_nwait) #10;
    ppi_nwrite = 0;
    ppi_data_in = b;
    ring(ppi_ndstrobe, 0);
    while (!ppi_nwait) #10;
    #40;
    ring(ppi_ndstrobe, 1);
    while (ppi_nwait) #10;
    ppi_nwrite = 1;
  endtask

  initial begin
    logic xf;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (5) @(negedge clk);
    check(ppi_intr && !ppi_ackdreq && ppi_xflag && ppi_davailn, "compatibility-mode idle levels");

    // a word is requested before EPP mode: an EPP strobe is not answered
    @(negedge clk) ppi_download = 1; @(negedge clk) ppi_download = 0;
    ppi_nwrite = 0; ppi_data_in = 8'h11;
    ring(ppi_ndstrobe, 0);
    #2us;
    check(!ppi_nwait, "no acknowledge before EPP mode");
    ring(ppi_ndstrobe, 1);
    ppi_nwrite = 1;
    #1us;

    negotiate(8'h00, xf);              // not EPP
    check(!xf, "xflag low for extensibility byte 0x00");
    negotiate(8'h40, xf);              // EPP
    check(xf, "xflag high for extensibility byte 0x40");
    check(!ppi_ready, "negotiation produced no word");

    epp_write(8'hA5);
    epp_write(8'h3C);
    repeat (3) @(negedge clk);
    check(ppi_ready && ppi_data == 16'hA53C, $sformatf("EPP word after negotiation %h", ppi_data));
    check(ppi_intr && ppi_xflag && ppi_davailn, "EPP status lines high");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
