// Self-checking test of the LCD screen ROM: the pointer of mode m is at
// word m+1 (word 0 for the initialisation), every pointer leads to the
// expected command/character sequence, and every screen ends with 0x100.
// The expected screens are written out here from the screen table.
module tb_lcd_rom;
  logic clk = 0;
  logic [7:0] addr = '0;
  logic [11:0] q;
  int checks = 0, failures = 0;

  lcd_rom dut (.*);

  always #20 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected words of screen s (-1 = initialisation)
  function automatic void expect_screen(input int s, ref logic [11:0] w[$]);
    string l1, l2;
    logic [11:0] first;
    w.delete();
    if (s < 0) begin
      w = '{12'h038, 12'h00C, 12'h001, 12'h006};
      return;
    end
    first = 12'h001; l2 = "";
    case (s)
      0:  l1 = "PortaAMP";
      1:  begin l1 = "Command"; l2 = "1=DN 2=DT 3=S"; end
      2:  begin l1 = "From?";   l2 = "1=CD 2=EPP"; end
      3:  l1 = "Waiting for TX";
      4:  l1 = "Downloading";
      5:  begin first = 12'h0C0; l1 = "Complete"; end
      6:  l1 = "Song X";
      7:  begin first = 12'h080; l1 = "Song X"; end
      8:  begin first = 12'h0C0; l1 = ">"; end
      9:  begin first = 12'h0C0; l1 = "||"; end
      10: begin first = 12'h0C0; l1 = "[]"; end
      11: l1 = "Delete?";
      12: begin first = 12'h0C0; l1 = "Deleted"; end
      13: l1 = "Streaming";
      default: l1 = "";
    endcase
    w.push_back(first);
    for (int i = 0; i < l1.len(); i++) w.push_back({4'h1, l1[i]});
    if (l2.len() > 0) begin
      w.push_back(12'h0C0);
      for (int i = 0; i < l2.len(); i++) w.push_back({4'h1, l2[i]});
    end
  endfunction

  function automatic logic [11:0] rd(input logic [7:0] a);
    return dut.mem[a];
  endfunction

  initial begin
    logic [11:0] w[$];
    logic [7:0] p;
    for (int s = -1; s < 14; s++) begin
      // through the synchronous read port
      @(negedge clk) addr = 8'(s + 1);
      @(negedge clk);
      p = q[7:0];
      check(q[11:8] == 0 && p >= 8'd16, $sformatf("pointer of mode %0d = %h", s, q));
      expect_screen(s, w);
      for (int i = 0; i < w.size(); i++) begin
        @(negedge clk) addr = p + 8'(i);
        @(negedge clk);
        check(q == w[i], $sformatf("mode %0d word %0d: %h vs %h", s, i, q, w[i]));
      end
      check(rd(p + 8'(w.size())) == 12'h100, $sformatf("end marker of mode %0d", s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
