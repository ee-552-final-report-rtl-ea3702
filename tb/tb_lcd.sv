// Self-checking test of the LCD interface (with its ROM and byte writer)
// against a model of the LCD bus that records the byte and register select
// at each falling edge of lcd_nenable. Timers are shortened. Checks: nothing
// is written during the start-up wait; the initialisation sequence comes
// first and lcd_done rises after it; each rising edge of lcd_mode_chg
// lowers lcd_done and writes exactly the requested screen; the same mode
// twice in a row is written twice; a request made while a screen is being
// written is served afterwards; the clear command is followed by the long
// wait. The expected screens are written out here from the screen table.
module tb_lcd;
  import porta_pkg::*;
  localparam int INIT = 300, E = 3, X = 20, L = 120;
  logic clk = 0, rst = 1;
  logic [LCD_MODE_W-1:0] lcd_mode = '0;
  logic lcd_mode_chg = 0, lcd_done, lcd_register_select, lcd_rw, lcd_nenable;
  logic [7:0] lcd_data_out;
  int checks = 0, failures = 0, cyc = 0;

  lcd #(.INIT_CYCLES(INIT), .E_CYCLES(E), .EXEC_CYCLES(X), .LONG_CYCLES(L)) dut (.*);

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

  logic [11:0] got[$];
  int first_write = -1, t_last = 0, bad_gap = 0;
  logic [11:0] prev = '0;
  always @(negedge lcd_nenable) if (!rst) begin
    if (first_write < 0) first_write = cyc;
    if (got.size() > 0 && prev == 12'h001 && cyc - t_last < L) bad_gap++;
    prev = {3'b000, lcd_register_select, lcd_data_out};
    got.push_back(prev);
    t_last = cyc;
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


  task automatic expect_written(input int s, input int n0, input string what);
    logic [11:0] w[$];
    expect_screen(s, w);
    check(got.size() == n0 + w.size(), $sformatf("%s: %0d words, expected %0d", what, got.size() - n0, w.size()));
    for (int i = 0; i < w.size() && n0 + i < got.size(); i++)
      check(got[n0 + i] == w[i], $sformatf("%s word %0d: %h vs %h", what, i, got[n0 + i], w[i]));
  endtask

  task automatic request(input int m);
    @(negedge clk); lcd_mode = LCD_MODE_W'(m); lcd_mode_chg = 1;
    @(negedge clk); lcd_mode_chg = 0;
  endtask

  task automatic show(input int m);
    int n0 = got.size();
    request(m);
    @(negedge clk);
    check(!lcd_done, "lcd_done falls on a request");
    while (!lcd_done) @(negedge clk);
    expect_written(m, n0, $sformatf("mode %0d", m));
  endtask

  initial begin
    int n0;
    repeat (3) @(negedge clk);
    rst = 0;
    while (!lcd_done) @(negedge clk);
    check(first_write >= INIT, $sformatf("first write at %0d after the start-up wait", first_write));
    expect_written(-1, 0, "init");
    for (int m = 0; m < 14; m++) show(m);
    show(8); show(8);   // same mode twice
    // second request while the first is being written
    n0 = got.size();
    request(4);
    repeat (5) @(negedge clk);
    request(13);
    @(negedge clk); lcd_mode = 5'd1;   // mode changes after the second edge are not used
    while (!lcd_done) @(negedge clk);
    @(negedge clk); lcd_mode = 5'd13;
    @(negedge clk);
    while (!lcd_done) @(negedge clk);
    begin
      logic [11:0] a[$], b[$];
      expect_screen(4, a); expect_screen(13, b);
      check(got.size() == n0 + a.size() + b.size(), "both queued screens written");
    end
    check(bad_gap == 0, "long wait after clear");
    check(!lcd_rw, "write only");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
