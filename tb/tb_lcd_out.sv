// Self-checking test of lcd_out with a model of the LCD bus that records
// the byte and register select at each falling edge of lcd_nenable.
// Checks the enable pulse width, the 40 us and 2 ms execution waits (with
// shortened counts), the busy/done handshake, latching of the input, and
// that lcd_rw stays 0.
module tb_lcd_out;
  localparam int E = 6, X = 40, L = 200;
  logic clk = 0, rst = 1, valid = 0, rs = 0;
  logic [7:0] data = '0;
  logic busy, done, lcd_register_select, lcd_rw, lcd_nenable;
  logic [7:0] lcd_data_out;
  int checks = 0, failures = 0, cyc = 0;

  lcd_out #(.E_CYCLES(E), .EXEC_CYCLES(X), .LONG_CYCLES(L)) dut (.*);

  always #20 clk = !clk;
  always @(posedge clk) cyc++;

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

  logic [8:0] got[$];
  int t_rise, t_fall, hi_len;
  always @(posedge lcd_nenable) t_rise = cyc;
  always @(negedge lcd_nenable) begin
    got.push_back({lcd_register_select, lcd_data_out});
    hi_len = cyc - t_rise;
    t_fall = cyc;
  end
  always @(posedge clk) if (!rst && lcd_rw) begin failures++; $display("FAIL lcd_rw"); end

  task automatic send(input bit r, input logic [7:0] d, input int exec);
    int t0, n;
    n = got.size();
    @(negedge clk);
    while (busy) @(negedge clk);
    valid = 1; rs = r; data = d;
    @(negedge clk);
    valid = 0; rs = !r; data = ~d;   // source may change at once
    check(busy, "busy after valid");
    while (!done) @(negedge clk);
    check(got.size() == n + 1 && got[n] == {r, d}, $sformatf("byte %h rs %0d", d, r));
    check(hi_len == E, $sformatf("enable width %0d", hi_len));
    check(cyc - t_fall >= exec && cyc - t_fall <= exec + 2, $sformatf("exec wait %0d for %h", cyc - t_fall, d));
    @(negedge clk);
    check(!busy && !done, "idle after done");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    send(0, 8'h38, X);
    send(0, 8'h01, L);   // clear display: long wait
    send(0, 8'h02, L);   // return home: long wait
    send(0, 8'h0C, X);
    send(1, 8'h01, X);   // a character 0x01 is not a clear
    send(1, "P", X);
    for (int i = 0; i < 10; i++) begin
      logic [7:0] d;
      bit r;
      d = 8'($urandom);
      r = 1'($urandom);
      send(r, d, (!r && d[7:2] == 0 && d[1:0] != 0) ? L : X);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
