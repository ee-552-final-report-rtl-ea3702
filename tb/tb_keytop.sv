// Self-checking test of the keypad scanner with a model of a passive 4x4
// matrix (rows pulled up, a pressed key connects its row to its column)
// and contact bounce on press and release. SAMPLE_CYCLES = 25, as in the
// original 500 ns simulation. Checks: drive 1 puts out 0111; every key is
// reported once with its number 4*row + column index; keys 8, 12, 4, 0 of
// the first column; no report while a key is held; a key is found within
// one scan of four sample periods; release is recognised.
module tb_keytop;
  localparam int S = 25;
  logic clk = 0, rst = 1;
  logic [3:0] key_row, key_column, key_data;
  logic key_dvalid;
  int checks = 0, failures = 0, cyc = 0;

  keytop #(.SAMPLE_CYCLES(S)) dut (.*);

  always #10 clk = !clk;   // 50 MHz, as in the original test
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

  // keypad matrix: pressed key number (-1 none), bounce noise
  int  pressed = -1;
  bit  noise = 0;
  always_comb begin
    key_row = 4'hF;
    if (pressed >= 0 && !key_column[3 - (pressed % 4)]) key_row[pressed / 4] = 1'b0;
    if (noise) key_row = key_row ^ 4'(cyc);
  end

  int reports = 0;
  logic [3:0] last_key;
  always @(posedge clk) if (!rst && key_dvalid) begin reports++; last_key = key_data; end

  task automatic press(input int k);
    int r0, t0;
    r0 = reports;
    pressed = k;
    noise = 1; repeat (7) @(negedge clk); noise = 0;
    t0 = cyc;
    while (reports == r0 && cyc - t0 < 6 * S) @(negedge clk);
    check(reports == r0 + 1 && last_key == 4'(k), $sformatf("key %0d reported as %0d", k, last_key));
    repeat (10 * S) @(negedge clk);
    check(reports == r0 + 1, "held key reported once");
    pressed = -1;
    noise = 1; repeat (5) @(negedge clk); noise = 0;
    repeat (3 * S) @(negedge clk);
    check(reports == r0 + 1, "no report on release");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(key_column == 4'b0111, "drive 1 column pattern");
    repeat (20 * S) @(negedge clk);
    check(reports == 0, "no key while none pressed");
    // the original test: keys of the first column
    press(8); press(12); press(4); press(0);
    for (int k = 0; k < 16; k++) press(k);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
