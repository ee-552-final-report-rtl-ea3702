// Self-checking test of clock_divide: 50 % duty, period 2*HALF_DIV system
// cycles, clock held low when disabled, tick strobes at the edges. Runs the
// 10 MHz -> 1 MHz case (HALF_DIV = 5) and the 25 MHz default (13).
module tb_clock_divide;
  logic clk = 0, rst = 1, en = 0;
  logic co5, r5, f5, co13, r13, f13;
  int checks = 0, failures = 0;
  int cyc = 0;

  clock_divide #(.HALF_DIV(5)) dut5  (.clk, .rst, .en, .clk_out(co5),  .rise_tick(r5),  .fall_tick(f5));
  clock_divide                 dut13 (.clk, .rst, .en, .clk_out(co13), .rise_tick(r13), .fall_tick(f13));

  always #5 clk = !clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // measure edges of one divided clock
  task automatic measure(input int half, input int which);
    int last_rise, last_fall, n;
    bit co_prev, co;
    int start;
    start = cyc;
    last_rise = -1; last_fall = -1; n = 0;
    co_prev = 0;
    while (n < 10) begin
      @(negedge clk);
      co = (which == 5) ? co5 : co13;
      if (co && !co_prev) begin
        if (last_rise < 0) check(cyc - start == half, $sformatf("first rise after %0d", cyc - start));
        else check(cyc - last_rise == 2*half, $sformatf("period %0d", cyc - last_rise));
        last_rise = cyc; n++;
      end
      if (!co && co_prev) begin
        check(cyc - last_rise == half, $sformatf("high time %0d", cyc - last_rise));
        last_fall = cyc;
      end
      co_prev = co;
    end
  endtask

  // ticks must announce the edges one cycle ahead
  bit pr5 = 0, pf5 = 0, pco5 = 0;
  always @(posedge clk) if (!rst) begin
    if (pr5) begin checks++; if (!(co5 && !pco5)) failures++; end
    if (pf5) begin checks++; if (!(!co5 && pco5)) failures++; end
    pr5 <= r5; pf5 <= f5; pco5 <= co5;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (20) @(negedge clk);
    check(!co5 && !co13, "held low while disabled");
    en = 1;
    fork
      measure(5, 5);
      measure(13, 13);
    join
    @(negedge clk) en = 0;
    @(negedge clk);
    check(!co5 && !co13, "low again after disable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
