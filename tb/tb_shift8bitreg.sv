// Self-checking test of shift8bitreg: parallel load, eight left shifts with
// the MSB-first serial output and zero fill, load priority over shift.
module tb_shift8bitreg;
  logic clk = 0, rst = 1, load = 0, shift = 0;
  logic [7:0] d = '0, q;
  logic sout;
  int checks = 0, failures = 0;

  shift8bitreg dut (.*);

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] v;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 20; t++) begin
      v = 8'($urandom);
      if (t == 0) v = 8'h55;
      @(negedge clk); d = v; load = 1;
      @(negedge clk); load = 0;
      check(q == v, $sformatf("load %h got %h", v, q));
      for (int b = 7; b >= 0; b--) begin
        shift = 1; @(negedge clk); shift = 0;
        check(sout == v[b], $sformatf("bit %0d of %h", b, v));
        check(q == 8'(v << (8 - b)), $sformatf("zero fill after bit %0d", b));
        @(negedge clk);
        check(sout == v[b], "sout held between shifts");
      end
      check(q == 8'h00, "empty after 8 shifts");
    end
    // load wins over shift
    @(negedge clk); d = 8'hA5; load = 1; shift = 1;
    @(negedge clk); load = 0; shift = 0;
    check(q == 8'hA5, "load priority");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
