// Self-checking test of dram_int against a behavioural SIMM model: random
// writes and read-backs over all four banks, refreshes between accesses,
// address multiplexing checked in the model's memory, strobe protocol
// checked by the model, and the cycle count of a read and a write.
module tb_dram_int;
  logic clk = 0, rst = 1;
  logic req = 0, r_w = 1, refresh = 0;
  logic [21:0] addr = '0;
  logic [15:0] wdata = '0, rdata;
  logic ready;
  logic [3:0] dram_rasn;
  logic dram_casn, dram_wen, dram_dq_oe;
  logic [9:0] dram_addr;
  logic [15:0] dram_dq_o, dram_dq_i;
  int checks = 0, failures = 0, cyc = 0;

  dram_int dut (.*);
  edo_simm_model simm (.rasn(dram_rasn), .casn(dram_casn), .wen(dram_wen), .addr(dram_addr),
                       .dq_in(dram_dq_o), .dq_oe(dram_dq_oe), .dq_out(dram_dq_i));

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

  task automatic access(input bit rd, input logic [21:0] a, input logic [15:0] d, output int dt);
    int t0;
    @(negedge clk);
    while (!ready) @(negedge clk);
    req = 1; r_w = rd; addr = a; wdata = d; t0 = cyc;
    @(negedge clk);
    req = 0; addr = 'x; wdata = 'x;
    while (!ready) @(negedge clk);
    dt = cyc - t0;
  endtask

  initial begin
    logic [21:0] a[40];
    logic [15:0] d[40];
    int dt, r0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 40; i++) begin
      a[i] = 22'($urandom);
      if (i < 4) a[i] = {2'(i), 10'h155, 10'h2AA};
      d[i] = 16'($urandom);
      for (int j = 0; j < i; j++) if (a[j] == a[i]) a[i] = a[i] ^ 22'h1;
    end
    for (int i = 0; i < 40; i++) begin
      access(0, a[i], d[i], dt);
      if (i == 0) check(dt == 21, $sformatf("write cycles %0d", dt));
      check(simm.peek(a[i]) == d[i], $sformatf("word %0d stored at bank/row/col of %h", i, a[i]));
    end
    // refresh
    r0 = simm.refreshes;
    @(negedge clk); refresh = 1; @(negedge clk); refresh = 0;
    while (!ready) @(negedge clk);
    check(simm.refreshes == r0 + 1, "CBR refresh seen by the SIMM");
    for (int i = 0; i < 40; i++) begin
      access(1, a[i], 16'h0, dt);
      if (i == 0) check(dt == 25, $sformatf("read cycles %0d", dt));
      check(rdata == d[i], $sformatf("read %0d: %h vs %h", i, rdata, d[i]));
    end
    check(simm.errors == 0, "SIMM protocol");
    check(simm.writes == 40 && simm.reads == 40, "one CAS per access");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
