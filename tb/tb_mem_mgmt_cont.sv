// Self-checking test of mem_mgmt_cont over the real dram_int and a
// behavioural SIMM model. Checks: a read before any write reports no data;
// write addresses step through the usable (unmasked) address bits in order,
// with the offset wrapping into the frame (the expected address of word i
// is i deposited into the mask's one bits); masked bits never reach the
// DRAM; reads return the song in order, report no data at the end and
// start over; refresh happens about every REFRESH_CYCLES; the write and
// read throughput seen by the client; the full flag of a small memory whose
// mask has a hole inside the offset (bit 1), so the carry must skip it.
module tb_mem_mgmt_cont;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0, cyc = 0;

  always #20 clk = !clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one memory system: manager + DRAM interface + SIMM
  logic        en [2], rw [2];
  logic [15:0] wd [2], rd [2];
  logic        rdy [2], nod [2], full [2];
  logic        dq_oe [2], req [2], prw [2], pref [2], prdy [2];
  logic [21:0] paddr [2];
  logic [15:0] pwd [2], prd [2], dqo [2], dqi [2];
  logic [3:0]  rasn [2];
  logic        casn [2], wen [2];
  logic [9:0]  da [2];

  localparam logic [21:0] SMALL_MASK = 22'h00_0C05;  // 16 words, a hole at bit 1

  for (genvar k = 0; k < 2; k++) begin : g_sys
    if (k == 0) begin : g_mgmt
      mem_mgmt_cont u (.clk, .rst, .client_en(en[k]), .client_rw(rw[k]), .client_wdata(wd[k]),
        .client_rdata(rd[k]), .client_ready(rdy[k]), .client_no_data(nod[k]), .client_full(full[k]),
        .dpath_req(req[k]), .dpath_r_w(prw[k]), .dpath_refresh(pref[k]), .dpath_addr(paddr[k]),
        .dpath_wdata(pwd[k]), .dpath_ready(prdy[k]), .dpath_rdata(prd[k]));
    end else begin : g_mgmt
      mem_mgmt_cont #(.ADDR_MASK(SMALL_MASK)) u (.clk, .rst, .client_en(en[k]), .client_rw(rw[k]),
        .client_wdata(wd[k]), .client_rdata(rd[k]), .client_ready(rdy[k]), .client_no_data(nod[k]),
        .client_full(full[k]), .dpath_req(req[k]), .dpath_r_w(prw[k]), .dpath_refresh(pref[k]),
        .dpath_addr(paddr[k]), .dpath_wdata(pwd[k]), .dpath_ready(prdy[k]), .dpath_rdata(prd[k]));
    end
    dram_int ud (.clk, .rst, .req(req[k]), .r_w(prw[k]), .refresh(pref[k]), .addr(paddr[k]),
      .wdata(pwd[k]), .ready(prdy[k]), .rdata(prd[k]), .dram_rasn(rasn[k]), .dram_casn(casn[k]),
      .dram_wen(wen[k]), .dram_addr(da[k]), .dram_dq_o(dqo[k]), .dram_dq_oe(dq_oe[k]), .dram_dq_i(dqi[k]));
    edo_simm_model simm (.rasn(rasn[k]), .casn(casn[k]), .wen(wen[k]), .addr(da[k]),
      .dq_in(dqo[k]), .dq_oe(dq_oe[k]), .dq_out(dqi[k]));
  end

  initial begin
    #30ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // i-th usable address: the bits of i placed, LSB first, into the one bits of mask
  function automatic logic [21:0] deposit(input int i, input logic [21:0] mask);
    logic [21:0] r = '0;
    int j = 0;
    for (int b = 0; b < 22; b++) if (mask[b]) begin r[b] = i[j]; j++; end
    return r;
  endfunction

  task automatic cmd(input int k, input bit read, input logic [15:0] d, output int dt,
                    input bit busy_expected = 1);
    int t0;
    @(negedge clk);
    while (!rdy[k]) @(negedge clk);
    en[k] = 1; rw[k] = read; wd[k] = d; t0 = cyc;
    @(negedge clk);
    en[k] = 0;
    if (busy_expected) check(!rdy[k], "ready falls after a command");
    while (!rdy[k]) @(negedge clk);
    dt = cyc - t0;
  endtask

  // masked address bits must never be driven
  always @(posedge clk) if (!rst && req[0] && (paddr[0] & ~22'h33_FCFF) != 0) begin
    failures++; $display("FAIL masked address bit used: %h", paddr[0]);
  end

  // refresh spacing
  int last_ref = 0, ref_n = 0, ref_bad = 0;
  always @(posedge clk) if (!rst && pref[0]) begin
    if (ref_n > 0 && (cyc - last_ref < 250 - 30 || cyc - last_ref > 250 + 30)) ref_bad++;
    last_ref = cyc; ref_n++;
  end

  localparam int N = 300;
  initial begin
    logic [15:0] song[N];
    int dt, wmin = 1000, rmin = 1000;
    real wr_mbs, rd_mbs;
    en[0] = 0; en[1] = 0; rw[0] = 1; rw[1] = 1; wd[0] = 0; wd[1] = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    // 1: read before any write
    cmd(0, 1, 0, dt, 0);
    check(nod[0], "no data before a song is written");
    check(g_sys[0].simm.reads == 0, "no DRAM read without a song");
    for (int i = 0; i < N; i++) begin
      song[i] = 16'($urandom);
      cmd(0, 0, song[i], dt);
      if (dt < wmin) wmin = dt;
    end
    for (int i = 0; i < N; i++)
      check(g_sys[0].simm.peek(int'(deposit(i, 22'h33_FCFF))) == song[i],
            $sformatf("word %0d at address %h", i, deposit(i, 22'h33_FCFF)));
    // play twice: end of song gives no data and restarts at word 0
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < N; i++) begin
        cmd(0, 1, 0, dt);
        if (dt < rmin) rmin = dt;
        check(!nod[0] && rd[0] == song[i], $sformatf("pass %0d read %0d: %h vs %h", pass, i, rd[0], song[i]));
      end
      cmd(0, 1, 0, dt, 0);
      check(nod[0], "no data at end of song");
    end
    // throughput, 16-bit words at 25 MHz, refresh excluded (minimum time)
    wr_mbs = 2.0 * 25.0 / wmin;
    rd_mbs = 2.0 * 25.0 / rmin;
    $display("write %0d cycles %.2f MB/s, read %0d cycles %.2f MB/s", wmin, wr_mbs, rmin, rd_mbs);
    check(wr_mbs > 1.9 && wr_mbs < 2.35, "write throughput near 2.12 MB/s");
    check(rd_mbs > 1.62 && rd_mbs < 1.98, "read throughput near 1.8 MB/s");
    check(ref_n > 10 && ref_bad == 0, $sformatf("refresh count %0d, off-period %0d", ref_n, ref_bad));
    check(g_sys[0].simm.refreshes == ref_n, "every refresh reached the SIMM");
    check(g_sys[0].simm.errors == 0, "SIMM protocol");
    // small memory: 16 words, then full
    for (int i = 0; i < 18; i++) cmd(1, 0, 16'(100 + i), dt, i < 16);
    check(full[1], "full after 16 words");
    for (int i = 0; i < 16; i++)
      check(g_sys[1].simm.peek(int'(deposit(i, SMALL_MASK))) == 16'(100 + i), $sformatf("small word %0d", i));
    check(g_sys[1].simm.writes == 16, "writes beyond the end ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
