// Behavioural model of a 72-pin 8 MB EDO DRAM SIMM organised as four RAS
// banks of 1M x 16 (for simulation only).
//
// A falling RAS#[b] latches the row for bank b. A falling CAS# while RAS#[b]
// is low performs a normal access on bank b: with WE# low the word on dq_in
// is written to {b, row, column}; with WE# high the stored word is driven
// on dq_out until CAS# rises. CAS# falling while every RAS# is high, then a
// RAS# falling, is counted as a CAS-before-RAS refresh. Words never written
// read as 0. Protocol checks: the address pins must not change while CAS#
// is low, and a RAS# must not fall while another bank is open.
module edo_simm_model (
  input  logic [3:0]  rasn,
  input  logic        casn,
  input  logic        wen,
  input  logic [9:0]  addr,
  input  logic [15:0] dq_in,
  input  logic        dq_oe,     // controller drives dq_in
  output logic [15:0] dq_out
);
  logic [15:0] mem [int];
  logic [9:0]  row [4];
  bit          cbr = 0;
  int          refreshes = 0, writes = 0, reads = 0, errors = 0;
  logic [9:0]  col_q;

  initial dq_out = '0;

  for (genvar b = 0; b < 4; b++) begin : g_bank
    always @(negedge rasn[b]) begin
      if (cbr) begin
        if (b == 0) refreshes++;
      end else begin
        row[b] = addr;
        if ((4'(~rasn) & 4'(~(4'b1 << b))) != 4'b0) begin
          errors++; $display("SIMM: two banks open");
        end
      end
    end
  end

  always @(negedge casn) begin
    col_q = addr;
    if (&rasn) begin
      cbr = 1;
    end else begin
      for (int b = 0; b < 4; b++) if (!rasn[b]) begin
        if (!wen) begin
          if (!dq_oe) begin errors++; $display("SIMM: write without data"); end
          mem[{b[1:0], row[b], addr}] = dq_in;
          writes++;
        end else begin
          dq_out = mem.exists({b[1:0], row[b], addr}) ? mem[{b[1:0], row[b], addr}] : 16'h0;
          reads++;
        end
      end
    end
  end

  bit started = 0;
  always @(posedge casn) begin
    started = 1;
    cbr = 0;
    dq_out = '0;
  end

  always @(addr) if (started && !casn && !cbr) begin
    errors++; $display("SIMM: address changed while CAS# low");
  end

  function automatic logic [15:0] peek(input int a);
    return mem.exists(a) ? mem[a] : 16'h0;
  endfunction
endmodule
