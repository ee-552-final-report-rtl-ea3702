// DRAM interface: drives a 72-pin 8 MB EDO SIMM (16 devices in four RAS
// groups) as a 4M x 16 memory with normal, one-word-per-RAS accesses.
//
// A 22-bit word address is split into a bank (addr[21:20], one of the four
// RAS# lines), a row (addr[19:10]) and a column (addr[9:0]); row and column
// share the ten address pins A0-A9 and the CAS# lines of all groups are
// tied together. Neither EDO nor fast-page mode is used.
//
// Access sequence (each step waits DELAY cycles so that address and data
// lines have settled before a strobe moves):
//   row address on A  -> RAS#[bank] low -> column address (and write data,
//   WE# low) -> CAS# low -> read data captured, all strobes high ->
//   precharge -> done.
// Refresh is CAS-before-RAS: CAS# low, then all four RAS# low, then both
// high. Every pin output is a flip-flop, so RAS#, CAS# and WE# cannot
// glitch; they change one clock after the state that decides them.
//
// Request interface: when ready is high, a one-cycle req starts an access
// (r_w = 1 read, 0 write) or a one-cycle refresh starts a refresh. ready
// falls in the next cycle and rises again when the access is over; for a
// read, rdata is valid from then on. Each step lasts DELAY+1 cycles and a
// read keeps CAS# low READ_HOLD cycles longer for the data access time:
// with the defaults a write takes 21 and a read 25 cycles from req to
// ready. Seen from the memory manager's client this is about 2.1 MB/s for
// writes and 1.8 MB/s for reads at 25 MHz, the throughput the original
// prototype measured; DELAY = 0 and READ_HOLD = 1 run about three times
// faster.
//
// The split into bank/row/column, the registered strobes, the inserted
// delays, their purpose and the CBR refresh follow the design description; the step
// order within a cycle and the DELAY value are this design's choice.
// The bidirectional data bus is split into dq_o, dq_oe and dq_i; the pad
// is expected to be a tristate buffer outside this module.
// An assertion checks that the data bus is driven whenever WE# is low. Its
// disable condition samples rst on the clock, so lint reports rst as used
// both asynchronously and synchronously; the logic uses it only as an
// asynchronous reset.
module dram_int #(
  parameter int unsigned DELAY     = 3,  // settle cycles before each strobe step
  parameter int unsigned READ_HOLD = 4   // extra CAS# low cycles on a read
) (
  input  logic        clk,
  input  logic        rst,          // asynchronous, active high
  // request side
  input  logic        req,
  input  logic        r_w,          // 1 = read, 0 = write
  input  logic        refresh,
  input  logic [21:0] addr,
  input  logic [15:0] wdata,
  output logic        ready,
  output logic [15:0] rdata,
  // SIMM pins
  output logic [3:0]  dram_rasn,
  output logic        dram_casn,
  output logic        dram_wen,
  output logic [9:0]  dram_addr,
  output logic [15:0] dram_dq_o,
  output logic        dram_dq_oe,
  input  logic [15:0] dram_dq_i
);

  typedef enum logic [3:0] {
    S_IDLE, S_ROW, S_RAS, S_COL, S_CAS, S_PRE,
    S_REF_CAS, S_REF_RAS, S_REF_END
  } state_e;

  localparam int unsigned CW = $clog2(DELAY + READ_HOLD + 1);

  state_e        state;
  logic [CW-1:0] cnt;
  logic [1:0]    bank_q;   // RAS# group of the access
  logic [9:0]    col_q;    // column, put on the pins after RAS#
  logic [15:0]   wdata_q;
  logic          rd_q;
  logic          waited;

  assign waited = (cnt == '0);
  assign ready  = (state == S_IDLE);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state      <= S_IDLE;
      cnt        <= '0;
      bank_q     <= '0;
      col_q      <= '0;
      wdata_q    <= '0;
      rd_q       <= 1'b1;
      rdata      <= '0;
      dram_rasn  <= '1;
      dram_casn  <= 1'b1;
      dram_wen   <= 1'b1;
      dram_addr  <= '0;
      dram_dq_o  <= '0;
      dram_dq_oe <= 1'b0;
    end else begin
      if (!waited) cnt <= cnt - 1'b1;
      unique case (state)
        S_IDLE:
          if (refresh) begin
            dram_casn <= 1'b0;
            cnt       <= CW'(DELAY);
            state     <= S_REF_CAS;
          end else if (req) begin
            bank_q    <= addr[21:20];
            col_q     <= addr[9:0];
            wdata_q   <= wdata;
            rd_q      <= r_w;
            dram_addr <= addr[19:10];
            cnt       <= CW'(DELAY);
            state     <= S_ROW;
          end
        S_ROW:
          if (waited) begin
            dram_rasn[bank_q] <= 1'b0;
            cnt   <= CW'(DELAY);
            state <= S_RAS;
          end
        S_RAS:
          if (waited) begin
            dram_addr <= col_q;
            if (!rd_q) begin
              dram_dq_o  <= wdata_q;
              dram_dq_oe <= 1'b1;
              dram_wen   <= 1'b0;
            end
            cnt   <= CW'(DELAY);
            state <= S_COL;
          end
        S_COL:
          if (waited) begin
            dram_casn <= 1'b0;
            cnt       <= rd_q ? CW'(DELAY + READ_HOLD) : CW'(DELAY);
            state     <= S_CAS;
          end
        S_CAS:
          if (waited) begin
            if (rd_q) rdata <= dram_dq_i;
            dram_casn  <= 1'b1;
            dram_rasn  <= '1;
            dram_wen   <= 1'b1;
            dram_dq_oe <= 1'b0;
            cnt        <= CW'(DELAY);
            state      <= S_PRE;
          end
        S_PRE:
          if (waited) state <= S_IDLE;
        S_REF_CAS:
          if (waited) begin
            dram_rasn <= '0;
            cnt       <= CW'(DELAY);
            state     <= S_REF_RAS;
          end
        S_REF_RAS:
          if (waited) begin
            dram_rasn <= '1;
            dram_casn <= 1'b1;
            cnt       <= CW'(DELAY);
            state     <= S_REF_END;
          end
        S_REF_END:
          if (waited) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // WE# is low only while the write data is driven.
  assert property (@(posedge clk) disable iff (rst) (!dram_wen |-> dram_dq_oe));

endmodule
