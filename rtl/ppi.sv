// Parallel Port Interface (PPI): receives a song from a PC over an IEEE 1284
// Enhanced Parallel Port (EPP) in its data-write cycle.
//
// EPP write cycle as seen by this peripheral: the PC pulls ppi_nwrite low,
// puts a byte on ppi_data_in and pulls ppi_ndstrobe low, but only while
// ppi_nwait is low. The PPI answers by raising ppi_nwait. The PC then
// raises ppi_ndstrobe; the byte is latched and the PPI drops ppi_nwait,
// which lets the PC start the next cycle.
//
// The PC lines ring for 100-300 ns after each edge, so every handshake line
// is synchronised and filtered (ppi_dering): an edge is taken at once and
// the line is then ignored for SETTLE cycles. The data byte is latched only
// after the SETTLE delay that follows the rising edge of ppi_ndstrobe, when
// the data lines have settled too.
//
// Interface to the controller: the controller pulses ppi_download (one
// cycle) to ask for a word; ppi_ready falls. The first byte received goes to
// ppi_data[15:8], the second to ppi_data[7:0]; ppi_ready then rises and the
// word stays on ppi_data until the next ppi_download. A strobe that the PC
// starts while no word is requested is simply not acknowledged (ppi_nwait
// stays low) until the controller asks for the next word, which holds the
// PC off. The end of a file
// is signalled by the PC pulling ppi_ninit low: ppi_dldone pulses on the
// filtered falling edge. ppi_timeout is set when the PC, once
// acknowledged, does not finish its strobe within TIMEOUT cycles: ppi_nwait
// is then dropped, the byte is discarded and, once the strobe has ended,
// the word is received again from its first byte. ppi_timeout is cleared
// by the next ppi_download.
//
// Mode negotiation: with NEGOTIATE = 1 the IEEE 1284 negotiation of
// ppi_negotiate runs first, and EPP write cycles are answered only once the
// PC has asked for EPP mode (extensibility byte 0x40). With NEGOTIATE = 0,
// the default, the port is in EPP mode from reset, as in a system whose PC
// driver sets EPP mode itself; the negotiation status lines then stay at
// their post-negotiation levels (ppi_intr, ppi_xflag and ppi_davailn high,
// ppi_ackdreq low), which is what such a driver checks before every byte.
//
// Follows the design description: the synchronise-sample-delay filtering,
// the two byte registers, the ppi_ready/ppi_download handshake, the EPP
// acknowledge and the negotiation steps. This design's own choices: the
// byte order, delaying the acknowledge between requested words, ppi_ninit
// as end of file, the timeout rule and the SETTLE/TIMEOUT values. Of the
// filtered lines only the edges that the protocol needs are used (the level
// of nInit and some edge strobes stay unread, which lint lists as unused).
module ppi #(
  parameter int unsigned SETTLE    = 8,      // 320 ns at 25 MHz
  parameter int unsigned TIMEOUT   = 25000,  // 1 ms at 25 MHz
  parameter bit          NEGOTIATE = 1'b0,   // run IEEE 1284 negotiation
  parameter int unsigned NEG_DELAY = 13      // >= 500 ns ackdreq -> intr
) (
  input  logic        clk,
  input  logic        rst,            // asynchronous, active high
  // parallel port (PC side)
  input  logic [7:0]  ppi_data_in,
  input  logic        ppi_ndstrobe,
  input  logic        ppi_nwrite,
  input  logic        ppi_ninit,
  input  logic        ppi_nastrobe,   // negotiation only
  output logic        ppi_nwait,
  output logic        ppi_intr,       // negotiation status lines (nAck,
  output logic        ppi_ackdreq,    //   PError, Select, nFault on the
  output logic        ppi_xflag,      //   connector)
  output logic        ppi_davailn,
  // controller side
  input  logic        ppi_download,
  output logic        ppi_ready,
  output logic [15:0] ppi_data,
  output logic        ppi_dldone,
  output logic        ppi_timeout
);

  typedef enum logic [2:0] {
    S_IDLE,      // no word requested
    S_WAIT_STB,  // nwait low, waiting for the PC's data strobe
    S_ACK,       // nwait high, waiting for the strobe to end
    S_SETTLE,    // strobe ended, waiting for the data lines to settle
    S_LATCH,     // latch the byte
    S_ABORT      // timed out: wait for the strobe to end, restart the word
  } state_e;

  state_e state;
  logic   stb_n, stb_fall_unused, stb_rise;
  logic   wr_n, wr_fall_unused, wr_rise_unused;
  logic   init_n, init_rise_unused;
  logic   second;  // next byte is the low byte
  logic [$clog2(TIMEOUT+1)-1:0] tcnt;

  logic epp_mode;

  ppi_dering #(.SETTLE(SETTLE)) u_stb (
    .clk, .rst, .din(ppi_ndstrobe), .dout(stb_n), .fall(stb_fall_unused), .rise(stb_rise));

  if (NEGOTIATE) begin : g_neg
    logic ast_n, ast_fall_unused, ast_rise_unused;
    ppi_dering #(.SETTLE(SETTLE)) u_ast (
      .clk, .rst, .din(ppi_nastrobe), .dout(ast_n), .fall(ast_fall_unused), .rise(ast_rise_unused));
    ppi_negotiate #(.SETTLE(SETTLE), .NEG_DELAY(NEG_DELAY)) u_neg (
      .clk, .rst, .stb_n, .ast_n, .wr_n, .data_in(ppi_data_in), .epp_mode,
      .intr(ppi_intr), .ackdreq(ppi_ackdreq), .xflag(ppi_xflag), .davailn(ppi_davailn));
  end else begin : g_fixed
    // EPP mode from reset: status lines as after an accepted negotiation
    assign epp_mode    = 1'b1;
    assign ppi_intr    = 1'b1;
    assign ppi_ackdreq = 1'b0;
    assign ppi_xflag   = 1'b1;
    assign ppi_davailn = 1'b1;
  end

  ppi_dering #(.SETTLE(SETTLE)) u_wr (
    .clk, .rst, .din(ppi_nwrite), .dout(wr_n), .fall(wr_fall_unused), .rise(wr_rise_unused));
  ppi_dering #(.SETTLE(SETTLE)) u_init (
    .clk, .rst, .din(ppi_ninit), .dout(init_n), .fall(ppi_dldone), .rise(init_rise_unused));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state       <= S_IDLE;
      ppi_nwait   <= 1'b0;
      ppi_ready   <= 1'b0;
      ppi_data    <= '0;
      ppi_timeout <= 1'b0;
      second      <= 1'b0;
      tcnt        <= '0;
    end else begin
      unique case (state)
        S_IDLE:
          if (ppi_download) begin
            ppi_ready   <= 1'b0;
            ppi_timeout <= 1'b0;
            second      <= 1'b0;
            ppi_nwait   <= 1'b0;
            state       <= S_WAIT_STB;
          end
        S_WAIT_STB:
          if (epp_mode && !stb_n && !wr_n) begin
            ppi_nwait <= 1'b1;
            tcnt      <= '0;
            state     <= S_ACK;
          end
        S_ACK:
          if (stb_rise) begin
            state <= S_SETTLE;
          end else if (tcnt == $bits(tcnt)'(TIMEOUT)) begin
            ppi_timeout <= 1'b1;
            ppi_nwait   <= 1'b0;
            state       <= S_ABORT;
          end else begin
            tcnt <= tcnt + 1'b1;
          end
        S_SETTLE:
          // the strobe filter is blind for SETTLE cycles after the edge;
          // the byte is taken once it looks at the line again
          if (tcnt == '0) state <= S_LATCH;
          else            tcnt  <= tcnt - 1'b1;
        S_LATCH: begin
          if (second) begin
            ppi_data[7:0] <= ppi_data_in;
            ppi_ready     <= 1'b1;
            ppi_nwait     <= 1'b0;
            state         <= S_IDLE;
          end else begin
            ppi_data[15:8] <= ppi_data_in;
            second         <= 1'b1;
            ppi_nwait      <= 1'b0;
            state          <= S_WAIT_STB;
          end
        end
        S_ABORT:
          if (stb_n) begin
            second <= 1'b0;
            state  <= S_WAIT_STB;
          end
        default: state <= S_IDLE;
      endcase
      if (state == S_ACK && stb_rise) tcnt <= $bits(tcnt)'(SETTLE);
    end
  end

endmodule
