// IEEE 1284 mode negotiation, peripheral side, accepting EPP mode only.
//
// Works on the filtered (de-rung) PC lines of the parallel port interface.
// After reset the port is in compatibility mode and the status lines are
// at their idle levels (intr 1, ackdreq 0, xflag 1, davailn 1). The PC
// requests a negotiation by pulling nDStrobe low while nAStrobe is high,
// with the extensibility byte on the data lines; the peripheral answers
// with intr 0, ackdreq 1, xflag 1, davailn 1. The PC then pulses nWrite
// low to hand over the byte and releases nWrite and nDStrobe. The byte is
// taken SETTLE cycles later, when the data lines have stopped ringing.
// ackdreq then falls and xflag shows whether the mode is accepted: high for
// 0x40 (EPP), low for anything else. At least NEG_DELAY cycles later intr
// rises, which ends the negotiation. With 0x40 the port stays in EPP mode
// (epp_mode high) until reset; otherwise it returns to compatibility mode,
// where the PC may try again with the next extensibility byte.
//
// Follows the design description: the status levels during the request,
// xflag low for a byte other than 0x40 once nDStrobe and nWrite are high
// again, the minimum 500 ns between ackdreq falling and intr rising, the
// retry with a further byte, and EPP mode afterwards. The compatibility-
// mode idle levels, the byte being taken after the settle delay and EPP
// mode lasting until reset (nInit marks the end of a file in this design)
// are this design's choices.
module ppi_negotiate #(
  parameter int unsigned SETTLE    = 8,
  parameter int unsigned NEG_DELAY = 13    // 520 ns at 25 MHz (>= 500 ns)
) (
  input  logic       clk,
  input  logic       rst,            // asynchronous, active high
  input  logic       stb_n,          // filtered nDStrobe (nAutoFd)
  input  logic       ast_n,          // filtered nAStrobe (nSelectIn)
  input  logic       wr_n,           // filtered nWrite (nStrobe)
  input  logic [7:0] data_in,        // extensibility byte
  output logic       epp_mode,       // EPP mode agreed
  output logic       intr,           // nAck
  output logic       ackdreq,        // PError
  output logic       xflag,          // Select
  output logic       davailn         // nFault
);

  localparam logic [7:0] EXT_EPP = 8'h40;
  localparam int unsigned CW = $clog2((SETTLE > NEG_DELAY ? SETTLE : NEG_DELAY) + 1);

  typedef enum logic [2:0] {
    N_COMPAT,   // compatibility mode, waiting for a request
    N_REQ,      // request seen, waiting for nWrite to fall
    N_STROBE,   // waiting for nWrite and nDStrobe to return high
    N_SETTLE,   // waiting for the data lines to settle
    N_DELAY,    // ackdreq low, waiting before intr rises
    N_EPP       // EPP mode
  } neg_state_e;

  neg_state_e    state;
  logic [CW-1:0] cnt;
  logic          accept;

  assign epp_mode = (state == N_EPP);
  assign davailn  = 1'b1;   // no reverse-channel data, ever

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state   <= N_COMPAT;
      cnt     <= '0;
      accept  <= 1'b0;
      intr    <= 1'b1;
      ackdreq <= 1'b0;
      xflag   <= 1'b1;
    end else begin
      unique case (state)
        N_COMPAT:
          if (!stb_n && ast_n) begin
            intr    <= 1'b0;
            ackdreq <= 1'b1;
            xflag   <= 1'b1;
            state   <= N_REQ;
          end
        N_REQ:
          if (!wr_n) state <= N_STROBE;
        N_STROBE:
          if (wr_n && stb_n) begin
            cnt   <= CW'(SETTLE);
            state <= N_SETTLE;
          end
        N_SETTLE:
          if (cnt != '0) begin
            cnt <= cnt - 1'b1;
          end else begin
            accept  <= (data_in == EXT_EPP);
            xflag   <= (data_in == EXT_EPP);
            ackdreq <= 1'b0;
            cnt     <= CW'(NEG_DELAY - 1);
            state   <= N_DELAY;
          end
        N_DELAY:
          if (cnt != '0) begin
            cnt <= cnt - 1'b1;
          end else begin
            intr  <= 1'b1;
            state <= accept ? N_EPP : N_COMPAT;
          end
        N_EPP: ;
        default: state <= N_COMPAT;
      endcase
    end
  end

endmodule
