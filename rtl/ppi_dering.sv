// Synchroniser and ringing filter for one asynchronous handshake line.
//
// The line is first passed through two flip-flops. The filtered output
// follows the first transition seen on the synchronised line at once, then
// ignores the line for SETTLE cycles so that the ringing after the edge
// (100-300 ns on the parallel port cable) cannot produce further edges.
// fall and rise are one-cycle strobes on the filtered output's edges.
// The filtered output resets to 1 (the idle level of the active-low lines).
module ppi_dering #(
  parameter int unsigned SETTLE = 8
) (
  input  logic clk,
  input  logic rst,
  input  logic din,
  output logic dout,
  output logic fall,
  output logic rise
);

  localparam int unsigned CW = $clog2(SETTLE + 1);

  logic [1:0]    sync;
  logic [CW-1:0] hold;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      sync <= 2'b11;
      dout <= 1'b1;
      hold <= '0;
      fall <= 1'b0;
      rise <= 1'b0;
    end else begin
      sync <= {sync[0], din};
      fall <= 1'b0;
      rise <= 1'b0;
      if (hold != '0) begin
        hold <= hold - 1'b1;
      end else if (sync[1] != dout) begin
        dout <= sync[1];
        hold <= CW'(SETTLE);
        fall <= !sync[1];
        rise <=  sync[1];
      end
    end
  end

endmodule
