// Gated clock divider that generates the ~1 MHz MP3 decoder clock.
//
// While en is high a counter runs from 0 to HALF_DIV-1 and clk_out toggles
// each time it wraps, so clk_out is a 50 % duty clock with a period of
// 2*HALF_DIV system clocks (any integer divisor, not only powers of two).
// While en is low the counter and clk_out are held at 0, so the first
// rising edge comes HALF_DIV cycles after en rises.
//
// rise_tick and fall_tick are combinational strobes, high in the system
// cycle at whose end clk_out goes 1 or 0. Logic clocked by the system
// clock uses them to act on the divided clock's edges without a second
// clock domain.
//
// The divide-by-half-period scheme and the numbers (5 at 10 MHz for 1 MHz)
// follow the design description. The original built the counter as a
// carry-save counter whose structure is not given; this is a plain
// binary counter. HALF_DIV = 13 at 25 MHz gives 961.5 kHz, just under
// 1 MHz, and is this design's choice.
module clock_divide #(
  parameter int unsigned HALF_DIV = 13   // system cycles per half period
) (
  input  logic clk,
  input  logic rst,        // asynchronous, active high
  input  logic en,
  output logic clk_out,
  output logic rise_tick,
  output logic fall_tick
);

  localparam int unsigned CW = (HALF_DIV > 1) ? $clog2(HALF_DIV) : 1;

  logic [CW-1:0] cnt;
  logic          wrap;

  assign wrap      = en && (cnt == CW'(HALF_DIV - 1));
  assign rise_tick = wrap && !clk_out;
  assign fall_tick = wrap &&  clk_out;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      cnt     <= '0;
      clk_out <= 1'b0;
    end else if (!en) begin
      cnt     <= '0;
      clk_out <= 1'b0;
    end else if (wrap) begin
      cnt     <= '0;
      clk_out <= !clk_out;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

endmodule
