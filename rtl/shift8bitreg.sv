// 8-bit parallel-load, shift-left register of the MP3 serial interface.
//
// load copies d into the register. shift moves the register one place left,
// shifting a 0 in at the LSB, and copies the MSB that falls out into sout,
// a register that then holds the bit until the next shift. The MP3 interface
// issues shift on each rising edge of the generated decoder clock, so sout
// changes just after a rising edge and is stable at the following falling
// edge. load has priority over shift. Reset clears both.
//
// The shift direction (MSB first) and the 0 shifted in follow the design
// description; the register output sout and the reset value are this
// design's choice.
module shift8bitreg (
  input  logic       clk,
  input  logic       rst,    // asynchronous, active high
  input  logic       load,
  input  logic       shift,
  input  logic [7:0] d,
  output logic [7:0] q,      // register contents
  output logic       sout    // last bit shifted out
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      q    <= '0;
      sout <= 1'b0;
    end else if (load) begin
      q <= d;
    end else if (shift) begin
      sout <= q[7];
      q    <= {q[6:0], 1'b0};
    end
  end

endmodule
