// Keypad interface: scans a passive 4x4 matrix keypad.
//
// The four column lines (key_column) are driven one at a time: drive state
// k (k = 1..4) pulls column bit 4-k low and leaves the others high, so
// drive 1 puts out 0111. A pressed key connects its column to its row, so
// the row input of a pressed key reads low (the rows are pulled up on the
// board). The rows are synchronised and then sampled only once every
// SAMPLE_CYCLES clocks (1 ms at 25 MHz), long enough for contact bounce to
// end. At each sample tick: if a row of the driven column is low, the key
// number key_data = 4*row + (k-1) is output with a one-cycle key_dvalid and
// the scanner stays on that column (FOUNDKEY) until a sample finds every row
// high (key released); otherwise it moves on to the next column.
//
// Follows the design description: column drive pattern of drive 1, the
// sampling register with a 1 ms period, the foundkey state left only on
// release or reset, key numbers 0, 4, 8, 12 in the column of drive 1, a
// 4-bit key code and a data-valid strobe. This design's own choices: row
// r reads as row index r, the lowest low row wins when two are pressed,
// and the drive order 1-2-3-4.
module keytop #(
  parameter int unsigned SAMPLE_CYCLES = 25000
) (
  input  logic       clk,
  input  logic       rst,          // asynchronous, active high
  input  logic [3:0] key_row,      // from keypad, active low
  output logic [3:0] key_column,   // to keypad, one bit low at a time
  output logic [3:0] key_data,     // key number 0..15
  output logic       key_dvalid    // one-cycle strobe with a new key
);

  typedef enum logic [1:0] {DRIVE1, DRIVE2, DRIVE3, DRIVE4} drive_e;

  drive_e     drive;
  logic       found;
  logic [1:0] row_idx;
  logic [3:0] row_sync1, row_sync2;
  logic       tick;
  logic [$clog2(SAMPLE_CYCLES)-1:0] cnt;

  assign tick = (cnt == $bits(cnt)'(SAMPLE_CYCLES - 1));

  always_comb begin
    row_idx = 2'd0;
    for (int r = 3; r >= 0; r--)
      if (!row_sync2[r]) row_idx = 2'(r);
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      cnt        <= '0;
      drive      <= DRIVE1;
      found      <= 1'b0;
      key_data   <= '0;
      key_dvalid <= 1'b0;
      row_sync1  <= '1;
      row_sync2  <= '1;
    end else begin
      row_sync1  <= key_row;
      row_sync2  <= row_sync1;
      key_dvalid <= 1'b0;
      cnt        <= tick ? '0 : cnt + 1'b1;
      if (tick) begin
        if (found) begin
          if (&row_sync2) begin
            found <= 1'b0;
            drive <= DRIVE1;
          end
        end else if (!(&row_sync2)) begin
          found      <= 1'b1;
          key_data   <= {row_idx, 2'(drive)};
          key_dvalid <= 1'b1;
        end else begin
          drive <= drive_e'(2'(drive) + 2'd1);
        end
      end
    end
  end

  always_comb key_column = ~(4'b1000 >> 2'(drive));

endmodule
