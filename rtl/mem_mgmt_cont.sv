// Memory management interface: stores one song as a sequence of 16-bit
// words in the DRAM and plays it back, hiding all addressing from its
// client.
//
// Framed addressing. The 22-bit word address is kept as a 12-bit frame and
// a 10-bit offset (OFFSET_W/FRAME_W of porta_pkg). Only the offset is
// incremented on each access; the frame is incremented when the offset
// wraps. Two short counters replace one 22-bit counter and keep the carry
// chain short. There is one write address (end of the song) and one read
// address (play position).
//
// Address mask. ADDR_MASK marks the address bits that may be used. Masked
// bits are always 0 on the way to the DRAM and are skipped by the
// counters: an increment is ((x | ~mask) + 1) & mask, and a field wraps
// when (x | ~mask) is all ones. The default clears bits 8, 9, 18 and 19
// (DRAM pins A8 and A9 in both the column and the row), the configuration
// of the working prototype whose SIMM had two faulty address lines; it
// leaves 2^18 words = 512 KB. An all-ones mask gives the full 8 MB.
//
// Client protocol: client_ready high means a command may be issued. A
// one-cycle client_en issues a write (client_rw = 0, word on client_wdata)
// or a read (client_rw = 1). client_ready falls in the next cycle and rises
// when the command is done; after a read client_rdata holds the word.
// A read when no song is stored, or when the play position has reached the
// end of the song, does not touch the DRAM: it sets client_no_data and
// returns the play position to the start of the song. Any read that
// returns data clears client_no_data. Writes beyond the last usable address
// are ignored (client_full is set).
//
// Refresh: every REFRESH_CYCLES (10 us at 25 MHz) a CAS-before-RAS refresh
// is requested from dram_int. While one is due, client_ready is low so
// that the refresh goes first; a command that still arrives in that cycle
// (from a client that decided one cycle earlier) is served first and the
// refresh follows it, which delays it by at most one access.
//
// Follows the design description: single sequential song, reads ignored
// until a song is written, framing, grounded address lines, read position
// returning to zero at the end, ~10 us CBR refresh. This design's own
// choices: the masked-increment formula, the full flag, the one-cycle
// command strobe and the ordering of refresh and commands.
module mem_mgmt_cont
  import porta_pkg::*;
#(
  parameter logic [DRAM_AW-1:0] ADDR_MASK      = 22'h33_FCFF,  // bits 8,9,18,19 unused
  parameter int unsigned        REFRESH_CYCLES = 250
) (
  input  logic        clk,
  input  logic        rst,            // asynchronous, active high
  // client (controller) side
  input  logic        client_en,
  input  logic        client_rw,      // 1 = read, 0 = write
  input  logic [15:0] client_wdata,
  output logic [15:0] client_rdata,
  output logic        client_ready,
  output logic        client_no_data,
  output logic        client_full,
  // dram_int side
  output logic        dpath_req,
  output logic        dpath_r_w,
  output logic        dpath_refresh,
  output logic [21:0] dpath_addr,
  output logic [15:0] dpath_wdata,
  input  logic        dpath_ready,
  input  logic [15:0] dpath_rdata
);

  localparam logic [OFFSET_W-1:0] OFF_MASK = ADDR_MASK[OFFSET_W-1:0];
  localparam logic [FRAME_W-1:0]  FRM_MASK = ADDR_MASK[DRAM_AW-1:OFFSET_W];

  typedef struct packed {
    logic [FRAME_W-1:0]  frame;
    logic [OFFSET_W-1:0] offset;
  } faddr_t;

  typedef enum logic [1:0] {S_IDLE, S_WRITE, S_READ, S_REFRESH} state_e;

  state_e   state;
  faddr_t   wr_addr, rd_addr;
  logic     has_song;
  logic     ref_due;
  logic [$clog2(REFRESH_CYCLES+1)-1:0] ref_cnt;

  function automatic faddr_t next_addr(faddr_t a);
    faddr_t n;
    n.offset = ((a.offset | ~OFF_MASK) + 1'b1) & OFF_MASK;
    n.frame  = a.frame;
    if (&(a.offset | ~OFF_MASK))
      n.frame = ((a.frame | ~FRM_MASK) + 1'b1) & FRM_MASK;
    return n;
  endfunction

  function automatic logic is_last(faddr_t a);
    return (&(a.offset | ~OFF_MASK)) && (&(a.frame | ~FRM_MASK));
  endfunction

  assign client_ready = (state == S_IDLE) && !ref_due;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state          <= S_IDLE;
      wr_addr        <= '0;
      rd_addr        <= '0;
      has_song       <= 1'b0;
      client_full    <= 1'b0;
      client_no_data <= 1'b0;
      client_rdata   <= '0;
      ref_due        <= 1'b0;
      ref_cnt        <= '0;
      dpath_req      <= 1'b0;
      dpath_r_w      <= 1'b1;
      dpath_refresh  <= 1'b0;
      dpath_addr     <= '0;
      dpath_wdata    <= '0;
    end else begin
      dpath_req     <= 1'b0;
      dpath_refresh <= 1'b0;

      if (ref_cnt == $bits(ref_cnt)'(REFRESH_CYCLES - 1)) begin
        ref_cnt <= '0;
        ref_due <= 1'b1;
      end else begin
        ref_cnt <= ref_cnt + 1'b1;
      end

      unique case (state)
        S_IDLE:
          if (client_en && !client_rw) begin
            if (!client_full) begin
              dpath_req   <= 1'b1;
              dpath_r_w   <= 1'b0;
              dpath_addr  <= wr_addr & ADDR_MASK;
              dpath_wdata <= client_wdata;
              state       <= S_WRITE;
            end
          end else if (client_en && client_rw) begin
            if (!has_song || rd_addr == wr_addr) begin
              client_no_data <= 1'b1;
              rd_addr        <= '0;
            end else begin
              dpath_req  <= 1'b1;
              dpath_r_w  <= 1'b1;
              dpath_addr <= rd_addr & ADDR_MASK;
              state      <= S_READ;
            end
          end else if (ref_due && dpath_ready) begin
            dpath_refresh <= 1'b1;
            ref_due       <= 1'b0;
            state         <= S_REFRESH;
          end
        S_WRITE:
          // dpath_req is being registered this cycle; dram_int is busy
          // from the next one, so wait for its ready to return after that
          if (!dpath_req && dpath_ready) begin
            has_song <= 1'b1;
            if (is_last(wr_addr)) client_full <= 1'b1;
            else                  wr_addr     <= next_addr(wr_addr);
            state <= S_IDLE;
          end
        S_READ:
          if (!dpath_req && dpath_ready) begin
            client_rdata   <= dpath_rdata;
            client_no_data <= 1'b0;
            rd_addr        <= next_addr(rd_addr);
            state          <= S_IDLE;
          end
        S_REFRESH:
          if (!dpath_refresh && dpath_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
