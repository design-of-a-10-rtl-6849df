// fifo2_64to8: FIFO2 of the recorder. It matches the 64-bit words read back
// from DDR3 (memory user-interface clock) to the 8-bit, 125 MHz client
// interface of the Ethernet MAC.
//
// The 64-bit entries are kept in a 2**AW-entry async_fifo; the width change
// is done on the read side, which hands out the eight bytes of the oldest
// entry in order, bits [7:0] first, and pops the entry after its last byte.
// The depth (512 x 64 bits, one 36 Kb block RAM) is this design's choice.
//
// Interface and timing:
//   write side (wclk): wr_en/din push one 64-bit entry per edge while full
//   is low. wcount is the number of entries the writer sees stored; it is
//   never below the true number, so a writer that keeps wcount plus its
//   words in flight at or below 2**AW can never overrun the buffer.
//   read side (rclk): show-ahead; dout holds the next byte while empty is
//   low and rd_en consumes it. rd_bytes is the number of bytes the reader
//   can take without a gap, as far as it can see.
module fifo2_64to8 #(
  parameter int unsigned AW = 9
) (
  input  logic          wclk,
  input  logic          wrst_n,
  input  logic          wr_en,
  input  logic [63:0]   din,
  output logic          full,
  output logic [AW:0]   wcount,
  input  logic          rclk,
  input  logic          rrst_n,
  input  logic          rd_en,
  output logic [7:0]    dout,
  output logic          empty,
  output logic [AW+3:0] rd_bytes
);
  logic [63:0] entry;
  logic        entry_empty;
  logic [AW:0] rcount;
  logic [2:0]  rd_lane;
  logic        take;

  assign take = rd_en && !entry_empty;

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n)   rd_lane <= '0;
    else if (take) rd_lane <= rd_lane + 3'd1;
  end

  async_fifo #(.WIDTH(64), .AW(AW)) u_fifo (
    .wclk(wclk), .wrst_n(wrst_n), .wr_en(wr_en), .wdata(din),
    .wfull(full), .wcount(wcount),
    .rclk(rclk), .rrst_n(rrst_n), .rd_en(take && (rd_lane == 3'd7)),
    .rdata(entry), .rempty(entry_empty), .rcount(rcount)
  );

  assign dout     = entry[8*rd_lane +: 8];
  assign empty    = entry_empty;
  assign rd_bytes = {rcount, 3'b000} - (AW + 4)'(rd_lane);
endmodule
