// fifo1_16to64: FIFO1 of the recorder. It matches the 16-bit, 62.5 MHz word
// stream of the serial transceiver to the 64-bit user interface of the DDR3
// memory controller, which runs on its own clock.
//
// Following the original recorder, this is a mixed-width dual-clock FIFO
// (16 bits in, 64 bits out). Here the width change is done on the write
// side: four accepted 16-bit words are gathered into one 64-bit entry, the
// first word in bits [15:0] and the fourth in bits [63:48], and the entry is
// then pushed into a 2**AW-entry async_fifo. The depth (512 x 64 bits, one
// 36 Kb block RAM) is this design's choice.
//
// Interface and timing:
//   write side (wclk): wr_en/din accept one 16-bit word per edge. wr_lane
//   tells which quarter the next word fills (0 = a new 64-bit entry).
//   overflow pulses for one cycle when a completed entry finds the buffer
//   full; that entry is dropped, so the stored stream is no longer
//   continuous.
//   read side (rclk): show-ahead; dout is valid while empty is low and
//   rd_en pops it.
module fifo1_16to64 #(
  parameter int unsigned AW = 9
) (
  input  logic        wclk,
  input  logic        wrst_n,
  input  logic        wr_en,
  input  logic [15:0] din,
  output logic [1:0]  wr_lane,
  output logic        overflow,
  input  logic        rclk,
  input  logic        rrst_n,
  input  logic        rd_en,
  output logic [63:0] dout,
  output logic        empty
);
  logic [15:0] lane_q [3];
  logic        push;
  logic        full;
  logic [63:0] entry;
  logic [AW:0] wcount_unused;
  logic [AW:0] rcount_unused;

  assign push  = wr_en && (wr_lane == 2'd3);
  assign entry = {din, lane_q[2], lane_q[1], lane_q[0]};

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wr_lane  <= '0;
      overflow <= 1'b0;
      for (int i = 0; i < 3; i++) lane_q[i] <= '0;
    end else begin
      overflow <= push && full;
      if (wr_en) begin
        wr_lane <= wr_lane + 2'd1;
        if (wr_lane != 2'd3) lane_q[wr_lane] <= din;
      end
    end
  end

  async_fifo #(.WIDTH(64), .AW(AW)) u_fifo (
    .wclk(wclk), .wrst_n(wrst_n), .wr_en(push), .wdata(entry),
    .wfull(full), .wcount(wcount_unused),
    .rclk(rclk), .rrst_n(rrst_n), .rd_en(rd_en), .rdata(dout),
    .rempty(empty), .rcount(rcount_unused)
  );
endmodule
