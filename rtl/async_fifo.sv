// async_fifo: dual-clock first-in first-out buffer of 2**AW entries of WIDTH
// bits, used by both rate-matching FIFOs of the recorder.
//
// Each side keeps a binary pointer one bit wider than the address and a Gray
// copy of it; the Gray copy crosses to the other side through a two-flop
// synchroniser. Full and empty are therefore exact on the side that changes
// them and conservative (late by the synchroniser delay) on the other side.
// Each side also reports the number of entries it sees in the buffer.
//
// Timing: show-ahead read. rdata holds the oldest entry while rempty is low;
// rd_en pops it at the rising edge of rclk. A word written at a wclk edge
// becomes visible to the reader after two to three rclk edges. Writing while
// full and reading while empty are ignored (and flagged by assertions).
module async_fifo #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned AW    = 8
) (
  // write side
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wdata,
  output logic             wfull,
  output logic [AW:0]      wcount,
  // read side
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rdata,
  output logic             rempty,
  output logic [AW:0]      rcount
);
  localparam int unsigned DEPTH = 1 << AW;

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w, wgray_r;  // Gray pointers seen in the other domain
  logic [AW:0] rbin_w, wbin_r;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write side ----------------
  logic do_write;
  assign do_write = wr_en && !wfull;

  always_ff @(posedge wclk) begin
    if (do_write) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin  <= '0;
      wgray <= '0;
    end else if (do_write) begin
      wbin  <= wbin + 1'b1;
      wgray <= bin2gray(wbin + 1'b1);
    end
  end

  sync_bits #(.WIDTH(AW + 1)) u_sync_r2w (
    .clk(wclk), .rst_n(wrst_n), .d(rgray), .q(rgray_w)
  );
  assign rbin_w = gray2bin(rgray_w);
  assign wcount = wbin - rbin_w;
  assign wfull  = (wcount == (AW + 1)'(DEPTH));

  // ---------------- read side ----------------
  logic do_read;
  assign do_read = rd_en && !rempty;

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin  <= '0;
      rgray <= '0;
    end else if (do_read) begin
      rbin  <= rbin + 1'b1;
      rgray <= bin2gray(rbin + 1'b1);
    end
  end

  sync_bits #(.WIDTH(AW + 1)) u_sync_w2r (
    .clk(rclk), .rst_n(rrst_n), .d(wgray), .q(wgray_r)
  );
  assign wbin_r = gray2bin(wgray_r);
  assign rcount = wbin_r - rbin;
  assign rempty = (rcount == '0);
  assign rdata  = mem[rbin[AW-1:0]];

  // Usage rules of the buffer.
  a_no_overwrite: assert property (@(posedge wclk) disable iff (!wrst_n)
                                   wcount <= (AW + 1)'(DEPTH));
  a_no_underrun:  assert property (@(posedge rclk) disable iff (!rrst_n)
                                   rcount <= (AW + 1)'(DEPTH));
endmodule
