// acq_gate: start/stop gate of the acquisition, in the transceiver's
// recovered-clock domain (clk, 62.5 MHz for a 1 Gb/s line).
//
// capture_en comes from the cache controller in another clock domain and is
// synchronised here. Words from the transceiver (rx_valid) are passed to
// FIFO1 (wr_en) while the synchronised enable is high; when it falls, the
// gate still passes words until the current group of four 16-bit words is
// complete (wr_lane back to 0), so FIFO1 only ever holds whole 64-bit
// entries and every run starts on a fresh entry. capture_active is high
// while the gate may still write. overflow_flag is a sticky copy of FIFO1's
// overflow pulse, cleared when a new capture starts: it tells that the
// stored run has a gap. This gate is this design's own addition; the
// original only implies that recording starts and stops on command.
module acq_gate (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       capture_en,
  input  logic       rx_valid,
  input  logic [1:0] wr_lane,
  input  logic       fifo_overflow,
  output logic       wr_en,
  output logic       capture_active,
  output logic       overflow_flag
);
  logic en_sync;
  logic en_sync_d;

  sync_bits #(.WIDTH(1)) u_sync_en (
    .clk(clk), .rst_n(rst_n), .d(capture_en), .q(en_sync)
  );

  assign capture_active = en_sync || (wr_lane != 2'd0);
  assign wr_en          = rx_valid && capture_active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en_sync_d     <= 1'b0;
      overflow_flag <= 1'b0;
    end else begin
      en_sync_d <= en_sync;
      if (en_sync && !en_sync_d) overflow_flag <= 1'b0;
      else if (fifo_overflow)    overflow_flag <= 1'b1;
    end
  end
endmodule
