// eth_tx_framer: data up-link transmitter of the recorder. It takes the
// recorded bytes from FIFO2 and passes them to the transmit client interface
// of the Ethernet MAC in frames addressed to the PC.
//
// In the original recorder, bytes read from FIFO2 go to the MAC at 125 MHz,
// i.e. at the 1 Gb/s line rate; how they are cut into frames is not given.
// Here each frame is a 14-byte header (host_mac, LOCAL_MAC, REC_ETHERTYPE)
// followed by PAYLOAD_BYTES bytes of data in FIFO2 order; the MAC adds
// preamble and FCS. The payload size is this design's choice.
//
// Timing, on clk (the 125 MHz MAC client clock): the MAC client protocol
// needs one byte every cycle from the first acknowledged byte to the last,
// so a frame is only started when FIFO2 reports at least PAYLOAD_BYTES
// bytes (f2_bytes). The first header byte is then held on tx_data with
// tx_data_valid until the MAC answers tx_ack; the following bytes are
// presented one per cycle, the data bytes being popped from FIFO2 (f2_rd_en)
// in the cycle they are presented. tx_data_valid falls after the last byte
// and frames_sent counts completed frames. A whole frame takes
// ETH_HDR_BYTES + PAYLOAD_BYTES cycles after the acknowledge.
module eth_tx_framer
  import recorder_pkg::*;
#(
  parameter int unsigned PAYLOAD_BYTES = 1024,
  parameter mac_addr_t   LOCAL_MAC     = 48'h02_00_00_00_00_01,
  parameter int unsigned CNT_W         = 13   // width of f2_bytes
) (
  input  logic             clk,
  input  logic             rst_n,
  input  mac_addr_t        host_mac,
  // FIFO2 read side
  input  logic [CNT_W-1:0] f2_bytes,
  input  logic [7:0]       f2_dout,
  output logic             f2_rd_en,
  // MAC transmit client interface
  output logic [7:0]       tx_data,
  output logic             tx_data_valid,
  input  logic             tx_ack,
  // status
  output logic [31:0]      frames_sent
);
  localparam int unsigned FRAME_BYTES = ETH_HDR_BYTES + PAYLOAD_BYTES;
  localparam int unsigned IW          = $clog2(FRAME_BYTES);

  logic          busy;
  logic [IW-1:0] idx;
  logic [7:0]    hdr_byte;

  // Header byte at position idx.
  always_comb begin
    if (idx < IW'(6))        hdr_byte = host_mac[8*(5 - idx) +: 8];
    else if (idx < IW'(12))  hdr_byte = LOCAL_MAC[8*(11 - idx) +: 8];
    else if (idx == IW'(12)) hdr_byte = REC_ETHERTYPE[15:8];
    else                     hdr_byte = REC_ETHERTYPE[7:0];
  end

  assign tx_data_valid = busy;
  assign tx_data       = (idx < IW'(ETH_HDR_BYTES)) ? hdr_byte : f2_dout;
  assign f2_rd_en      = busy && (idx >= IW'(ETH_HDR_BYTES));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      idx         <= '0;
      frames_sent <= '0;
    end else if (!busy) begin
      idx <= '0;
      if (f2_bytes >= CNT_W'(PAYLOAD_BYTES)) busy <= 1'b1;
    end else if (idx == '0) begin
      if (tx_ack) idx <= IW'(1);
    end else if (idx == IW'(FRAME_BYTES - 1)) begin
      busy        <= 1'b0;
      idx         <= '0;
      frames_sent <= frames_sent + 1'b1;
    end else begin
      idx <= idx + 1'b1;
    end
  end

  initial begin
    assert (PAYLOAD_BYTES >= 46) else $error("payload below the Ethernet minimum");
    assert (PAYLOAD_BYTES <= 1500) else $error("payload above the Ethernet maximum");
  end
endmodule
