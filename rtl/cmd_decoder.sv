// cmd_decoder: command decoder of the recorder. It watches the receive
// client interface of the Ethernet MAC and turns command frames sent by the
// PC software into single-cycle command pulses.
//
// The original recorder has such a decoder between the MAC and the DDR3
// control, driven by commands from a PC user interface, but gives no frame
// format; the one below is this design's own. A command frame is
//   bytes 0-5   destination MAC: LOCAL_MAC or broadcast
//   bytes 6-11  source MAC: the PC; remembered as the destination of the
//               data frames (host_mac)
//   bytes 12-13 EtherType REC_ETHERTYPE, most significant byte first
//   byte  14    opcode (cmd_e); further bytes are ignored
// Bytes arrive on rx_data with rx_data_valid, one per clk (the 125 MHz MAC
// client clock). The frame is acted on only when the MAC then signals
// rx_good_frame; a frame closed by rx_bad_frame, a short frame, a frame for
// another address or with another EtherType is dropped. cmd_record or
// cmd_upload pulses in the cycle after rx_good_frame; an unknown opcode
// gives no pulse.
module cmd_decoder
  import recorder_pkg::*;
#(
  parameter mac_addr_t LOCAL_MAC = 48'h02_00_00_00_00_01
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic [7:0] rx_data,
  input  logic      rx_data_valid,
  input  logic      rx_good_frame,
  input  logic      rx_bad_frame,
  output logic      cmd_record,
  output logic      cmd_upload,
  output mac_addr_t host_mac,
  output logic      host_valid
);
  logic [3:0]  idx;        // byte index, saturates at 15
  logic        dst_local;  // destination bytes so far equal LOCAL_MAC
  logic        dst_bcast;  // destination bytes so far all 0xFF
  mac_addr_t   src_mac;
  logic [15:0] etype;
  logic [7:0]  opcode;
  logic        frame_ok;

  assign frame_ok = (idx == 4'd15) && (dst_local || dst_bcast) &&
                    (etype == REC_ETHERTYPE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx        <= '0;
      dst_local  <= 1'b1;
      dst_bcast  <= 1'b1;
      src_mac    <= '0;
      etype      <= '0;
      opcode     <= '0;
      cmd_record <= 1'b0;
      cmd_upload <= 1'b0;
      host_mac   <= '0;
      host_valid <= 1'b0;
    end else begin
      cmd_record <= 1'b0;
      cmd_upload <= 1'b0;
      if (rx_good_frame || rx_bad_frame) begin
        if (rx_good_frame && frame_ok) begin
          cmd_record <= (opcode == CMD_RECORD);
          cmd_upload <= (opcode == CMD_UPLOAD);
          if (opcode == CMD_RECORD || opcode == CMD_UPLOAD) begin
            host_mac   <= src_mac;
            host_valid <= 1'b1;
          end
        end
        idx       <= '0;
        dst_local <= 1'b1;
        dst_bcast <= 1'b1;
      end else if (rx_data_valid) begin
        if (idx != 4'd15) idx <= idx + 4'd1;
        if (idx < 4'd6) begin
          if (rx_data != LOCAL_MAC[8*(5 - idx[2:0]) +: 8]) dst_local <= 1'b0;
          if (rx_data != BROADCAST_MAC[7:0])               dst_bcast <= 1'b0;
        end else if (idx < 4'd12) begin
          src_mac <= {src_mac[39:0], rx_data};
        end else if (idx < 4'd14) begin
          etype <= {etype[7:0], rx_data};
        end else if (idx == 4'd14) begin
          opcode <= rx_data;
        end
      end
    end
  end

  a_one_command: assert property (@(posedge clk) disable iff (!rst_n)
                                  !(cmd_record && cmd_upload));
endmodule
