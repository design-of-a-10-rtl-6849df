// trng_recorder: top level of a recorder for one 1 Gb/s channel of a true
// random number generator. It stores a long continuous run of the random
// bit stream in DDR3 memory in real time and afterwards sends the run to a
// PC over Gigabit Ethernet, so that statistical tests can be run on it.
//
// Data path, as in the original recorder:
//   transceiver (16-bit words, 62.5 MHz, outside this module)
//     -> acq_gate -> FIFO1 (fifo1_16to64, 16 -> 64 bits, clock crossing)
//     -> cache_ctrl -> DDR3 controller application interface (outside)
//     -> cache_ctrl -> FIFO2 (fifo2_64to8, 64 -> 8 bits, clock crossing)
//     -> eth_tx_framer -> MAC transmit client interface (outside, 125 MHz)
// and the control path:
//   MAC receive client interface -> cmd_decoder -> pulse_sync -> cache_ctrl.
// The serial transceiver with clock recovery, the DDR3 controller and PHY,
// the Ethernet MAC and the clock generation are vendor cores and are not
// part of this RTL: their client-side signals are this module's ports.
//
// Clock domains: rx_clk (transceiver recovered clock), ui_clk (DDR3 user
// interface clock), mac_clk (125 MHz MAC client clock), each with its own
// active-low reset. Status outputs are in the domain named by their prefix.
// Bit order: bit 0 of rx_data is taken as the earliest bit on the line;
// word k of a 64-bit memory word is bits [16k+15:16k] and byte k of it is
// sent k-th, so the bytes sent to the PC carry the line bits in order,
// least significant bit of each byte first.
//
// Defaults: ADDR_W = 28 gives 2**28 words of 64 bits = 2 GB = 16 Gbit, the
// memory size of the original; FIFO depths and PAYLOAD_BYTES are this
// design's choice.
module trng_recorder
  import recorder_pkg::*;
#(
  parameter int unsigned ADDR_W        = 28,
  parameter int unsigned F1_AW         = 9,
  parameter int unsigned F2_AW         = 9,
  parameter int unsigned PAYLOAD_BYTES = 1024,
  parameter mac_addr_t   LOCAL_MAC     = 48'h02_00_00_00_00_01
) (
  // transceiver side
  input  logic              rx_clk,
  input  logic              rx_rst_n,
  input  logic [GTX_W-1:0]  rx_data,
  input  logic              rx_valid,
  output logic              rx_overflow,        // stored run has a gap
  // DDR3 controller application interface
  input  logic              ui_clk,
  input  logic              ui_rst_n,
  input  logic              init_calib_complete,
  output logic              app_en,
  output logic [2:0]        app_cmd,
  output logic [ADDR_W-1:0] app_addr,
  input  logic              app_rdy,
  output logic [MEM_W-1:0]  app_wdf_data,
  output logic              app_wdf_wren,
  input  logic              app_wdf_rdy,
  input  logic [MEM_W-1:0]  app_rd_data,
  input  logic              app_rd_data_valid,
  output cc_state_e         ui_state,
  output logic              ui_mem_valid,       // a complete run is stored
  output logic              ui_upload_done,
  // Ethernet MAC client interface
  input  logic              mac_clk,
  input  logic              mac_rst_n,
  input  logic [BYTE_W-1:0] mac_rx_data,
  input  logic              mac_rx_data_valid,
  input  logic              mac_rx_good_frame,
  input  logic              mac_rx_bad_frame,
  output logic [BYTE_W-1:0] mac_tx_data,
  output logic              mac_tx_data_valid,
  input  logic              mac_tx_ack,
  output logic [31:0]       mac_frames_sent,
  output logic              mac_host_valid      // a command has named the PC
);
  // transceiver domain
  logic        f1_wr_en;
  logic [1:0]  f1_wr_lane;
  logic        f1_overflow;
  logic        capture_active;
  // ui domain
  logic        capture_en;
  logic        f1_empty, f1_rd_en;
  logic [63:0] f1_dout;
  logic        f2_wr_en, f2_full;
  logic [63:0] f2_din;
  logic [F2_AW:0] f2_wcount;
  logic        ui_cmd_record, ui_cmd_upload;
  // mac domain
  logic        mac_cmd_record, mac_cmd_upload;
  mac_addr_t   host_mac;
  logic [7:0]  f2_dout;
  logic        f2_rd_en, f2_empty;
  logic [F2_AW+3:0] f2_bytes;

  // ---------------- acquisition ----------------
  acq_gate u_gate (
    .clk(rx_clk), .rst_n(rx_rst_n), .capture_en(capture_en),
    .rx_valid(rx_valid), .wr_lane(f1_wr_lane), .fifo_overflow(f1_overflow),
    .wr_en(f1_wr_en), .capture_active(capture_active),
    .overflow_flag(rx_overflow)
  );

  fifo1_16to64 #(.AW(F1_AW)) u_fifo1 (
    .wclk(rx_clk), .wrst_n(rx_rst_n), .wr_en(f1_wr_en), .din(rx_data),
    .wr_lane(f1_wr_lane), .overflow(f1_overflow),
    .rclk(ui_clk), .rrst_n(ui_rst_n), .rd_en(f1_rd_en), .dout(f1_dout),
    .empty(f1_empty)
  );

  // ---------------- cache ----------------
  cache_ctrl #(.ADDR_W(ADDR_W), .F2_AW(F2_AW)) u_cache (
    .clk(ui_clk), .rst_n(ui_rst_n), .init_calib_complete(init_calib_complete),
    .cmd_record(ui_cmd_record), .cmd_upload(ui_cmd_upload),
    .capture_en(capture_en), .capture_active(capture_active),
    .f1_empty(f1_empty), .f1_dout(f1_dout), .f1_rd_en(f1_rd_en),
    .app_en(app_en), .app_cmd(app_cmd), .app_addr(app_addr), .app_rdy(app_rdy),
    .app_wdf_data(app_wdf_data), .app_wdf_wren(app_wdf_wren),
    .app_wdf_rdy(app_wdf_rdy), .app_rd_data(app_rd_data),
    .app_rd_data_valid(app_rd_data_valid),
    .f2_wr_en(f2_wr_en), .f2_din(f2_din), .f2_wcount(f2_wcount),
    .state(ui_state), .mem_valid(ui_mem_valid), .upload_done(ui_upload_done)
  );

  // ---------------- data up-link ----------------
  fifo2_64to8 #(.AW(F2_AW)) u_fifo2 (
    .wclk(ui_clk), .wrst_n(ui_rst_n), .wr_en(f2_wr_en), .din(f2_din),
    .full(f2_full), .wcount(f2_wcount),
    .rclk(mac_clk), .rrst_n(mac_rst_n), .rd_en(f2_rd_en), .dout(f2_dout),
    .empty(f2_empty), .rd_bytes(f2_bytes)
  );

  eth_tx_framer #(
    .PAYLOAD_BYTES(PAYLOAD_BYTES), .LOCAL_MAC(LOCAL_MAC), .CNT_W(F2_AW + 4)
  ) u_framer (
    .clk(mac_clk), .rst_n(mac_rst_n), .host_mac(host_mac),
    .f2_bytes(f2_bytes), .f2_dout(f2_dout), .f2_rd_en(f2_rd_en),
    .tx_data(mac_tx_data), .tx_data_valid(mac_tx_data_valid),
    .tx_ack(mac_tx_ack), .frames_sent(mac_frames_sent)
  );

  // ---------------- commands ----------------
  cmd_decoder #(.LOCAL_MAC(LOCAL_MAC)) u_cmd (
    .clk(mac_clk), .rst_n(mac_rst_n), .rx_data(mac_rx_data),
    .rx_data_valid(mac_rx_data_valid), .rx_good_frame(mac_rx_good_frame),
    .rx_bad_frame(mac_rx_bad_frame), .cmd_record(mac_cmd_record),
    .cmd_upload(mac_cmd_upload), .host_mac(host_mac), .host_valid(mac_host_valid)
  );

  pulse_sync u_ps_record (
    .src_clk(mac_clk), .src_rst_n(mac_rst_n), .src_pulse(mac_cmd_record),
    .dst_clk(ui_clk), .dst_rst_n(ui_rst_n), .dst_pulse(ui_cmd_record)
  );
  pulse_sync u_ps_upload (
    .src_clk(mac_clk), .src_rst_n(mac_rst_n), .src_pulse(mac_cmd_upload),
    .dst_clk(ui_clk), .dst_rst_n(ui_rst_n), .dst_pulse(ui_cmd_upload)
  );

  // A frame is only started with a whole payload in FIFO2, so FIFO2 must be
  // able to hold one.
  initial begin
    assert (PAYLOAD_BYTES <= (8 << F2_AW))
      else $error("FIFO2 (%0d bytes) smaller than one payload", 8 << F2_AW);
  end

  // FIFO2 is never written while full and never read while empty: the
  // cache controller reserves room for every read it issues, and the framer
  // starts a frame only when a whole payload is waiting.
  a_f2_no_overrun:  assert property (@(posedge ui_clk) disable iff (!ui_rst_n)
                                     f2_wr_en |-> !f2_full);
  a_f2_no_underrun: assert property (@(posedge mac_clk) disable iff (!mac_rst_n)
                                     f2_rd_en |-> !f2_empty);
endmodule
