// tb_trng_recorder: end-to-end test of the recorder, run as a bit error
// rate test. For each of PRBS7 (x^7+x^6+1), PRBS15 (x^15+x^14+1), PRBS23
// (x^23+x^18+1) and PRBS31 (x^31+x^28+1) a pattern generator feeds the
// transceiver-side input with 16 new bits per 62.5 MHz cycle (1 Gb/s), the
// "PC" sends a record command frame, waits until a whole run is stored,
// sends an upload command and collects the data frames. The received bytes
// are turned back into the bit stream (least significant bit first) and
// every bit from the (degree)-th on is checked against the recurrence of
// its polynomial; the error count must be zero. Frame headers, the number
// of frames and the recording time (the run must be stored in real time)
// are checked too. A last run holds the memory off long enough for FIFO1 to
// overflow: the overflow flag must rise and the bit error check must find
// the gap. Each mechanism (memory stalls, FIFO2 throttling of reads, MAC
// acknowledge waits, a rejected command frame, FIFO1 overflow) is counted
// and must occur at least once. The memory size is reduced (ADDR_W) so the
// test runs in seconds.
module tb_trng_recorder;
  import recorder_pkg::*;
  localparam int unsigned ADDR_W  = 13;
  localparam int unsigned WORDS   = 1 << ADDR_W;
  localparam int unsigned F1_AW   = 5;
  localparam int unsigned F2_AW   = 5;
  localparam int unsigned PAYLOAD = 256;
  localparam int unsigned FRAMES  = WORDS * 8 / PAYLOAD;
  localparam mac_addr_t   LOCAL   = 48'h02_00_00_00_00_01;
  localparam mac_addr_t   PC_MAC  = 48'h00_1B_21_AA_BB_CC;

  logic rx_clk = 0, ui_clk = 0, mac_clk = 0;
  logic rx_rst_n = 0, ui_rst_n = 0, mac_rst_n = 0;
  always #8   rx_clk  = ~rx_clk;    // 62.5 MHz
  always #2.5 ui_clk  = ~ui_clk;    // 200 MHz
  always #4   mac_clk = ~mac_clk;   // 125 MHz

  logic [15:0] rx_data;
  logic        rx_valid = 0, rx_overflow;
  logic        init_calib_complete, app_en, app_rdy, app_wdf_wren, app_wdf_rdy;
  logic        app_rd_data_valid;
  logic [2:0]  app_cmd;
  logic [ADDR_W-1:0] app_addr;
  logic [63:0] app_wdf_data, app_rd_data;
  cc_state_e   ui_state;
  logic        ui_mem_valid, ui_upload_done;
  logic [7:0]  mac_rx_data = '0, mac_tx_data;
  logic        mac_rx_data_valid = 0, mac_rx_good_frame = 0, mac_rx_bad_frame = 0;
  logic        mac_tx_data_valid, mac_tx_ack = 0, mac_host_valid;
  logic [31:0] mac_frames_sent;
  logic        hold_off = 0;

  trng_recorder #(
    .ADDR_W(ADDR_W), .F1_AW(F1_AW), .F2_AW(F2_AW),
    .PAYLOAD_BYTES(PAYLOAD), .LOCAL_MAC(LOCAL)
  ) dut (.*);

  ddr3_app_model #(.ADDR_W(ADDR_W)) u_mem (
    .clk(ui_clk), .rst_n(ui_rst_n), .hold_off(hold_off),
    .init_calib_complete(init_calib_complete),
    .app_en(app_en), .app_cmd(app_cmd), .app_addr(app_addr), .app_rdy(app_rdy),
    .app_wdf_data(app_wdf_data), .app_wdf_wren(app_wdf_wren),
    .app_wdf_rdy(app_wdf_rdy), .app_rd_data(app_rd_data),
    .app_rd_data_valid(app_rd_data_valid)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- pattern generator (transceiver side) ----------------
  int unsigned tap_a = 7, tap_b = 6;
  logic [30:0] hist = 31'h1;    // hist[0] = most recent bit
  always @(posedge rx_clk) begin
    logic [15:0] w;
    for (int i = 0; i < 16; i++) begin
      logic nb;
      nb = hist[tap_a - 1] ^ hist[tap_b - 1];
      w[i] = nb;
      hist = {hist[29:0], nb};
    end
    rx_data <= w;
  end

  // ---------------- mechanism counters ----------------
  // Observed on the recorder's ports only.
  int n_mem_stall = 0, n_f2_throttle = 0, n_ack_wait = 0, n_overflow = 0;
  int n_rejected = 0, n_record = 0, n_upload = 0, n_reads = 0;
  cc_state_e prev_state = CC_IDLE;
  logic prev_ovf = 0;
  always @(posedge ui_clk) if (ui_rst_n) begin
    if (ui_state == CC_RECORD && !(app_rdy && app_wdf_rdy)) n_mem_stall++;
    if (ui_state == CC_UPLOAD && app_en && app_rdy) n_reads++;
    // memory ready, reads left to issue, yet no read: FIFO2 has no room
    if (ui_state == CC_UPLOAD && app_rdy && !app_en && n_reads < int'(WORDS))
      n_f2_throttle++;
    if (ui_state == CC_RECORD && prev_state != CC_RECORD) n_record++;
    if (ui_state == CC_UPLOAD && prev_state != CC_UPLOAD) begin
      n_upload++;
      n_reads = 0;
    end
    prev_state = ui_state;
  end
  always @(posedge rx_clk) if (rx_rst_n) begin
    if (rx_overflow && !prev_ovf) n_overflow++;
    prev_ovf = rx_overflow;
  end
  always @(posedge mac_clk) if (mac_rst_n) begin
    if (mac_tx_data_valid && !mac_tx_ack && !in_frame) n_ack_wait++;
  end

  // ---------------- MAC model: transmit side (data to the PC) ----------------
  logic [7:0] rx_bytes[$];       // payload bytes received by the PC
  logic [7:0] frame[$];
  bit in_frame = 0;
  int frames_rx = 0, ack_wait = 0;
  always @(posedge mac_clk) begin
    if (!in_frame) begin
      if (mac_tx_data_valid && mac_tx_ack) begin
        in_frame = 1;
        frame.delete();
        frame.push_back(mac_tx_data);
      end
    end else if (mac_tx_data_valid) begin
      frame.push_back(mac_tx_data);
    end else begin
      in_frame = 0;
      frames_rx++;
      check(frame.size() == ETH_HDR_BYTES + PAYLOAD, "data frame length");
      check({frame[0], frame[1], frame[2], frame[3], frame[4], frame[5]} == PC_MAC,
            "data frame addressed to the PC");
      check({frame[6], frame[7], frame[8], frame[9], frame[10], frame[11]} == LOCAL,
            "data frame source address");
      check({frame[12], frame[13]} == REC_ETHERTYPE, "data frame EtherType");
      for (int i = ETH_HDR_BYTES; i < frame.size(); i++) rx_bytes.push_back(frame[i]);
    end
  end
  always @(negedge mac_clk) begin
    if (mac_tx_data_valid && !in_frame && !mac_tx_ack) begin
      if (ack_wait == 0) begin
        mac_tx_ack <= 1;
        ack_wait = $urandom_range(0, 12);   // inter-frame gap and more
      end else ack_wait--;
    end else mac_tx_ack <= 0;
  end

  // ---------------- MAC model: receive side (commands from the PC) ----------
  task automatic send_cmd(input logic [7:0] op, input bit good);
    logic [7:0] b[$];
    for (int i = 5; i >= 0; i--) b.push_back(LOCAL[8*i +: 8]);
    for (int i = 5; i >= 0; i--) b.push_back(PC_MAC[8*i +: 8]);
    b.push_back(REC_ETHERTYPE[15:8]);
    b.push_back(REC_ETHERTYPE[7:0]);
    b.push_back(op);
    while (b.size() < 60) b.push_back(8'h00);
    foreach (b[i]) begin
      @(negedge mac_clk);
      mac_rx_data = b[i]; mac_rx_data_valid = 1;
    end
    @(negedge mac_clk);
    mac_rx_data_valid = 0;
    mac_rx_good_frame = good; mac_rx_bad_frame = !good;
    @(negedge mac_clk);
    mac_rx_good_frame = 0; mac_rx_bad_frame = 0;
    if (!good) n_rejected++;
  endtask

  // ---------------- bit error check on the PC side ----------------
  function automatic int bert(input int a, input int b);
    logic s[$];
    int errs = 0;
    foreach (rx_bytes[k])
      for (int j = 0; j < 8; j++) s.push_back(rx_bytes[k][j]);
    for (int n = a; n < s.size(); n++)
      if (s[n] != (s[n-a] ^ s[n-b])) errs++;
    return errs;
  endfunction

  task automatic run_once(input int a, input int b, input bit force_gap,
                          output int errs);
    realtime t0, t1;
    tap_a = a; tap_b = b;
    rx_bytes.delete();
    frames_rx = 0;
    send_cmd(CMD_RECORD, 1);
    wait (ui_state == CC_RECORD);
    t0 = $realtime;
    if (force_gap) begin
      repeat (400) @(posedge ui_clk);
      hold_off = 1;
      repeat (2000) @(posedge ui_clk);
      hold_off = 0;
    end
    wait (ui_mem_valid);
    t1 = $realtime;
    // Real time: WORDS words of 64 bits at 1 Gb/s, plus start-up slack.
    if (!force_gap)
      check(t1 - t0 < real'(WORDS) * 64.0 + 200.0,
            $sformatf("PRBS%0d stored in %0t ns", a, t1 - t0));
    repeat (20) @(posedge mac_clk);
    send_cmd(CMD_UPLOAD, 1);
    wait (ui_upload_done);
    wait (frames_rx == FRAMES);
    repeat (50) @(posedge mac_clk);
    check(frames_rx == FRAMES && rx_bytes.size() == WORDS * 8,
          $sformatf("PRBS%0d: %0d frames, %0d bytes", a, frames_rx, rx_bytes.size()));
    errs = bert(a, b);
  endtask

  initial begin : watchdog
    #50ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int errs;
  int polys[4][2] = '{'{7, 6}, '{15, 14}, '{23, 18}, '{31, 28}};
  initial begin
    repeat (4) @(posedge rx_clk);
    rx_rst_n = 1; ui_rst_n = 1; mac_rst_n = 1;
    rx_valid = 1;
    wait (init_calib_complete);
    // A command frame with a bad checksum must do nothing.
    send_cmd(CMD_RECORD, 0);
    repeat (40) @(posedge ui_clk);
    check(ui_state == CC_IDLE && !ui_mem_valid, "bad command frame ignored");
    foreach (polys[p]) begin
      run_once(polys[p][0], polys[p][1], 0, errs);
      check(!rx_overflow, $sformatf("PRBS%0d recorded without overflow", polys[p][0]));
      check(errs == 0, $sformatf("PRBS%0d: %0d bit errors in %0d bits",
                                 polys[p][0], errs, WORDS * 64));
      $display("BERT PRBS%0d: %0d bits, %0d errors", polys[p][0], WORDS * 64, errs);
    end
    // Memory held off during a record: FIFO1 overflows and the run has a gap.
    run_once(15, 14, 1, errs);
    check(rx_overflow, "overflow flag raised by a stalled memory");
    check(errs > 0, "gap in the run found by the bit error check");
    check(mac_host_valid, "host address known");
    // Every mechanism must have happened.
    check(n_mem_stall > 0, "memory stalls occurred");
    check(n_f2_throttle > 0, "FIFO2 throttled the reads");
    check(n_ack_wait > 0, "MAC acknowledge waits occurred");
    check(n_overflow == 1, "FIFO1 overflow occurred");
    check(n_rejected == 1, "one rejected command frame");
    check(n_record == 5 && n_upload == 5, "commands decoded");
    $display("mechanisms: mem_stall=%0d f2_throttle=%0d ack_wait=%0d overflow=%0d rejected=%0d records=%0d uploads=%0d",
             n_mem_stall, n_f2_throttle, n_ack_wait, n_overflow, n_rejected, n_record, n_upload);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
