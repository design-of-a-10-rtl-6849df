// tb_bert_workload: bit error rate test of the recorder at a larger memory
// size. The recorder keeps its default FIFO depths and 1024-byte payloads;
// only the memory is reduced, to ADDR_W = 18 (2^18 words, 16.8 Mbit per
// run, against 16 Gbit at the default). For each of PRBS7, PRBS15, PRBS23
// and PRBS31 the pattern enters at 16 bits per 62.5 MHz clock (1 Gb/s); the
// PC model sends a record command, then an upload command, and checks each
// received bit on the fly against the polynomial's recurrence
// s[n] = s[n-a] ^ s[n-b]. Every polynomial must give zero errors, the right
// number of frames, no overflow and a recording time within real time.
module tb_bert_workload;
  import recorder_pkg::*;
  localparam int unsigned ADDR_W  = 18;
  localparam int unsigned WORDS   = 1 << ADDR_W;
  localparam int unsigned PAYLOAD = 1024;
  localparam int unsigned FRAMES  = WORDS * 8 / PAYLOAD;
  localparam mac_addr_t   LOCAL   = 48'h02_00_00_00_00_01;
  localparam mac_addr_t   PC_MAC  = 48'h00_1B_21_01_02_03;

  logic rx_clk = 0, ui_clk = 0, mac_clk = 0;
  logic rx_rst_n = 0, ui_rst_n = 0, mac_rst_n = 0;
  always #8   rx_clk  = ~rx_clk;
  always #2.5 ui_clk  = ~ui_clk;
  always #4   mac_clk = ~mac_clk;

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

  trng_recorder #(.ADDR_W(ADDR_W), .LOCAL_MAC(LOCAL)) dut (.*);

  ddr3_app_model #(.ADDR_W(ADDR_W)) u_mem (
    .clk(ui_clk), .rst_n(ui_rst_n), .hold_off(1'b0),
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

  // Pattern generator.
  int unsigned tap_a = 7, tap_b = 6;
  logic [30:0] hist = 31'h1;
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

  // PC side: frame receiver with an on-the-fly bit error checker.
  logic [30:0] chk = '0;       // chk[0] = last received bit
  longint      nbits = 0, errs = 0;
  int          frames_rx = 0, nbytes = 0, ack_wait = 0;
  bit          in_frame = 0, hdr_ok = 1;
  task automatic take_byte(input logic [7:0] b);
    if (nbytes < int'(ETH_HDR_BYTES)) begin
      logic [7:0] e;
      if (nbytes < 6)       e = PC_MAC[8*(5 - nbytes) +: 8];
      else if (nbytes < 12) e = LOCAL[8*(11 - nbytes) +: 8];
      else                  e = REC_ETHERTYPE[8*(13 - nbytes) +: 8];
      if (b != e) hdr_ok = 0;
    end else begin
      for (int j = 0; j < 8; j++) begin
        if (nbits >= longint'(tap_a) && b[j] != (chk[tap_a - 1] ^ chk[tap_b - 1])) errs++;
        chk = {chk[29:0], b[j]};
        nbits++;
      end
    end
    nbytes++;
  endtask
  always @(posedge mac_clk) begin
    if (!in_frame) begin
      if (mac_tx_data_valid && mac_tx_ack) begin
        in_frame = 1;
        nbytes = 0;
        take_byte(mac_tx_data);
      end
    end else if (mac_tx_data_valid) begin
      take_byte(mac_tx_data);
    end else begin
      in_frame = 0;
      frames_rx++;
      if (nbytes != int'(ETH_HDR_BYTES + PAYLOAD)) hdr_ok = 0;
    end
  end
  always @(negedge mac_clk) begin
    if (mac_tx_data_valid && !in_frame && !mac_tx_ack) begin
      if (ack_wait == 0) begin
        mac_tx_ack <= 1;
        ack_wait = $urandom_range(1, 4);   // inter-frame gap
      end else ack_wait--;
    end else mac_tx_ack <= 0;
  end

  task automatic send_cmd(input logic [7:0] op);
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
    mac_rx_data_valid = 0; mac_rx_good_frame = 1;
    @(negedge mac_clk);
    mac_rx_good_frame = 0;
  endtask

  initial begin : watchdog
    #400ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int polys[4][2] = '{'{7, 6}, '{15, 14}, '{23, 18}, '{31, 28}};
  initial begin
    realtime t0, t1;
    repeat (4) @(posedge rx_clk);
    rx_rst_n = 1; ui_rst_n = 1; mac_rst_n = 1;
    rx_valid = 1;
    wait (init_calib_complete);
    foreach (polys[p]) begin
      tap_a = polys[p][0]; tap_b = polys[p][1];
      nbits = 0; errs = 0; frames_rx = 0; hdr_ok = 1;
      send_cmd(CMD_RECORD);
      wait (ui_state == CC_RECORD);
      t0 = $realtime;
      wait (ui_mem_valid);
      t1 = $realtime;
      check(t1 - t0 < real'(WORDS) * 64.0 + 200.0,
            $sformatf("PRBS%0d: run stored in %0t ns", tap_a, t1 - t0));
      check(!rx_overflow, $sformatf("PRBS%0d: no overflow", tap_a));
      send_cmd(CMD_UPLOAD);
      wait (frames_rx == FRAMES);
      repeat (20) @(posedge mac_clk);
      check(hdr_ok, $sformatf("PRBS%0d: frame headers and lengths", tap_a));
      check(nbits == longint'(WORDS) * 64, $sformatf("PRBS%0d: %0d bits", tap_a, nbits));
      check(errs == 0, $sformatf("PRBS%0d: %0d bit errors", tap_a, errs));
      $display("BERT PRBS%0d: %0d bits, %0d errors", tap_a, nbits, errs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
