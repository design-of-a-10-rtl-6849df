// tb_eth_tx_framer: self-checking test of the up-link frame builder.
// A byte queue stands in for FIFO2 (filled in random bursts) and a MAC
// model acknowledges the first byte of each frame after a random delay and
// then takes one byte per cycle while tx_data_valid is high. Checked: no
// frame starts before a whole payload is waiting; every frame carries the
// header (host MAC, local MAC, EtherType) and then PAYLOAD bytes in FIFO
// order; tx_data_valid stays high without a gap from the acknowledge to the
// last byte, so a frame lasts exactly 14 + PAYLOAD cycles; frames_sent
// counts the frames.
module tb_eth_tx_framer;
  import recorder_pkg::*;
  localparam int unsigned PAYLOAD = 64;
  localparam mac_addr_t LOCAL = 48'h02_00_00_00_00_01;
  localparam mac_addr_t HOST  = 48'h00_11_22_33_44_55;
  localparam int unsigned FRAMES = 12;

  logic clk = 0, rst_n = 0;
  mac_addr_t host_mac = HOST;
  logic [12:0] f2_bytes;
  logic [7:0]  f2_dout, tx_data;
  logic        f2_rd_en, tx_data_valid, tx_ack = 0;
  logic [31:0] frames_sent;

  always #4 clk = ~clk;

  eth_tx_framer #(.PAYLOAD_BYTES(PAYLOAD), .LOCAL_MAC(LOCAL)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [7:0] fifo[$];
  logic [7:0] sent[$];          // every payload byte put into the FIFO
  int         n_sent_payload = 0;
  assign f2_bytes = 13'(fifo.size());
  assign f2_dout  = (fifo.size() != 0) ? fifo[0] : 8'h00;

  // MAC model.
  logic [7:0] frame[$];
  bit in_frame = 0;
  int ack_wait = 0, frame_start = 0, cyc = 0, frames_rx = 0;
  always @(posedge clk) begin
    cyc++;
    if (f2_rd_en) begin
      check(fifo.size() != 0, "no read from an empty FIFO");
      void'(fifo.pop_front());
    end
    if (!in_frame) begin
      if (tx_data_valid && tx_ack) begin
        in_frame = 1;
        frame.delete();
        frame.push_back(tx_data);
        frame_start = cyc;
      end
    end else if (tx_data_valid) begin
      frame.push_back(tx_data);
    end else begin
      in_frame = 0;
      frames_rx++;
      check(frame.size() == ETH_HDR_BYTES + PAYLOAD,
            $sformatf("frame length %0d", frame.size()));
      check(cyc - frame_start == ETH_HDR_BYTES + PAYLOAD,
            $sformatf("frame took %0d cycles", cyc - frame_start));
      for (int i = 0; i < 6; i++) begin
        check(frame[i] == HOST[8*(5-i) +: 8], "destination MAC");
        check(frame[6+i] == LOCAL[8*(5-i) +: 8], "source MAC");
      end
      check({frame[12], frame[13]} == REC_ETHERTYPE, "EtherType");
      for (int i = 0; i < PAYLOAD; i++) begin
        check(frame[ETH_HDR_BYTES+i] == sent[n_sent_payload],
              $sformatf("payload byte %0d", n_sent_payload));
        n_sent_payload++;
      end
    end
  end
  // Acknowledge the first byte after 0..7 cycles.
  always @(negedge clk) begin
    if (tx_data_valid && !in_frame && !tx_ack) begin
      if (ack_wait == 0) begin
        tx_ack <= 1;
        ack_wait = $urandom_range(0, 7);
      end else ack_wait--;
    end else tx_ack <= 0;
  end
  // A frame must never start early.
  always @(posedge clk) if (rst_n && tx_data_valid && !in_frame && !$past(tx_data_valid))
    check($past(f2_bytes) >= PAYLOAD, "frame started with a full payload waiting");

  initial begin : watchdog
    #1ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Less than a payload: nothing may be sent.
    for (int i = 0; i < PAYLOAD - 1; i++) begin
      logic [7:0] b = 8'($urandom);
      fifo.push_back(b); sent.push_back(b);
    end
    repeat (50) @(posedge clk);
    check(!tx_data_valid && frames_rx == 0, "waits for a whole payload");
    // Feed the rest in random bursts.
    while (sent.size() < FRAMES * PAYLOAD) begin
      @(negedge clk);
      if ($urandom_range(0, 1) == 0) begin
        logic [7:0] b = 8'($urandom);
        fifo.push_back(b); sent.push_back(b);
      end
    end
    wait (frames_rx == FRAMES);
    repeat (20) @(posedge clk);
    check(frames_sent == FRAMES, $sformatf("frames_sent %0d", frames_sent));
    check(fifo.size() == 0, "all bytes sent");
    check(!tx_data_valid, "idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
