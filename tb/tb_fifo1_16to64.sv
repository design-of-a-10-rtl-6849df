// tb_fifo1_16to64: self-checking test of FIFO1 (16-bit words in on a
// 62.5 MHz clock, 64-bit entries out on a 200 MHz clock).
// Phase 1 streams random words with random gaps on both sides and checks
// every 64-bit entry against the model: four consecutive words, first word
// in bits [15:0]. Phase 2 stops the reader, writes two entries more than the
// depth and checks that exactly two overflow pulses appear and that the
// stored entries are the first DEPTH ones, in order.
module tb_fifo1_16to64;
  localparam int unsigned AW    = 4;
  localparam int unsigned DEPTH = 1 << AW;

  logic        wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic        wr_en = 0, rd_en = 0;
  logic [15:0] din = '0;
  logic [1:0]  wr_lane;
  logic        overflow, empty;
  logic [63:0] dout;

  int checks = 0, failures = 0;
  logic [63:0] expq[$];
  logic [15:0] part[4];
  int          nw = 0;
  int          ovf_count = 0;
  bit          reader_on = 0;

  always #8 wclk = ~wclk;
  always #2.5 rclk = ~rclk;

  fifo1_16to64 #(.AW(AW)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Model: assemble expected entries from the accepted words.
  always @(posedge wclk) if (wrst_n && wr_en) begin
    part[nw % 4] = din;
    if (nw % 4 == 3) expq.push_back({part[3], part[2], part[1], part[0]});
    nw++;
  end
  always @(posedge wclk) if (overflow) ovf_count++;

  // Reader: random pops in phase 1, check each popped entry.
  always @(posedge rclk) begin
    if (rrst_n && rd_en && !empty) begin
      check(expq.size() > 0, "pop with nothing expected");
      if (expq.size() > 0) begin
        logic [63:0] e;
        e = expq.pop_front();
        check(dout == e, $sformatf("entry %h expected %h", dout, e));
      end
    end
  end
  always @(negedge rclk) rd_en <= reader_on && ($urandom_range(0, 3) != 0);

  initial begin : watchdog
    #2ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge wclk);
    wrst_n = 1; rrst_n = 1;
    reader_on = 1;
    // Phase 1: 4000 words with gaps, lane counter checked.
    for (int i = 0; i < 4000; i++) begin
      @(negedge wclk);
      check(wr_lane == 2'(nw % 4), "wr_lane follows the word count");
      wr_en = ($urandom_range(0, 4) != 0);
      din   = 16'($urandom);
    end
    @(negedge wclk); wr_en = 0;
    while (nw % 4 != 0) begin
      @(negedge wclk); wr_en = 1; din = 16'($urandom);
    end
    @(negedge wclk); wr_en = 0;
    repeat (50) @(posedge wclk);
    check(expq.size() == 0, "all phase-1 entries read");
    check(empty, "FIFO empty after phase 1");
    check(ovf_count == 0, "no overflow while the reader keeps up");
    // Phase 2: fill beyond the depth with the reader stopped.
    reader_on = 0;
    repeat (5) @(posedge rclk);
    for (int i = 0; i < 4 * (DEPTH + 2); i++) begin
      @(negedge wclk); wr_en = 1; din = 16'(i * 3 + 1);
    end
    @(negedge wclk); wr_en = 0;
    repeat (4) @(posedge wclk);
    check(ovf_count == 2, $sformatf("overflow pulses %0d, expected 2", ovf_count));
    // The two dropped entries are the last two of the model.
    void'(expq.pop_back());
    void'(expq.pop_back());
    reader_on = 1;
    repeat (200) @(posedge rclk);
    check(expq.size() == 0, "stored entries are the first DEPTH ones");
    check(empty, "FIFO empty at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
