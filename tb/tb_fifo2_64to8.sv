// tb_fifo2_64to8: self-checking test of FIFO2 (64-bit entries in on a
// 200 MHz clock, bytes out on a 125 MHz clock).
// Random entries are written with random gaps and read byte by byte with
// random gaps; every byte is checked against the model (bits [7:0] of an
// entry first). rd_bytes must never promise more bytes than were written and
// not yet read, and must equal that number once the writer is idle. A second
// phase fills the FIFO with the reader stopped and checks full and wcount.
module tb_fifo2_64to8;
  localparam int unsigned AW    = 4;
  localparam int unsigned DEPTH = 1 << AW;

  logic          wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic          wr_en = 0, rd_en = 0;
  logic [63:0]   din = '0;
  logic          full, empty;
  logic [AW:0]   wcount;
  logic [7:0]    dout;
  logic [AW+3:0] rd_bytes;

  int checks = 0, failures = 0;
  logic [7:0] expq[$];
  bit reader_on = 0;
  bit manual_rd = 0;

  always #2.5 wclk = ~wclk;
  always #4 rclk = ~rclk;

  fifo2_64to8 #(.AW(AW)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge wclk) if (wrst_n && wr_en && !full)
    for (int b = 0; b < 8; b++) expq.push_back(din[8*b +: 8]);

  always @(posedge rclk) if (rrst_n) begin
    check(int'(rd_bytes) <= expq.size(), "rd_bytes within the true level");
    if (rd_en && !empty) begin
      logic [7:0] e;
      e = expq.pop_front();
      check(dout == e, $sformatf("byte %h expected %h", dout, e));
    end
  end
  always @(negedge rclk) rd_en <= reader_on ? ($urandom_range(0, 2) != 0) : manual_rd;

  initial begin : watchdog
    #2ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge rclk);
    wrst_n = 1; rrst_n = 1;
    reader_on = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge wclk);
      wr_en = ($urandom_range(0, 9) == 0) && !full;
      din   = {$urandom, $urandom};
    end
    @(negedge wclk); wr_en = 0;
    repeat (300) @(posedge rclk);
    check(expq.size() == 0, "all bytes read");
    check(empty && rd_bytes == 0, "empty at the end of phase 1");
    // Phase 2: fill with the reader stopped.
    reader_on = 0;
    repeat (3) @(posedge rclk);
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge wclk); wr_en = 1; din = {32'(i), 32'hA5A5_0000 + 32'(i)};
    end
    @(negedge wclk); wr_en = 0;
    check(full && wcount == (AW + 1)'(DEPTH), "full after DEPTH writes");
    repeat (6) @(posedge rclk);
    check(rd_bytes == (AW + 4)'(8 * DEPTH), "reader sees every byte");
    // Three bytes out: rd_bytes drops by three, full stays.
    for (int i = 0; i < 3; i++) begin
      manual_rd = 1;
      @(posedge rclk); #0.1 manual_rd = 0;
      @(posedge rclk);
    end
    @(negedge rclk);
    check(rd_bytes == (AW + 4)'(8 * DEPTH - 3), "rd_bytes counts a partial entry");
    check(full, "still full inside the first entry");
    reader_on = 1;
    repeat (400) @(posedge rclk);
    check(expq.size() == 0 && empty, "drained");
    check(!full && wcount == 0, "writer sees the FIFO empty again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
