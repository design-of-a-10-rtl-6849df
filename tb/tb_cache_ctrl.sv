// tb_cache_ctrl: self-checking test of the DDR3 cache control.
// The testbench models FIFO1 (a queue of 64-bit words), the DDR3 controller
// application interface (a word array with random app_rdy/app_wdf_rdy
// stalls and a fixed read latency) and FIFO2 (an occupancy count drained at
// random). It checks: stale FIFO1 words are discarded while idle; an upload
// before any record is ignored; a record writes addresses 0..2**ADDR_W-1 in
// order with the FIFO1 words in order and then raises mem_valid; with no
// stalls the record takes one cycle per word; an upload returns the memory
// contents in address order into FIFO2 without ever overfilling it.
module tb_cache_ctrl;
  import recorder_pkg::*;
  localparam int unsigned ADDR_W = 6;
  localparam int unsigned WORDS  = 1 << ADDR_W;
  localparam int unsigned F2_AW  = 3;
  localparam int unsigned F2_DEPTH = 1 << F2_AW;
  localparam int unsigned LAT    = 4;

  logic clk = 0, rst_n = 0;
  logic init_calib_complete = 0, cmd_record = 0, cmd_upload = 0;
  logic capture_en, capture_active = 0;
  logic f1_empty, f1_rd_en;
  logic [63:0] f1_dout;
  logic app_en, app_rdy, app_wdf_wren, app_wdf_rdy, app_rd_data_valid;
  logic [2:0] app_cmd;
  logic [ADDR_W-1:0] app_addr;
  logic [63:0] app_wdf_data, app_rd_data;
  logic f2_wr_en;
  logic [63:0] f2_din;
  logic [F2_AW:0] f2_wcount;
  cc_state_e state;
  logic mem_valid, upload_done;

  always #2.5 clk = ~clk;

  cache_ctrl #(.ADDR_W(ADDR_W), .F2_AW(F2_AW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- FIFO1 model ----
  logic [63:0] f1q[$];
  logic [63:0] recorded[$];     // words pushed while capturing
  bit          f1_hold = 0;     // random "empty" bubbles
  assign f1_empty = (f1q.size() == 0) || f1_hold;
  assign f1_dout  = (f1q.size() != 0) ? f1q[0] : 64'h0;

  // ---- memory model ----
  logic [63:0] mem [WORDS];
  logic [LAT-1:0] rd_v;
  logic [63:0]    rd_d [LAT];
  bit stall_mem = 1;
  int next_wr_addr = 0, next_rd_addr = 0, n_writes = 0;
  int first_wr_cyc = -1, last_wr_cyc = -1, cyc = 0;
  assign app_rd_data_valid = rd_v[LAT-1];
  assign app_rd_data       = rd_d[LAT-1];

  // ---- FIFO2 model ----
  int f2_level = 0, f2_max = 0;
  logic [63:0] f2q[$];
  assign f2_wcount = (F2_AW + 1)'(f2_level);

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (f1_rd_en && !f1_empty) void'(f1q.pop_front());
      if (app_en && app_rdy) begin
        if (app_cmd == MEM_WRITE) begin
          check(app_wdf_wren && app_wdf_rdy, "write data with write command");
          check(int'(app_addr) == next_wr_addr, "write address in order");
          mem[app_addr] = app_wdf_data;
          next_wr_addr = (next_wr_addr + 1) % WORDS;
          n_writes++;
          if (first_wr_cyc < 0) first_wr_cyc = cyc;
          last_wr_cyc = cyc;
        end else begin
          check(app_cmd == MEM_READ, "read command code");
          check(int'(app_addr) == next_rd_addr, "read address in order");
          next_rd_addr = (next_rd_addr + 1) % WORDS;
        end
      end
      // read pipeline
      for (int i = LAT - 1; i > 0; i--) begin
        rd_v[i] <= rd_v[i-1];
        rd_d[i] <= rd_d[i-1];
      end
      rd_v[0] <= app_en && app_rdy && (app_cmd == MEM_READ);
      rd_d[0] <= mem[app_addr];
      // FIFO2
      if (f2_wr_en) begin
        f2q.push_back(f2_din);
        f2_level++;
      end
      if (f2_level > f2_max) f2_max = f2_level;
      check(f2_level <= F2_DEPTH, "FIFO2 never overfilled");
      if (f2_level > 0 && $urandom_range(0, 3) == 0) f2_level--;
    end else begin
      rd_v <= '0;
    end
  end

  always @(negedge clk) begin
    app_rdy     <= !stall_mem || ($urandom_range(0, 3) != 0);
    app_wdf_rdy <= !stall_mem || ($urandom_range(0, 5) != 0);
    f1_hold     <= stall_mem && ($urandom_range(0, 4) == 0);
    capture_active <= capture_en;
  end

  // Source: while capturing, push a fresh word on most cycles.
  bit source_on = 0;
  logic [63:0] word_ctr = 64'h1000_0000_0000_0000;
  always @(posedge clk) if (source_on && capture_en && f1q.size() < 64) begin
    word_ctr = word_ctr + 64'h0001_0003_0005_0007;
    f1q.push_back(word_ctr);
    recorded.push_back(word_ctr);
  end

  task automatic pulse(ref logic sig);
    @(negedge clk) sig = 1;
    @(negedge clk) sig = 0;
  endtask

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
    repeat (5) @(posedge clk);
    init_calib_complete = 1;
    // Stale words in FIFO1 while idle are discarded.
    for (int i = 0; i < 10; i++) f1q.push_back(64'hDEAD_0000 + 64'(i));
    repeat (30) @(posedge clk);
    check(f1q.size() == 0, "idle drains FIFO1");
    check(n_writes == 0, "idle writes nothing to memory");
    // Upload without a stored run is ignored.
    pulse(cmd_upload);
    repeat (5) @(posedge clk);
    check(state == CC_IDLE, "upload before record ignored");
    // Record with stalls.
    source_on = 1;
    pulse(cmd_record);
    wait (state == CC_RECORD);
    check(!mem_valid, "mem_valid cleared at record start");
    wait (mem_valid);
    @(posedge clk);
    check(n_writes == WORDS, $sformatf("record wrote %0d words", n_writes));
    for (int a = 0; a < WORDS; a++)
      check(mem[a] == recorded[a], $sformatf("memory word %0d", a));
    repeat (4) @(posedge clk);
    check(!capture_en && state == CC_IDLE, "capture stops when memory is full");
    // Upload with stalls and a slow FIFO2 reader.
    pulse(cmd_upload);
    wait (upload_done);
    @(posedge clk);
    check(f2q.size() == WORDS, $sformatf("upload returned %0d words", f2q.size()));
    for (int a = 0; a < WORDS && a < f2q.size(); a++)
      check(f2q[a] == mem[a], $sformatf("uploaded word %0d", a));
    check(f2_max == F2_DEPTH, "FIFO2 throttling was exercised");
    check(state == CC_IDLE && mem_valid, "idle with data kept after upload");
    // Full-rate record: one write per cycle without stalls.
    stall_mem = 0;
    repeat (40) @(posedge clk);
    recorded.delete();
    n_writes = 0; first_wr_cyc = -1;
    pulse(cmd_record);
    wait (mem_valid);
    @(posedge clk);
    check(last_wr_cyc - first_wr_cyc == WORDS - 1,
          $sformatf("full rate record took %0d cycles", last_wr_cyc - first_wr_cyc + 1));
    for (int a = 0; a < WORDS; a++)
      check(mem[a] == recorded[a], $sformatf("second run word %0d", a));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
