// tb_cmd_decoder: self-checking test of the command decoder.
// Frames are sent byte by byte on the MAC receive client interface, with
// random idle cycles inside, and closed by rx_good_frame or rx_bad_frame.
// Checked: record and upload commands to the local and to the broadcast
// address give exactly one pulse of the right kind one cycle after
// rx_good_frame and latch the sender as host_mac; frames with a bad FCS,
// another destination, another EtherType, an unknown opcode or too few
// bytes give no pulse and leave host_mac alone.
module tb_cmd_decoder;
  import recorder_pkg::*;
  localparam mac_addr_t LOCAL = 48'h02_00_00_00_00_01;

  logic      clk = 0, rst_n = 0;
  logic [7:0] rx_data = '0;
  logic      rx_data_valid = 0, rx_good_frame = 0, rx_bad_frame = 0;
  logic      cmd_record, cmd_upload, host_valid;
  mac_addr_t host_mac;

  always #4 clk = ~clk;

  cmd_decoder #(.LOCAL_MAC(LOCAL)) dut (.*);

  int checks = 0, failures = 0;
  int n_rec = 0, n_upl = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (cmd_record) n_rec++;
    if (cmd_upload) n_upl++;
  end

  task automatic send(input mac_addr_t dst, input mac_addr_t src,
                      input logic [15:0] etype, input logic [7:0] op,
                      input int len, input bit good);
    logic [7:0] b [$];
    for (int i = 5; i >= 0; i--) b.push_back(dst[8*i +: 8]);
    for (int i = 5; i >= 0; i--) b.push_back(src[8*i +: 8]);
    b.push_back(etype[15:8]);
    b.push_back(etype[7:0]);
    b.push_back(op);
    while (b.size() < 60) b.push_back(8'($urandom));
    for (int i = 0; i < len; i++) begin
      @(negedge clk);
      rx_data = b[i]; rx_data_valid = 1;
    end
    @(negedge clk);
    rx_data_valid = 0;
    rx_good_frame = good; rx_bad_frame = !good;
    @(negedge clk);
    rx_good_frame = 0; rx_bad_frame = 0;
    repeat (4) @(negedge clk);
  endtask

  task automatic expect_counts(input int rec, input int upl, input string what);
    check(n_rec == rec && n_upl == upl,
          $sformatf("%s: record %0d upload %0d, expected %0d %0d", what, n_rec, n_upl, rec, upl));
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
    check(!host_valid, "no host before any command");
    send(LOCAL, 48'h00_11_22_33_44_55, REC_ETHERTYPE, CMD_RECORD, 60, 1);
    expect_counts(1, 0, "record to local address");
    check(host_valid && host_mac == 48'h00_11_22_33_44_55, "host learned");
    send(BROADCAST_MAC, 48'h00_AA_BB_CC_DD_EE, REC_ETHERTYPE, CMD_UPLOAD, 60, 1);
    expect_counts(1, 1, "upload to broadcast");
    check(host_mac == 48'h00_AA_BB_CC_DD_EE, "host follows the last sender");
    send(LOCAL, 48'h00_00_00_00_00_01, REC_ETHERTYPE, CMD_RECORD, 60, 0);
    expect_counts(1, 1, "bad frame ignored");
    send(48'h02_00_00_00_00_02, 48'h00_00_00_00_00_02, REC_ETHERTYPE, CMD_RECORD, 60, 1);
    expect_counts(1, 1, "other destination ignored");
    send(LOCAL, 48'h00_00_00_00_00_03, 16'h0800, CMD_UPLOAD, 60, 1);
    expect_counts(1, 1, "other EtherType ignored");
    send(LOCAL, 48'h00_00_00_00_00_04, REC_ETHERTYPE, 8'h7F, 60, 1);
    expect_counts(1, 1, "unknown opcode ignored");
    send(LOCAL, 48'h00_00_00_00_00_05, REC_ETHERTYPE, CMD_UPLOAD, 14, 1);
    expect_counts(1, 1, "short frame ignored");
    check(host_mac == 48'h00_AA_BB_CC_DD_EE, "ignored frames leave host_mac");
    // Pulse timing: one cycle after rx_good_frame.
    fork
      send(LOCAL, 48'h00_11_22_33_44_66, REC_ETHERTYPE, CMD_UPLOAD, 15, 1);
      begin
        @(posedge rx_good_frame);
        @(posedge clk); #1;
        check(cmd_upload && !cmd_record, "pulse in the cycle after good_frame");
        @(posedge clk); #1;
        check(!cmd_upload, "pulse lasts one cycle");
      end
    join
    expect_counts(1, 2, "minimum-length command");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
