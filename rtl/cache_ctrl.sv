// cache_ctrl: the recorder's DDR3 cache control. It fills the DDR3 memory
// with one continuous run of 64-bit words from FIFO1 and, on command, reads
// the run back in the same order into FIFO2 for transmission to the PC.
//
// The original recorder states what this logic does (cache the 64-bit data
// in the DDR3 memory until it is full, then move it to FIFO2 under the
// control of the memory controller when the PC asks for it) but not how;
// the sequencing below is this design's own.
//
// It talks to the memory through a simplified application interface in the
// style of the vendor-generated DDR3 controller: one 64-bit word per
// command, word addresses, app_rdy/app_wdf_rdy as stall signals and read
// data returned in order with app_rd_data_valid and no back-pressure.
//
// Operation (clk is the memory user-interface clock):
//   IDLE    FIFO1 is drained and its contents discarded. A record command
//           (cmd_record pulse) is held until the acquisition side has been
//           stopped and FIFO1 empty for QUIET_CYCLES cycles, so no stale
//           words enter the new run. Then capture_en rises and the state
//           becomes RECORD. An upload command (cmd_upload) is taken only
//           when a complete run is stored (mem_valid).
//   RECORD  Every cycle in which FIFO1 has a word and the memory is ready,
//           one write is issued (app_en and app_wdf_wren together) to the
//           next address, starting at 0. After address 2**ADDR_W-1,
//           capture_en falls, mem_valid rises and the state returns to IDLE.
//   UPLOAD  Reads are issued to addresses 0 .. 2**ADDR_W-1 whenever the
//           memory is ready and FIFO2 has room for the word and for every
//           read still in flight (f2_wcount + outstanding < 2**F2_AW); each
//           returned word is written straight into FIFO2. When the last
//           word has returned the state goes back to IDLE.
// Commands that arrive in another state are ignored. init_calib_complete
// low blocks the start of both operations.
module cache_ctrl
  import recorder_pkg::*;
#(
  parameter int unsigned ADDR_W       = 28,  // 2 GB of 64-bit words
  parameter int unsigned F2_AW        = 9,   // FIFO2 holds 2**F2_AW words
  parameter int unsigned QUIET_CYCLES = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              init_calib_complete,
  input  logic              cmd_record,
  input  logic              cmd_upload,
  // acquisition side
  output logic              capture_en,
  input  logic              capture_active,   // from the capture gate, unsynchronised
  // FIFO1 read side
  input  logic              f1_empty,
  input  logic [63:0]       f1_dout,
  output logic              f1_rd_en,
  // DDR3 controller application interface
  output logic              app_en,
  output logic [2:0]        app_cmd,
  output logic [ADDR_W-1:0] app_addr,
  input  logic              app_rdy,
  output logic [63:0]       app_wdf_data,
  output logic              app_wdf_wren,
  input  logic              app_wdf_rdy,
  input  logic [63:0]       app_rd_data,
  input  logic              app_rd_data_valid,
  // FIFO2 write side
  output logic              f2_wr_en,
  output logic [63:0]       f2_din,
  input  logic [F2_AW:0]    f2_wcount,
  // status
  output cc_state_e         state,
  output logic              mem_valid,
  output logic              upload_done
);
  localparam int unsigned F2_DEPTH = 1 << F2_AW;
  localparam int unsigned QW       = $clog2(QUIET_CYCLES + 1);

  logic              active_sync;
  logic [QW-1:0]     quiet_cnt;
  logic              quiet;
  logic              record_pending;
  logic [ADDR_W-1:0] addr;
  logic              all_issued;
  logic [F2_AW:0]    outstanding;
  logic              do_write, do_read;
  logic              f2_space;

  sync_bits #(.WIDTH(1)) u_sync_active (
    .clk(clk), .rst_n(rst_n), .d(capture_active), .q(active_sync)
  );

  assign quiet    = (quiet_cnt == QW'(QUIET_CYCLES));
  assign f2_space = ({1'b0, f2_wcount} + {1'b0, outstanding}) < (F2_AW + 2)'(F2_DEPTH);
  assign do_write = (state == CC_RECORD) && !f1_empty && app_rdy && app_wdf_rdy;
  assign do_read  = (state == CC_UPLOAD) && !all_issued && app_rdy && f2_space;

  // Memory and FIFO strobes.
  assign app_en       = do_write || do_read;
  assign app_cmd      = do_read ? MEM_READ : MEM_WRITE;
  assign app_addr     = addr;
  assign app_wdf_wren = do_write;
  assign app_wdf_data = f1_dout;
  assign f1_rd_en     = do_write || ((state != CC_RECORD) && !f1_empty);
  assign f2_wr_en     = app_rd_data_valid;
  assign f2_din       = app_rd_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= CC_IDLE;
      capture_en     <= 1'b0;
      mem_valid      <= 1'b0;
      record_pending <= 1'b0;
      quiet_cnt      <= '0;
      addr           <= '0;
      all_issued     <= 1'b0;
      outstanding    <= '0;
      upload_done    <= 1'b0;
    end else begin
      upload_done <= 1'b0;

      // Acquisition-quiet detector.
      if (active_sync || !f1_empty || capture_en) quiet_cnt <= '0;
      else if (!quiet)                            quiet_cnt <= quiet_cnt + 1'b1;

      // Reads in flight.
      outstanding <= outstanding + (F2_AW + 1)'(do_read)
                                 - (F2_AW + 1)'(app_rd_data_valid);

      unique case (state)
        CC_IDLE: begin
          if (cmd_record) record_pending <= 1'b1;
          if ((record_pending || cmd_record) && quiet && init_calib_complete) begin
            record_pending <= 1'b0;
            mem_valid      <= 1'b0;
            capture_en     <= 1'b1;
            addr           <= '0;
            state          <= CC_RECORD;
          end else if (cmd_upload && !cmd_record && !record_pending && mem_valid &&
                       init_calib_complete) begin
            addr       <= '0;
            all_issued <= 1'b0;
            state      <= CC_UPLOAD;
          end
        end
        CC_RECORD: begin
          if (do_write) begin
            addr <= addr + 1'b1;
            if (addr == '1) begin
              capture_en <= 1'b0;
              mem_valid  <= 1'b1;
              state      <= CC_IDLE;
            end
          end
        end
        CC_UPLOAD: begin
          if (do_read) begin
            addr <= addr + 1'b1;
            if (addr == '1) all_issued <= 1'b1;
          end
          if (all_issued && outstanding == '0) begin
            upload_done <= 1'b1;
            state       <= CC_IDLE;
          end
        end
        default: state <= CC_IDLE;
      endcase
    end
  end

  // Rules of the memory interface and of FIFO2.
  a_rd_only_when_expected: assert property (@(posedge clk) disable iff (!rst_n)
      app_rd_data_valid |-> outstanding != '0);
  a_f2_never_overrun: assert property (@(posedge clk) disable iff (!rst_n)
      ({1'b0, f2_wcount} + {1'b0, outstanding}) <= (F2_AW + 2)'(F2_DEPTH));
endmodule
