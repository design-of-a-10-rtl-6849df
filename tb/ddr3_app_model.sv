// ddr3_app_model: behavioural model, for testbenches only, of a DDR3
// memory controller and its memory as seen from the controller's simplified
// application interface: one 64-bit word per command, word addresses.
// A write is taken in a cycle where app_en, app_rdy, app_wdf_wren and
// app_wdf_rdy are all high; a read taken with app_en and app_rdy returns its
// word LAT cycles later with app_rd_data_valid, in order. app_rdy and
// app_wdf_rdy drop at random (about one cycle in STALL_IN) to imitate
// refresh and bank conflicts, and stay low while hold_off is high.
// init_calib_complete rises CAL_CYCLES after reset.
module ddr3_app_model #(
  parameter int unsigned ADDR_W     = 10,
  parameter int unsigned LAT        = 6,
  parameter int unsigned STALL_IN   = 8,
  parameter int unsigned CAL_CYCLES = 20
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              hold_off,
  output logic              init_calib_complete,
  input  logic              app_en,
  input  logic [2:0]        app_cmd,
  input  logic [ADDR_W-1:0] app_addr,
  output logic              app_rdy,
  input  logic [63:0]       app_wdf_data,
  input  logic              app_wdf_wren,
  output logic              app_wdf_rdy,
  output logic [63:0]       app_rd_data,
  output logic              app_rd_data_valid
);
  logic [63:0]    mem [1 << ADDR_W];
  logic [LAT-1:0] v;
  logic [63:0]    d [LAT];
  int             cal = 0;

  assign app_rd_data_valid = v[LAT-1];
  assign app_rd_data       = d[LAT-1];

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v   <= '0;
      cal <= 0;
      init_calib_complete <= 1'b0;
      app_rdy     <= 1'b0;
      app_wdf_rdy <= 1'b0;
    end else begin
      if (cal < int'(CAL_CYCLES)) cal <= cal + 1;
      init_calib_complete <= (cal >= int'(CAL_CYCLES));
      if (app_en && app_rdy && app_cmd == 3'b000 && app_wdf_wren && app_wdf_rdy)
        mem[app_addr] <= app_wdf_data;
      for (int i = int'(LAT) - 1; i > 0; i--) begin
        v[i] <= v[i-1];
        d[i] <= d[i-1];
      end
      v[0] <= app_en && app_rdy && (app_cmd == 3'b001);
      d[0] <= mem[app_addr];
      app_rdy     <= !hold_off && ($urandom_range(1, STALL_IN) != 1);
      app_wdf_rdy <= !hold_off && ($urandom_range(1, STALL_IN) != 1);
    end
  end
endmodule
