// pulse_sync: carries single-cycle pulses from clock domain src_clk to
// dst_clk. Each source pulse flips a toggle flip-flop; the toggle is
// synchronised with two flip-flops and an edge on it gives one dst_clk
// pulse, three to four dst_clk edges after the source pulse. Source pulses
// must be at least three dst_clk periods apart or they merge.
module pulse_sync (
  input  logic src_clk,
  input  logic src_rst_n,
  input  logic src_pulse,
  input  logic dst_clk,
  input  logic dst_rst_n,
  output logic dst_pulse
);
  logic toggle;
  logic toggle_sync;
  logic toggle_d;

  always_ff @(posedge src_clk or negedge src_rst_n) begin
    if (!src_rst_n)     toggle <= 1'b0;
    else if (src_pulse) toggle <= ~toggle;
  end

  sync_bits #(.WIDTH(1)) u_sync (
    .clk(dst_clk), .rst_n(dst_rst_n), .d(toggle), .q(toggle_sync)
  );

  always_ff @(posedge dst_clk or negedge dst_rst_n) begin
    if (!dst_rst_n) toggle_d <= 1'b0;
    else            toggle_d <= toggle_sync;
  end

  assign dst_pulse = toggle_sync ^ toggle_d;
endmodule
