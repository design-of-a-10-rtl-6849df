// sync_bits: two-flip-flop synchroniser for level signals crossing into the
// clock domain of clk. Each bit is synchronised on its own, so a multi-bit
// value must be Gray-coded or held stable while it crosses. Output lags the
// input by two clk edges. Reset value is 0.
module sync_bits #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
