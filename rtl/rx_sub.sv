// rx_sub: two-stage pipelined subtractor with a pass mode.
//
// r = sub ? a - b : b, truncated to W bits, two cycles after the operands.
// In the matrix inverter the elimination phases use a - b
// (row_j - pivot_row * factor); the final diagonal scaling uses the pass
// mode (the scaled row replaces the old one). Operands are registered in
// the first stage, the result in the second. No valid signal.
module rx_sub #(
  parameter int W = 42
) (
  input  logic                clk,
  input  logic                sub,
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic signed [W-1:0] r
);
  logic signed [W-1:0] ar, br;
  logic                sr;

  always_ff @(posedge clk) begin
    ar <= a;
    br <= b;
    sr <= sub;
    r  <= sr ? ar - br : br;
  end
endmodule
