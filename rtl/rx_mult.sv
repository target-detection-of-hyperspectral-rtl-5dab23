// rx_mult: pipelined signed multiplier, one product per cycle.
//
// p = a * b, full precision (A_W + B_W bits), LAT cycles after the operands
// are applied. The product is formed from registered operands and then
// passed through LAT-1 further registers so a synthesis tool can retime it
// into the DSP block pipeline (the design uses 42 x 35-bit operands,
// which costs four DSP48 slices, with a latency of 6). No valid signal:
// callers track valid data alongside.
module rx_mult #(
  parameter int A_W = 42,
  parameter int B_W = 35,
  parameter int LAT = 6
) (
  input  logic                      clk,
  input  logic signed [A_W-1:0]     a,
  input  logic signed [B_W-1:0]     b,
  output logic signed [A_W+B_W-1:0] p
);
  initial begin
    assert (LAT >= 2) else $fatal(1, "rx_mult: LAT must be at least 2");
  end

  logic signed [A_W-1:0]     ar;
  logic signed [B_W-1:0]     br;
  logic signed [A_W+B_W-1:0] pipe [LAT-1];

  always_ff @(posedge clk) begin
    ar      <= a;
    br      <= b;
    pipe[0] <= ar * br;
    for (int k = 1; k < LAT-1; k++) pipe[k] <= pipe[k-1];
  end

  assign p = pipe[LAT-2];
endmodule
