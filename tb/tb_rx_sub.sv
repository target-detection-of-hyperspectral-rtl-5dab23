// tb_rx_sub: random operands in subtract and pass modes, one per cycle;
// checks r = a - b (wrapping to W bits) or r = b, two cycles later.
module tb_rx_sub;
  localparam int W = 42;
  logic clk = 0;
  logic sub;
  logic signed [W-1:0] a, b, r;
  int checks = 0, failures = 0;
  logic signed [W-1:0] hist [$];

  rx_sub #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 0; b = 0; sub = 0;
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      if (k >= 2) begin
        checks++;
        if (r != hist[k - 2]) begin
          failures++;
          $display("FAIL k=%0d r=%0d exp=%0d", k, r, hist[k - 2]);
        end
      end
      a = $signed({$urandom, $urandom});
      b = $signed({$urandom, $urandom});
      sub = ($urandom_range(0, 3) != 0);
      hist.push_back(sub ? W'(a - b) : b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
