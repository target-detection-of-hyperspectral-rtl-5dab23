// tb_rx_mult: random and extreme 42 x 35-bit signed products, one per cycle;
// checks each product and that it appears exactly LAT = 6 cycles later.
module tb_rx_mult;
  localparam int LAT = 6;
  logic clk = 0;
  logic signed [41:0] a;
  logic signed [34:0] b;
  logic signed [76:0] p;
  int checks = 0, failures = 0;
  logic signed [76:0] hist [$];

  rx_mult #(.A_W(42), .B_W(35), .LAT(LAT)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 0; b = 0;
    for (int k = 0; k < 600; k++) begin
      @(negedge clk);
      if (k >= LAT) begin
        checks++;
        if (p != hist[k - LAT]) begin
          failures++;
          $display("FAIL k=%0d p=%0d exp=%0d", k, p, hist[k - LAT]);
        end
      end
      case (k % 5)
        0: begin a = -42'sd1 <<< 41; b = -35'sd1 <<< 34; end
        1: begin a = (42'sd1 <<< 41) - 1; b = -35'sd1 <<< 34; end
        default: begin a = $signed({$urandom, $urandom}); b = $signed({$urandom, $urandom}); end
      endcase
      hist.push_back(77'(a) * 77'(b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
