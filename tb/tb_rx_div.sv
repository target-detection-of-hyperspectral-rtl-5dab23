// tb_rx_div: random and corner-case signed divisions, one per cycle,
// compared with the reference quotient (truncation toward zero, magnitude
// saturation, zero divisor); checks the latency is exactly LAT cycles and
// that the tag travels with its result.
module tb_rx_div;
  import rx_ref_pkg::*;
  localparam int LAT = 77;
  logic clk = 0, rst_n = 0;
  logic valid_i, valid_o;
  logic signed [63:0] n_i;
  logic signed [41:0] d_i;
  logic [7:0] tag_i, tag_o;
  logic signed [34:0] q_o;
  int checks = 0, failures = 0;
  longint en[$], ed[$];
  int     et[$], ecyc[$];
  int cyc = 0;

  rx_div #(.DIVD_W(64), .DEN_W(42), .Q_W(35), .TAG_W(8), .LAT(LAT)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  always @(negedge clk) if (rst_n && valid_o) begin
    longint n, d, exp;
    int t, c0;
    n = en.pop_front(); d = ed.pop_front(); t = et.pop_front(); c0 = ecyc.pop_front();
    exp = div_ref(n, d, 35);
    checks++;
    if (q_o != 35'(exp) || tag_o != 8'(t) || cyc - c0 != LAT) begin
      failures++;
      $display("FAIL n=%0d d=%0d q=%0d exp=%0d tag=%0d/%0d lat=%0d", n, d, q_o, exp, tag_o, t, cyc - c0);
    end
  end

  initial begin
    valid_i = 0; n_i = 0; d_i = 0; tag_i = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      valid_i = ($urandom_range(0, 3) != 0);
      case (k % 8)
        0: begin n_i = $signed({$urandom, $urandom}) >>> $urandom_range(0, 40); d_i = 42'($signed($urandom)) >>> $urandom_range(0, 20); end
        1: begin n_i = -64'sd1 <<< 63; d_i = 42'sd3; end
        2: begin n_i = 64'($signed($urandom)); d_i = 0; end
        3: begin n_i = -64'($urandom_range(0, 1000)); d_i = -42'($urandom_range(1, 50)); end
        4: begin n_i = 64'(k) <<< 20; d_i = 42'($urandom_range(1, 1 << 20)); end
        5: begin n_i = 64'($signed($urandom)); d_i = -42'sd1 <<< 41; end
        default: begin n_i = $signed({$urandom, $urandom}); d_i = $signed({10'd0, $urandom}) - 42'sd12345; end
      endcase
      tag_i = 8'(k);
      if (valid_i) begin
        en.push_back(n_i); ed.push_back(d_i); et.push_back(k % 256); ecyc.push_back(cyc);
      end
    end
    @(negedge clk) valid_i = 0;
    repeat (LAT + 5) @(posedge clk);
    checks++;
    if (en.size() != 0) begin failures++; $display("FAIL %0d results missing", en.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
