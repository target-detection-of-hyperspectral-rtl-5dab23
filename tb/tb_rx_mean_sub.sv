// tb_rx_mean_sub: loads N = 5 band means, streams 40 pixels with random
// input gaps and output back-pressure, and checks every deviation and its
// band index; then clears and repeats with new means.
module tb_rx_mean_sub;
  import rx_pkg::*;
  localparam int N = 5;
  logic clk = 0, rst_n = 0, clear;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [PIX_W-1:0] in_data;
  dev_t out_data;
  logic [$clog2(N)-1:0] out_band;
  int checks = 0, failures = 0;
  int exp_d[$], exp_b[$];
  int means[N];
  int nout = 0;

  rx_mean_sub #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      int d, bb;
      d = exp_d.pop_front(); bb = exp_b.pop_front();
      checks++; nout++;
      if (out_data != DEV_W'(d) || out_band != bb) begin
        failures++;
        $display("FAIL got %0d band %0d exp %0d band %0d", out_data, out_band, d, bb);
      end
    end
    out_ready <= ($urandom_range(0, 3) != 0);
  end

  task automatic send(input int v);
    @(negedge clk);
    while ($urandom_range(0, 4) == 0) begin in_valid = 0; @(negedge clk); end
    in_valid = 1; in_data = PIX_W'(v);
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk) in_valid = 0;
  endtask

  initial begin
    in_valid = 0; in_data = 0; clear = 0; out_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int img = 0; img < 2; img++) begin
      for (int b = 0; b < N; b++) begin
        means[b] = $urandom_range(0, 65535);
        send(means[b]);
      end
      for (int p = 0; p < 40; p++)
        for (int b = 0; b < N; b++) begin
          int v;
          v = (p % 7 == 0) ? ((p % 2) ? 65535 : 0) : $urandom_range(0, 65535);
          exp_d.push_back(v - means[b]); exp_b.push_back(b);
          send(v);
        end
      while (exp_d.size() != 0) @(posedge clk);
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
    end
    checks++;
    if (nout != 2 * 40 * N) begin failures++; $display("FAIL count %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
