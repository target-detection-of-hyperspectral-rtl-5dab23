// tb_rx_matmul: N = 6 bands, 4 x 3 image. The testbench holds a random
// K^-1 (full 42-bit range) in a one-cycle-latency memory model and streams
// random deviations (extreme values included). Every score is compared with
// the reference d^T K^-1 d, with its (x, y) and last flag. Pass 1 streams
// back-to-back with the result always accepted and checks the rate of one
// pixel per N cycles; pass 2 (after clear) adds input gaps and result
// back-pressure.
module tb_rx_matmul;
  import rx_pkg::*;
  import rx_ref_pkg::*;
  localparam int N = 6, IW = 4, IH = 3, P = IW * IH;
  localparam int RXW = ELEM_W + 2 * (DEV_W + $clog2(N));
  logic clk = 0, rst_n = 0, clear;
  logic dev_valid, dev_ready, inv_rd_en, res_valid, res_last, res_ready;
  dev_t dev_data;
  logic [$clog2(N)-1:0] inv_rd_row;
  logic [N-1:0][ELEM_W-1:0] inv_rd_data;
  logic signed [RXW-1:0] res_value;
  logic [1:0] res_x, res_y;
  int checks = 0, failures = 0;
  wide_t exp_rx[$];
  int nres;
  longint kinv [N][N];
  bit throttle;

  rx_matmul #(.N(N), .IMG_W(IW), .IMG_H(IH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_ff @(posedge clk)
    if (inv_rd_en)
      for (int c = 0; c < N; c++) inv_rd_data[c] <= ELEM_W'(kinv[inv_rd_row][c]);

  always @(posedge clk) if (rst_n) begin
    if (res_valid && res_ready) begin
      wide_t e;
      e = exp_rx.pop_front();
      checks++;
      if (res_value != RXW'(e) || res_x != 2'(nres % IW) || res_y != 2'(nres / IW) ||
          res_last != (nres == P - 1)) begin
        failures++;
        $display("FAIL pixel %0d: %0d (%0d,%0d,%0d) exp %0d", nres, res_value, res_x, res_y,
                 res_last, e);
      end
      nres++;
    end
    res_ready <= throttle ? ($urandom_range(0, 3) == 0) : 1'b1;
  end

  task automatic pass(input bit thr);
    longint d[MAXN];
    int t0, t1;
    throttle = thr;
    nres = 0;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        kinv[r][c] = wrap(wide_t'($signed({$urandom, $urandom})), ELEM_W);
        mI[r][c] = kinv[r][c];
      end
    t0 = $time;
    for (int p = 0; p < P; p++) begin
      for (int b = 0; b < N; b++)
        d[b] = (p == 3) ? ((b % 2) ? 65535 : -65535) : $signed($urandom_range(0, 131070)) - 65535;
      exp_rx.push_back(rx_ref(N, d));
      for (int b = 0; b < N; b++) begin
        @(negedge clk);
        if (thr) while ($urandom_range(0, 3) == 0) begin dev_valid = 0; @(negedge clk); end
        dev_valid = 1; dev_data = DEV_W'(d[b]);
        @(posedge clk);
        while (!dev_ready) @(posedge clk);
      end
    end
    @(negedge clk) dev_valid = 0;
    while (nres < P) @(posedge clk);
    t1 = $time;
    if (!thr) begin
      checks++;
      // one pixel per N cycles plus the two MAC latencies
      if ((t1 - t0) / 10 > P * N + 2 * N + 6) begin
        failures++;
        $display("FAIL rate: %0d cycles for %0d pixels", (t1 - t0) / 10, P);
      end
    end
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
  endtask

  initial begin
    dev_valid = 0; dev_data = 0; clear = 0; res_ready = 1; throttle = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    pass(0);
    pass(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
