// tb_rx_top: end-to-end run of the detector with its host FIFOs at reduced
// size (N = 12 bands, 8 x 8 image, 4-word output FIFO). The host writes
// covariance, means and pixels as fast as the input FIFO takes them, and
// reads results at random. Image 1 is a generated scene with three planted
// anomalies, image 2 has a zero K(0,0). The results must match the reference
// model word for word, the planted anomalies must rank first, and image 1
// must finish within the expected number of cycles (load N*N, inversion,
// one pixel per N cycles, list readout). Mechanisms that must each occur:
// input FIFO full (host stalled during inversion), output FIFO full, row
// exchange in the inverter, inverter stalls, sorter dropping scores
// (more pixels than list entries), cov00_zero.
module tb_rx_top;
  import rx_pkg::*;
  import rx_ref_pkg::*;
  import rx_host_pkg::*;
  localparam int N = 12, W = 8, H = 8, P = W * H;
  localparam int RXW = ELEM_W + 2 * (DEV_W + $clog2(N));
  localparam int OW = RXW + 6;
  localparam int PIPE = 1 + 77 + 6 + 2 + 2;
  logic clk = 0, rst_n = 0;
  logic host_wr_valid, host_wr_ready, host_rd_valid, host_rd_ready;
  logic [IN_W-1:0] host_wr_data;
  logic [OW-1:0] host_rd_data;
  logic busy, done, cov00_zero, singular, ev_swap, ev_stall;
  int checks = 0, failures = 0;
  int n_swap = 0, n_stall = 0, n_infull = 0, n_outfull = 0, n_zero = 0, n_drop = 0;
  logic [IN_W-1:0] words[$];
  int got;
  bit slow_read;

  rx_top #(.N(N), .IMG_W(W), .IMG_H(H), .OUT_DEPTH(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (host_wr_valid && host_wr_ready) void'(words.pop_front());
    if (host_wr_valid && !host_wr_ready) n_infull++;
    if (dut.of_full) n_outfull++;
    if (ev_swap) n_swap++;
    if (ev_stall) n_stall++;
    if (cov00_zero) n_zero++;
    if (host_rd_valid && host_rd_ready) begin
      if (got < slist.size())
        chk(host_rd_data == {RXW'(slist[got].value), 3'(slist[got].y), 3'(slist[got].x)},
            $sformatf("entry %0d: %h exp value %0d at (%0d,%0d)", got, host_rd_data,
                      slist[got].value, slist[got].x, slist[got].y));
      else chk(0, "extra output");
      got++;
    end
  end
  always @(negedge clk) begin
    host_wr_valid = (words.size() > 0);
    host_wr_data  = (words.size() > 0) ? words[0] : '0;
    host_rd_ready = slow_read ? ($urandom_range(0, 7) == 0) : 1'b1;
  end

  task automatic image(input bit zero00);
    int t0, cyc;
    gen_image(N, W, H, 3, zero00 ? 99 : 3);
    host_stats(N, P);
    if (zero00) cov[0][0] = 0;
    expected(N, W, H, 0, 24, 20, 20, 48, 24);
    n_drop += P - slist.size();
    got = 0;
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) words.push_back(IN_W'(cov[r][c]));
    for (int b = 0; b < N; b++) words.push_back(IN_W'(mean[b]));
    for (int p = 0; p < P; p++) for (int b = 0; b < N; b++) words.push_back(IN_W'(pix[p][b]));
    t0 = $time;
    @(posedge clk);
    while (!done || words.size() != 0) @(posedge clk);
    cyc = ($time - t0) / 10;
    $display("image %0d: %0d cycles", zero00 ? 2 : 1, cyc);
    if (!zero00)
      chk(cyc <= N * N + 2 * (N - 1) * (PIPE + N) + N + PIPE + N + N * P + 3 * N + 4 * N + 40,
          $sformatf("image took %0d cycles", cyc));
    while (got < N) @(posedge clk);
    repeat (5) @(posedge clk);
    chk(got == N, $sformatf("%0d results, expected %0d", got, N));
    if (!zero00)
      for (int k = 0; k < 3; k++)
        chk(slist[k].x + W * slist[k].y inside {anom[0], anom[1], anom[2]},
            $sformatf("rank %0d is not a planted anomaly", k));
    chk(!singular, "singular");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    slow_read = 0;
    image(0);
    slow_read = 1;
    image(1);
    $display("events: in_full %0d out_full %0d swap %0d stall %0d dropped %0d cov00_zero %0d",
             n_infull, n_outfull, n_swap, n_stall, n_drop, n_zero);
    chk(n_infull > 0, "input FIFO never full");
    chk(n_outfull > 0, "output FIFO never full");
    chk(n_swap > 0, "no row exchange");
    chk(n_stall > 0, "no inverter stall");
    chk(n_drop > 0, "sorter never dropped a score");
    chk(n_zero > 0, "cov00_zero never set");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
