// rx_top_image_run: testbench building block that takes one rx_top, built
// for N bands and a W x H image, through one complete image. On `go` it
// generates a scene with four planted anomalies, computes the reference
// results, resets the detector and streams covariance, means and pixels at
// full rate while reading results with the output always ready. Checks:
// every result word against the reference model, the planted anomalies at
// the top of the list, no singular flag, and the cycle count against
// load + inversion + one pixel per N cycles + readout. When finished it
// raises `fin` and leaves its counts in `checks` and `failures`.
// The reference model keeps its state in packages, so only one instance
// may run at a time; the caller sequences them with `go`. The scene, seed
// and cycle bound are this testbench's own choices.
module rx_top_image_run #(
  parameter int N = 169,
  parameter int W = 64,
  parameter int H = 64
) (
  input  logic clk,
  input  logic go,
  output logic fin,
  output int   checks,
  output int   failures
);
  import rx_pkg::*;
  import rx_ref_pkg::*;
  import rx_host_pkg::*;
  localparam int P = W * H;
  localparam int XW = $clog2(W), YW = $clog2(H);
  localparam int RXW = ELEM_W + 2 * (DEV_W + $clog2(N));
  localparam int OW = RXW + XW + YW;
  localparam int PIPE = 1 + 77 + 6 + 2 + 2;
  logic rst_n = 0;
  logic host_wr_valid, host_wr_ready, host_rd_valid, host_rd_ready;
  logic [IN_W-1:0] host_wr_data;
  logic [OW-1:0] host_rd_data;
  logic busy, done, cov00_zero, singular, ev_swap, ev_stall;
  int got = 0, wi = 0, nw = 0;
  int cyc;

  rx_top #(.N(N), .IMG_W(W), .IMG_H(H)) dut (.*);

  initial begin checks = 0; failures = 0; fin = 0; end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL N=%0d: %s", N, msg); end
  endtask

  // word i of the host stream: covariance, means, pixels
  function automatic logic [IN_W-1:0] word(input int i);
    if (i < N * N) return IN_W'(cov[i / N][i % N]);
    i -= N * N;
    if (i < N) return IN_W'(mean[i]);
    i -= N;
    return IN_W'(pix[i / N][i % N]);
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (host_wr_valid && host_wr_ready) wi++;
    if (host_rd_valid && host_rd_ready) begin
      if (got < slist.size())
        chk(host_rd_data == {RXW'(slist[got].value), YW'(slist[got].y), XW'(slist[got].x)},
            $sformatf("entry %0d: %h exp value %0d at (%0d,%0d)", got, host_rd_data,
                      slist[got].value, slist[got].x, slist[got].y));
      else chk(0, "extra output");
      got++;
    end
  end
  always @(negedge clk) begin
    host_wr_valid = (wi < nw);
    host_wr_data  = (wi < nw) ? word(wi) : '0;
    host_rd_ready = 1'b1;
  end

  initial begin
    wait (go);
    gen_image(N, W, H, 4, 11);
    host_stats(N, P);
    expected(N, W, H, 0, 24, 20, 20, 48, 24);
    $display("N=%0d %0dx%0d reference ready: top score %0d at (%0d,%0d)", N, W, H,
             slist[0].value, slist[0].x, slist[0].y);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    nw = N * N + N + N * P;
    cyc = 0;
    while (!done) begin @(posedge clk); cyc++; end
    $display("N=%0d image: %0d cycles, singular %0d", N, cyc, singular);
    chk(cyc <= N * N + 2 * (N - 1) * (PIPE + N) + N + PIPE + N + N * P + 3 * N + 4 * N + 40,
        $sformatf("image took %0d cycles", cyc));
    repeat (10) @(posedge clk);
    chk(got == N, $sformatf("%0d results, expected %0d", got, N));
    for (int k = 0; k < 4; k++)
      chk(slist[k].x + W * slist[k].y inside {anom[0], anom[1], anom[2], anom[3]},
          $sformatf("rank %0d is not a planted anomaly", k));
    chk(!singular, "singular");
    fin = 1;
  end
endmodule
