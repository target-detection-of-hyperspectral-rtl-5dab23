// tb_rx_control: the detector without its FIFOs, N = 6 bands, 4 x 4 image.
// Two images are streamed with random input gaps and output back-pressure:
// a generated image with two planted anomalies, then an image whose
// covariance word K(0,0) is zero. The scored list (top N of 16 pixels,
// so the sorter must drop entries) is compared word for word with the
// reference model; the planted anomalies must rank first; cov00_zero, the
// row exchange, pipeline stalls and back-pressure must each be seen.
module tb_rx_control;
  import rx_pkg::*;
  import rx_ref_pkg::*;
  import rx_host_pkg::*;
  localparam int N = 6, W = 4, H = 4, P = W * H;
  localparam int RXW = ELEM_W + 2 * (DEV_W + $clog2(N));
  localparam int OW = RXW + 4;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_pop, out_push, out_full;
  logic [IN_W-1:0] in_data;
  logic [OW-1:0] out_data;
  logic busy, done, cov00_zero, singular, ev_swap, ev_stall;
  int checks = 0, failures = 0;
  int n_swap = 0, n_stall = 0, n_full = 0, n_gap = 0, n_zero = 0;
  logic [IN_W-1:0] words[$];
  int got;

  rx_control #(.N(N), .IMG_W(W), .IMG_H(H)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // input stream: a word stays offered until popped; random gaps
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_pop) void'(words.pop_front());
    if (ev_swap) n_swap++;
    if (ev_stall) n_stall++;
    if (out_full) n_full++;
  end
  always @(negedge clk) begin
    in_valid = (words.size() > 0) && ($urandom_range(0, 5) != 0);
    if (words.size() > 0 && !in_valid) n_gap++;
    in_data  = (words.size() > 0) ? words[0] : '0;
    out_full = ($urandom_range(0, 2) == 0);
  end

  always @(posedge clk) if (rst_n && out_push) begin
    if (got < slist.size()) begin
      chk(out_data == {RXW'(slist[got].value), 2'(slist[got].y), 2'(slist[got].x)},
          $sformatf("entry %0d: %h exp value %0d at (%0d,%0d)", got, out_data,
                    slist[got].value, slist[got].x, slist[got].y));
    end else chk(0, "extra output");
    got++;
  end

  task automatic image(input bit zero00);
    gen_image(N, W, H, 2, zero00 ? 77 : 5);
    host_stats(N, P);
    if (zero00) cov[0][0] = 0;
    expected(N, W, H, 0, 24, 20, 20, 48, 24);
    got = 0;
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) words.push_back(IN_W'(cov[r][c]));
    for (int b = 0; b < N; b++) words.push_back(IN_W'(mean[b]));
    for (int p = 0; p < P; p++) for (int b = 0; b < N; b++) words.push_back(IN_W'(pix[p][b]));
    @(posedge clk);
    while (!done || words.size() != 0) begin
      @(posedge clk);
      if (cov00_zero) n_zero++;
    end
    chk(got == N, $sformatf("%0d results, expected %0d", got, N));
    if (!zero00)
      for (int k = 0; k < 2; k++)
        chk(slist[k].x + W * slist[k].y == anom[0] || slist[k].x + W * slist[k].y == anom[1],
            $sformatf("rank %0d is not a planted anomaly", k));
    chk(!singular, "singular");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    image(0);
    image(1);
    $display("events: swap %0d stall %0d out_full %0d in_gap %0d cov00_zero %0d", n_swap,
             n_stall, n_full, n_gap, n_zero);
    chk(n_swap > 0, "no row exchange");
    chk(n_stall > 0, "no stall");
    chk(n_full > 0, "no output back-pressure");
    chk(n_gap > 0, "no input gap");
    chk(n_zero > 0, "cov00_zero never set");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
