// tb_rx_inverter: N = 8 bands, default shifts and latencies. Four matrices:
//   1 diagonally dominant symmetric (covariance-like)
//   2 the same with K(0,0) = 0 (row exchange at load)
//   3 a matrix whose row 1 becomes exactly zero in column 1 after the first
//     pivot (row exchange during forward elimination)
//   4 column 0 all zero (singular)
// Each result row is read back and compared bit for bit with the reference
// integer Gauss-Jordan; the number of row exchanges and the singular flag
// are compared too. For matrix 1 the product K * Kinv is also checked
// against 2^(ID+DIAG-OUT) * I in real arithmetic (independent of the
// integer model). The inversion time is checked against a bound of
// two elimination passes of (N + pipeline depth) per pivot plus the
// diagonal pass, and stalls must occur.
module tb_rx_inverter;
  import rx_pkg::*;
  import rx_ref_pkg::*;
  localparam int N = 8;
  localparam int IDS = 24, FS = 20, BS = 20, DS = 48, OS = 24;
  localparam int PIPE = 1 + 77 + 6 + 2 + 2;
  logic clk = 0, rst_n = 0;
  logic load_valid, load_ready, start, busy, done, singular_o, rd_en, swap_o, stall_o;
  elem_t load_data;
  logic [$clog2(N)-1:0] rd_row;
  logic [N-1:0][ELEM_W-1:0] rd_data;
  int checks = 0, failures = 0;
  longint K [N][N];
  int swaps, stalls;

  rx_inverter #(.N(N)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (swap_o)  swaps++;
    if (stall_o) stalls++;
  end

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

  task automatic run(input int kind);
    int cyc, bad;
    real s;
    // build the matrix
    for (int r = 0; r < N; r++)
      for (int c = r; c < N; c++) begin
        K[r][c] = (r == c) ? (1 << 20) + $urandom_range(0, 1 << 18)
                           : $signed($urandom_range(0, 1 << 16)) - (1 << 15);
        K[c][r] = K[r][c];
      end
    if (kind == 2) K[0][0] = 0;
    if (kind == 3) begin
      for (int c = 0; c < N; c++) K[1][c] = K[0][c];
      for (int c = 2; c < N; c++) K[1][c] += $urandom_range(1, 1000);
    end
    if (kind == 4) for (int r = 0; r < N; r++) K[r][0] = 0;
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) mA[r][c] = K[r][c];
    inv_ref(N, IDS, FS, BS, DS, OS);
    // load
    swaps = 0; stalls = 0;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        @(negedge clk);
        load_valid = 1; load_data = ELEM_W'(K[r][c]);
      end
    @(negedge clk) load_valid = 0; start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(posedge clk); cyc++; end
    $display("matrix %0d: %0d cycles, %0d swaps, %0d stall cycles, singular %0d", kind, cyc,
             swaps, stalls, singular_o);
    chk(cyc <= 2 * (N - 1) * (PIPE + N) + N + PIPE + 10, $sformatf("took %0d cycles", cyc));
    chk(stalls > 0, "no stall");
    chk(swaps == n_swaps, $sformatf("swaps %0d exp %0d", swaps, n_swaps));
    chk(singular_o == is_singular, "singular flag");
    // read back
    bad = 0;
    for (int r = 0; r < N; r++) begin
      @(negedge clk) rd_en = 1; rd_row = r[$clog2(N)-1:0];
      @(negedge clk) rd_en = 0;
      for (int c = 0; c < N; c++) begin
        checks++;
        if (elem_t'(rd_data[c]) != ELEM_W'(mI[r][c])) begin
          failures++;
          if (bad++ < 5) $display("FAIL m%0d [%0d][%0d] = %0d exp %0d", kind, r, c,
                                  elem_t'(rd_data[c]), mI[r][c]);
        end
      end
    end
    if (kind == 1) begin
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          s = 0;
          for (int k = 0; k < N; k++) s += real'(K[r][k]) * real'(mI[k][c]);
          s = s / (2.0 ** (IDS + DS - OS));
          chk((s - (r == c ? 1.0 : 0.0)) < 1e-3 && (s - (r == c ? 1.0 : 0.0)) > -1e-3,
              $sformatf("K*Kinv[%0d][%0d] = %f", r, c, s));
        end
    end
  endtask

  initial begin
    load_valid = 0; load_data = 0; start = 0; rd_en = 0; rd_row = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(1);
    run(2);
    run(3);
    run(4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
