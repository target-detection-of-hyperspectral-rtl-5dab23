// tb_rx_fifo: random push/pop traffic against a queue model; checks data
// order, full/empty/count flags, and that pushes on full / pops on empty
// are ignored (DEPTH 5, not a power of two).
module tb_rx_fifo;
  localparam int W = 16, D = 5;
  logic clk = 0, rst_n = 0;
  logic push, pop, full, empty;
  logic [W-1:0] wr_data, rd_data;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];

  rx_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    push = 0; pop = 0; wr_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      chk(empty == (q.size() == 0), "empty flag");
      chk(full == (q.size() == D), "full flag");
      chk(count == q.size(), "count");
      if (q.size() > 0) chk(rd_data == q[0], "head data");
      // bias toward filling in the first half, draining in the second
      push = ($urandom_range(0, 99) < ((cyc / 300) % 2 ? 30 : 70)) && !full;
      pop  = ($urandom_range(0, 99) < ((cyc / 300) % 2 ? 70 : 30)) && !empty;
      wr_data = W'($urandom);
      @(posedge clk);
      if (pop)  void'(q.pop_front());
      if (push) q.push_back(wr_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
