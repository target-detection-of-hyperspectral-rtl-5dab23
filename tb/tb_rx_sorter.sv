// tb_rx_sorter: fills an 8-entry list with 30 scores (many ties, back-to-back
// and with gaps), then with only 5 scores after a clear; compares the
// emitted list (highest first, ties in arrival order) with the reference,
// under random output back-pressure. Also checks a new score is accepted no
// more than DEPTH+1 cycles after the previous one (one insertion per
// list sweep).
module tb_rx_sorter;
  import rx_ref_pkg::*;
  localparam int DEPTH = 8, VW = 20, XW = 4, YW = 4;
  logic clk = 0, rst_n = 0, clear;
  logic in_valid, in_ready, in_last, out_valid, out_ready, out_last, finished;
  logic signed [VW-1:0] in_value, out_value;
  logic [XW-1:0] in_x, out_x;
  logic [YW-1:0] in_y, out_y;
  int checks = 0, failures = 0;

  rx_sorter #(.DEPTH(DEPTH), .VAL_W(VW), .XW(XW), .YW(YW)) dut (.*);
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

  task automatic run(input int cnt, input bit gaps);
    ent_t e;
    int got;
    sort_clear();
    for (int k = 0; k < cnt; k++) begin
      int wait_cyc;
      @(negedge clk);
      if (gaps) repeat ($urandom_range(0, 12)) @(negedge clk);
      in_valid = 1;
      in_value = (k % 4 == 0) ? VW'(-$urandom_range(0, 50)) : VW'($urandom_range(0, 40));
      in_x = XW'(k); in_y = YW'(k / 16); in_last = (k == cnt - 1);
      e.value = wide_t'(in_value); e.x = k % 16; e.y = k / 16;
      sort_push(e, DEPTH);
      wait_cyc = 0;
      @(posedge clk);
      while (!in_ready) begin wait_cyc++; @(posedge clk); end
      chk(wait_cyc <= DEPTH + 1, $sformatf("accept took %0d cycles", wait_cyc));
      @(negedge clk) in_valid = 0; in_last = 0;
    end
    got = 0;
    while (!finished) begin
      @(posedge clk);
      if (out_valid && out_ready) begin
        chk(got < slist.size(), "too many outputs");
        if (got < slist.size()) begin
          chk(out_value == VW'(slist[got].value) && out_x == XW'(slist[got].x) &&
              out_y == YW'(slist[got].y),
              $sformatf("entry %0d: %0d (%0d,%0d) exp %0d (%0d,%0d)", got, out_value, out_x,
                        out_y, slist[got].value, slist[got].x, slist[got].y));
          chk(out_last == (got == slist.size() - 1), "out_last");
        end
        got++;
      end
    end
    chk(got == slist.size(), $sformatf("output count %0d exp %0d", got, slist.size()));
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
  endtask

  always @(posedge clk) out_ready <= ($urandom_range(0, 2) != 0);

  initial begin
    in_valid = 0; in_value = 0; in_x = 0; in_y = 0; in_last = 0; clear = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(30, 0);
    run(30, 1);
    run(5, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
