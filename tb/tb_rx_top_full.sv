// tb_rx_top_full: complete images through the whole detector at real sizes.
// First the default build, 169 bands and 64 x 64 pixels with every
// parameter at its default. Then a build for 224 bands (the band count of
// the AVIRIS sensor) on a 32 x 32 scene, reduced in image size to keep the
// run short. Each run (rx_top_image_run) streams a generated scene with four
// planted anomalies and checks every result word against the reference
// model, the ranking of the anomalies and the cycle count. The two runs
// share the reference model's package state, so they run one after the
// other. A watchdog ends the test if either run hangs.
module tb_rx_top_full;
  logic clk = 0;
  logic go0 = 0, go1 = 0, fin0, fin1;
  int c0, f0, c1, f1;
  always #5 clk = ~clk;

  rx_top_image_run #(.N(169), .W(64), .H(64)) run_default (
    .clk, .go(go0), .fin(fin0), .checks(c0), .failures(f0));
  rx_top_image_run #(.N(224), .W(32), .H(32)) run_224 (
    .clk, .go(go1), .fin(fin1), .checks(c1), .failures(f1));

  initial begin
    repeat (1500000) @(posedge clk);
    $display("watchdog: run_default fin=%0d run_224 fin=%0d", fin0, fin1);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1 + 1);
    $finish;
  end

  initial begin
    go0 = 1;
    wait (fin0);
    go1 = 1;
    wait (fin1);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1);
    $finish;
  end
endmodule
