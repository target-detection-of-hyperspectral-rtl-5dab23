// rx_matmul: dual matrix multiplier computing rx = d^T K^-1 d per pixel.
//
// d is the deviation vector of one pixel (N bands), arriving one element per
// cycle in band order. Two multiply-accumulate processes run concurrently on
// consecutive pixels:
//   first_mac  for element d[k] reads row k of K^-1 and accumulates
//              y[c] += K^-1[k][c] * d[k] in N accumulators (N multipliers),
//              so after N cycles y = d^T K^-1. d[k] is also kept in a FIFO.
//   second_mac takes y into a shift register and, one element per cycle,
//              accumulates rx += y[0] * d[k] (d popped from the FIFO), then
//              shifts y. After N cycles rx is complete.
//   write_proc hands rx with the pixel's (x, y) coordinates to the sorter
//              and raises last with the final pixel of the image.
// Row-wise input of the deviation (rather than a whole vector per cycle and
// an adder tree) is the design's choice; a pixel takes N cycles in each MAC.
// All products are kept at full precision: y has ELEM_W+DEV_W+log2(N) bits,
// rx a further DEV_W+log2(N).
// Interface: dev_valid/dev_data/dev_ready stream (element order implicit);
// inv_rd_en/inv_rd_row read a K^-1 row, returned on inv_rd_data one cycle
// later; res_* valid/ready result with coordinates. clear restarts the pixel
// counter. The first MAC stalls (holding its row read) only when the
// second MAC is still busy with the previous pixel.
module rx_matmul
  import rx_pkg::*;
#(
  parameter int N     = 169,
  parameter int IMG_W = 64,
  parameter int IMG_H = 64,
  localparam int Y_W  = ELEM_W + DEV_W + $clog2(N),
  localparam int RX_W = Y_W + DEV_W + $clog2(N),
  localparam int XW   = $clog2(IMG_W),
  localparam int YW   = $clog2(IMG_H)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     dev_valid,
  input  dev_t                     dev_data,
  output logic                     dev_ready,
  output logic                     inv_rd_en,
  output logic [$clog2(N)-1:0]     inv_rd_row,
  input  logic [N-1:0][ELEM_W-1:0] inv_rd_data,
  output logic                     res_valid,
  output logic signed [RX_W-1:0]   res_value,
  output logic [XW-1:0]            res_x,
  output logic [YW-1:0]            res_y,
  output logic                     res_last,
  input  logic                     res_ready
);
  localparam int LW = $clog2(N);
  localparam int DD = 2 * N + 2;   // deviation FIFO depth

  typedef logic signed [Y_W-1:0]  y_t;
  typedef logic signed [RX_W-1:0] rx_t;

  // ------------------------------------------------------------ first_mac
  logic [LW-1:0] k_in;       // band index of the next accepted element
  logic          s1_v;
  dev_t          s1_d;
  logic [LW-1:0] s1_k;
  y_t            acc  [N];
  y_t            yh   [N];   // finished y vector waiting for second_mac
  logic          yh_v;
  logic          y_take;
  logic          stall1;
  logic          df_full, df_empty;
  logic [DEV_W-1:0] df_out;
  logic          df_pop;
  logic [$clog2(DD+1)-1:0] df_count;
  logic          accept;

  assign stall1    = s1_v && (s1_k == LW'(N-1)) && yh_v && !y_take;
  assign dev_ready = !stall1 && !df_full;
  assign accept    = dev_valid && dev_ready;
  assign inv_rd_en  = accept || stall1;
  assign inv_rd_row = stall1 ? s1_k : k_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k_in <= '0;
      s1_v <= 1'b0;
      s1_d <= '0;
      s1_k <= '0;
      yh_v <= 1'b0;
      for (int c = 0; c < N; c++) acc[c] <= '0;
    end else if (clear) begin
      k_in <= '0;
      s1_v <= 1'b0;
      yh_v <= 1'b0;
      for (int c = 0; c < N; c++) acc[c] <= '0;
    end else begin
      if (y_take) yh_v <= 1'b0;
      if (!stall1) begin
        s1_v <= accept;
        s1_d <= dev_data;
        s1_k <= k_in;
        if (accept) k_in <= (k_in == LW'(N-1)) ? '0 : k_in + 1'b1;
        if (s1_v) begin
          for (int c = 0; c < N; c++) begin
            if (s1_k == LW'(N-1)) begin
              yh[c]  <= acc[c] + y_t'(elem_t'(inv_rd_data[c])) * y_t'(s1_d);
              acc[c] <= '0;
            end else begin
              acc[c] <= acc[c] + y_t'(elem_t'(inv_rd_data[c])) * y_t'(s1_d);
            end
          end
          if (s1_k == LW'(N-1)) yh_v <= 1'b1;
        end
      end
    end
  end

  // deviation FIFO between the two MACs
  rx_fifo #(.WIDTH(DEV_W), .DEPTH(DD)) u_devfifo (
    .clk, .rst_n,
    .push(accept), .wr_data(dev_data),
    .pop(df_pop), .rd_data(df_out),
    .full(df_full), .empty(df_empty), .count(df_count)
  );

  // ----------------------------------------------------------- second_mac
  y_t            yr [N];
  logic          busy2;
  logic [LW-1:0] cnt2;
  rx_t           acc2;
  logic          res_block;
  logic          step2;
  rx_t           prod2;

  assign res_block = res_valid && !res_ready;
  assign step2     = busy2 && !(cnt2 == LW'(N-1) && res_block);
  assign y_take    = yh_v && (!busy2 || (cnt2 == LW'(N-1) && !res_block));
  assign df_pop    = step2;
  assign prod2     = rx_t'(yr[0]) * rx_t'(dev_t'(df_out));

  // write_proc: pixel coordinates
  logic [XW-1:0] px;
  logic [YW-1:0] py;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy2     <= 1'b0;
      cnt2      <= '0;
      acc2      <= '0;
      res_valid <= 1'b0;
      res_value <= '0;
      res_x     <= '0;
      res_y     <= '0;
      res_last  <= 1'b0;
      px        <= '0;
      py        <= '0;
    end else if (clear) begin
      busy2     <= 1'b0;
      cnt2      <= '0;
      acc2      <= '0;
      res_valid <= 1'b0;
      px        <= '0;
      py        <= '0;
    end else begin
      if (res_valid && res_ready) res_valid <= 1'b0;
      if (step2) begin
        for (int c = 0; c < N - 1; c++) yr[c] <= yr[c+1];
        if (cnt2 == LW'(N-1)) begin
          res_valid <= 1'b1;
          res_value <= acc2 + prod2;
          res_x     <= px;
          res_y     <= py;
          res_last  <= (px == XW'(IMG_W-1)) && (py == YW'(IMG_H-1));
          if (px == XW'(IMG_W-1)) begin
            px <= '0;
            py <= (py == YW'(IMG_H-1)) ? '0 : py + 1'b1;
          end else begin
            px <= px + 1'b1;
          end
          busy2 <= 1'b0;
          acc2  <= '0;
          cnt2  <= '0;
        end else begin
          acc2 <= acc2 + prod2;
          cnt2 <= cnt2 + 1'b1;
        end
      end
      if (y_take) begin
        for (int c = 0; c < N; c++) yr[c] <= yh[c];
        busy2 <= 1'b1;
        cnt2  <= '0;
        acc2  <= '0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n) assert (!(df_pop && df_empty)) else $error("rx_matmul: deviation FIFO underflow");
  end
endmodule
