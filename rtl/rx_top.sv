// rx_top: RX hyperspectral anomaly detector with its host FIFOs.
//
// The host (CPU) computes the band means and the covariance matrix K of the
// image, then writes into the input FIFO: the N*N covariance words
// (row-major, signed), the N band means and all pixel samples
// (band-interleaved by pixel, unsigned PIX_W bits in the low word bits).
// The detector inverts K (integer Gauss-Jordan), computes for each pixel
// rx = (x-mu)^T K^-1 (x-mu) and, after the last pixel, writes the N most
// anomalous pixels, highest score first, into the output FIFO as
// {score, y, x} words for the host to read.
// Ports: host_wr_* pushes input words (ready = FIFO not full); host_rd_*
// pops result words (valid = FIFO not empty). done is high once the results
// of an image are all in the output FIFO; busy while an image is processed.
// cov00_zero flags K(0,0)=0 (handled by row renaming); singular flags a
// pivot column without any non-zero candidate. ev_swap / ev_stall pulse on
// inverter row exchanges and pipeline stalls. FIFO depths are this
// implementation's choice.
module rx_top
  import rx_pkg::*;
#(
  parameter int N          = 169,
  parameter int IMG_W      = 64,
  parameter int IMG_H      = 64,
  parameter int COV_SHIFT  = 0,
  parameter int ID_SHIFT   = 24,
  parameter int FWD_SHIFT  = 20,
  parameter int BWD_SHIFT  = 20,
  parameter int DIAG_SHIFT = 48,
  parameter int OUT_SHIFT  = 24,
  parameter int DIV_LAT    = 77,
  parameter int MUL_LAT    = 6,
  parameter int IN_DEPTH   = 512,
  parameter int OUT_DEPTH  = 256,
  localparam int RX_W  = ELEM_W + 2 * (DEV_W + $clog2(N)),
  localparam int OUT_W = RX_W + $clog2(IMG_H) + $clog2(IMG_W)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             host_wr_valid,
  input  logic [IN_W-1:0]  host_wr_data,
  output logic             host_wr_ready,
  output logic             host_rd_valid,
  output logic [OUT_W-1:0] host_rd_data,
  input  logic             host_rd_ready,
  output logic             busy,
  output logic             done,
  output logic             cov00_zero,
  output logic             singular,
  output logic             ev_swap,
  output logic             ev_stall
);
  logic            if_full, if_empty, if_pop;
  logic [IN_W-1:0] if_data;
  logic            of_full, of_empty, of_push;
  logic [OUT_W-1:0] of_data;

  rx_fifo #(.WIDTH(IN_W), .DEPTH(IN_DEPTH)) u_in_fifo (
    .clk, .rst_n,
    .push(host_wr_valid && !if_full), .wr_data(host_wr_data),
    .pop(if_pop), .rd_data(if_data),
    .full(if_full), .empty(if_empty), .count()
  );
  assign host_wr_ready = !if_full;

  rx_control #(
    .N(N), .IMG_W(IMG_W), .IMG_H(IMG_H), .COV_SHIFT(COV_SHIFT),
    .ID_SHIFT(ID_SHIFT), .FWD_SHIFT(FWD_SHIFT), .BWD_SHIFT(BWD_SHIFT),
    .DIAG_SHIFT(DIAG_SHIFT), .OUT_SHIFT(OUT_SHIFT), .DIV_LAT(DIV_LAT), .MUL_LAT(MUL_LAT)
  ) u_ctrl (
    .clk, .rst_n,
    .in_valid(!if_empty), .in_data(if_data), .in_pop(if_pop),
    .out_push(of_push), .out_data(of_data), .out_full(of_full),
    .busy, .done, .cov00_zero, .singular, .ev_swap, .ev_stall
  );

  rx_fifo #(.WIDTH(OUT_W), .DEPTH(OUT_DEPTH)) u_out_fifo (
    .clk, .rst_n,
    .push(of_push), .wr_data(of_data),
    .pop(host_rd_ready && !of_empty), .rd_data(host_rd_data),
    .full(of_full), .empty(of_empty), .count()
  );
  assign host_rd_valid = !of_empty;
endmodule
