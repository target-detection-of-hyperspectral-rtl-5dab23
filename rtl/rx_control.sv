// rx_control: sequencing and arbitration of the RX anomaly detector.
//
// Holds the four processing modules (matrix inverter, mean subtract, dual
// matrix multiplier, coordinate sorter) and moves data between them and the
// host FIFOs. One image is processed in these steps:
//   COV     N*N covariance words (row-major) are popped from the input FIFO,
//           arithmetically shifted right by COV_SHIFT and loaded into the
//           inverter. The first word, K(0,0), is checked: a zero there is
//           reported on cov00_zero and the inverter's renaming table moves
//           the first non-zero row into the pivot position.
//   INV     the inverter runs; meanwhile the host keeps filling the input
//           FIFO with the band means and the pixels.
//   STREAM  N means then N*IMG_W*IMG_H pixel samples are popped into the mean
//           subtractor, whose deviations feed the multiplier; the multiplier
//           reads the inverse through this module (the inverter's memory is
//           given to it only in this step). Scores go to the sorter.
//   OUT     the sorter's list (highest score first) is pushed into the
//           output FIFO as {score, y, x} words.
//   DONE    done is high until the next image's first word arrives.
// The sub-modules are held cleared outside STREAM/OUT.
module rx_control
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
  localparam int Y_W   = ELEM_W + DEV_W + $clog2(N),
  localparam int RX_W  = Y_W + DEV_W + $clog2(N),
  localparam int XW    = $clog2(IMG_W),
  localparam int YW    = $clog2(IMG_H),
  localparam int OUT_W = RX_W + YW + XW
) (
  input  logic             clk,
  input  logic             rst_n,
  // input FIFO (read side)
  input  logic             in_valid,
  input  logic [IN_W-1:0]  in_data,
  output logic             in_pop,
  // output FIFO (write side)
  output logic             out_push,
  output logic [OUT_W-1:0] out_data,
  input  logic             out_full,
  // status
  output logic             busy,
  output logic             done,
  output logic             cov00_zero,
  output logic             singular,
  output logic             ev_swap,
  output logic             ev_stall
);
  localparam int LW     = $clog2(N);
  localparam longint NCOV  = longint'(N) * N;
  localparam longint NSTRM = longint'(N) + longint'(N) * IMG_W * IMG_H;
  localparam int CNTW   = $clog2(NSTRM + NCOV + 1);

  typedef enum logic [2:0] {C_COV, C_START, C_INV, C_STREAM, C_OUT, C_DONE} cstate_e;
  cstate_e state;
  logic [CNTW-1:0] cnt;

  // ---------------------------------------------------------- inverter
  logic  inv_load_valid, inv_load_ready, inv_start, inv_busy, inv_done;
  elem_t inv_load_data;
  logic  inv_rd_en;
  logic [LW-1:0] inv_rd_row;
  logic [N-1:0][ELEM_W-1:0] inv_rd_data;

  assign inv_load_valid = (state == C_COV) && in_valid;
  assign inv_load_data  = elem_t'($signed(in_data) >>> COV_SHIFT);
  assign inv_start      = (state == C_START);

  rx_inverter #(
    .N(N), .ID_SHIFT(ID_SHIFT), .FWD_SHIFT(FWD_SHIFT), .BWD_SHIFT(BWD_SHIFT),
    .DIAG_SHIFT(DIAG_SHIFT), .OUT_SHIFT(OUT_SHIFT), .DIV_LAT(DIV_LAT), .MUL_LAT(MUL_LAT)
  ) u_inv (
    .clk, .rst_n,
    .load_valid(inv_load_valid), .load_data(inv_load_data), .load_ready(inv_load_ready),
    .start(inv_start), .busy(inv_busy), .done(inv_done), .singular_o(singular),
    .rd_en(inv_rd_en), .rd_row(inv_rd_row), .rd_data(inv_rd_data),
    .swap_o(ev_swap), .stall_o(ev_stall)
  );

  // ------------------------------------------------------ mean subtract
  logic clear;
  logic ms_in_valid, ms_in_ready, ms_out_valid, ms_out_ready;
  dev_t ms_out_data;
  logic [LW-1:0] ms_out_band;

  assign clear       = (state == C_COV) || (state == C_START) || (state == C_INV) ||
                       (state == C_DONE);
  assign ms_in_valid = (state == C_STREAM) && in_valid;

  rx_mean_sub #(.N(N)) u_ms (
    .clk, .rst_n, .clear,
    .in_valid(ms_in_valid), .in_data(in_data[PIX_W-1:0]), .in_ready(ms_in_ready),
    .out_valid(ms_out_valid), .out_data(ms_out_data), .out_band(ms_out_band),
    .out_ready(ms_out_ready)
  );

  // ---------------------------------------------- matrix multiplication
  logic mm_rd_en;
  logic [LW-1:0] mm_rd_row;
  logic res_valid, res_ready, res_last;
  logic signed [RX_W-1:0] res_value;
  logic [XW-1:0] res_x;
  logic [YW-1:0] res_y;

  rx_matmul #(.N(N), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_mm (
    .clk, .rst_n, .clear,
    .dev_valid(ms_out_valid), .dev_data(ms_out_data), .dev_ready(ms_out_ready),
    .inv_rd_en(mm_rd_en), .inv_rd_row(mm_rd_row), .inv_rd_data(inv_rd_data),
    .res_valid, .res_value, .res_x, .res_y, .res_last, .res_ready
  );

  // RAM arbitration: the multiplier reads the inverse only while streaming
  assign inv_rd_en  = (state == C_STREAM || state == C_OUT) && mm_rd_en;
  assign inv_rd_row = mm_rd_row;

  // --------------------------------------------------------- sorter
  logic so_valid, so_ready, so_last, so_finished;
  logic signed [RX_W-1:0] so_value;
  logic [XW-1:0] so_x;
  logic [YW-1:0] so_y;

  rx_sorter #(.DEPTH(N), .VAL_W(RX_W), .XW(XW), .YW(YW)) u_sort (
    .clk, .rst_n, .clear,
    .in_valid(res_valid), .in_value(res_value), .in_x(res_x), .in_y(res_y),
    .in_last(res_last), .in_ready(res_ready),
    .out_valid(so_valid), .out_value(so_value), .out_x(so_x), .out_y(so_y),
    .out_last(so_last), .out_ready(so_ready), .finished(so_finished)
  );

  assign so_ready = !out_full;
  assign out_push = so_valid && !out_full;
  assign out_data = {so_value, so_y, so_x};

  // --------------------------------------------------------- sequencer
  always_comb begin
    unique case (state)
      C_COV:    in_pop = in_valid && inv_load_ready;
      C_STREAM: in_pop = in_valid && ms_in_ready;
      default:  in_pop = 1'b0;
    endcase
  end

  assign busy = (state != C_DONE) && !(state == C_COV && cnt == '0);
  assign done = (state == C_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= C_COV;
      cnt        <= '0;
      cov00_zero <= 1'b0;
    end else begin
      unique case (state)
        C_COV: if (in_pop) begin
          if (cnt == '0) cov00_zero <= (inv_load_data == '0);
          if (cnt == CNTW'(NCOV - 1)) begin
            cnt   <= '0;
            state <= C_START;
          end else cnt <= cnt + 1'b1;
        end
        C_START: state <= C_INV;
        C_INV:   if (inv_done) state <= C_STREAM;
        C_STREAM: if (in_pop) begin
          if (cnt == CNTW'(NSTRM - 1)) begin
            cnt   <= '0;
            state <= C_OUT;
          end else cnt <= cnt + 1'b1;
        end
        C_OUT:  if (so_finished) state <= C_DONE;
        C_DONE: if (in_valid) state <= C_COV;
        default: state <= C_COV;
      endcase
    end
  end

  // the sorter emits its last entry just before it reports finished
  always_ff @(posedge clk) begin
    if (rst_n && out_push && so_last) assert (state == C_OUT) else $error("rx_control: output outside OUT");
  end
endmodule
