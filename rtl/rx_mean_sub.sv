// rx_mean_sub: subtracts the band means from the streamed pixel samples.
//
// The stream carries first the N band means, then the pixels of the image,
// band-interleaved by pixel (all N bands of pixel 0, then pixel 1, ...).
// The means are stored in a small N-entry memory used as a circular buffer;
// every following sample is returned as (sample - mean[band]) with the band
// index advancing modulo N. The result is a signed deviation one bit wider
// than the samples. clear restarts with the mean phase for a new image.
// Timing: one sample per cycle, one register of latency; valid/ready on both
// sides (in_ready = output register free or being emptied).
module rx_mean_sub
  import rx_pkg::*;
#(
  parameter int N = 169
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic                  in_valid,
  input  logic [PIX_W-1:0]      in_data,
  output logic                  in_ready,
  output logic                  out_valid,
  output dev_t                  out_data,
  output logic [$clog2(N)-1:0]  out_band,
  input  logic                  out_ready
);
  localparam int LW = $clog2(N);

  logic [PIX_W-1:0] mean [N];
  logic [LW-1:0]    band;
  logic             have_means;

  assign in_ready = have_means ? (!out_valid || out_ready) : 1'b1;

  always_ff @(posedge clk) begin
    if (in_valid && in_ready && !have_means) mean[band] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      band       <= '0;
      have_means <= 1'b0;
      out_valid  <= 1'b0;
      out_data   <= '0;
      out_band   <= '0;
    end else if (clear) begin
      band       <= '0;
      have_means <= 1'b0;
      out_valid  <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        band <= (band == LW'(N-1)) ? '0 : band + 1'b1;
        if (!have_means) begin
          if (band == LW'(N-1)) have_means <= 1'b1;
        end else begin
          out_valid <= 1'b1;
          out_data  <= dev_t'({1'b0, in_data}) - dev_t'({1'b0, mean[band]});
          out_band  <= band;
        end
      end
    end
  end
endmodule
