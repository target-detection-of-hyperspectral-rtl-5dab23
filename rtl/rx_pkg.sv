// rx_pkg: widths and types shared by the RX (Reed-Xiaoli) anomaly detector.
//
// The detector computes rx(x) = (x - mu)^T K^-1 (x - mu) for every pixel of a
// hyperspectral image in integer arithmetic. The multiplier operand widths
// 42 x 35 bits and the 64-bit dividend follow the width study of the design
// (a 20-bit shift leaves ~44 bits for an operand; 42x35 is the cheapest DSP
// fit). Pixel, mean and input-word widths are this implementation's choice.
package rx_pkg;

  // Matrix element width of K and K^-1 (multiplier operand A).
  localparam int ELEM_W = 42;
  // Division quotient width (multiplier operand B).
  localparam int FACT_W = 35;
  // Dividend width of the divider.
  localparam int DIVD_W = 64;
  // Raw pixel / band-mean sample width.
  localparam int PIX_W  = 16;
  // Deviation (pixel - mean) width.
  localparam int DEV_W  = PIX_W + 1;
  // Width of one word written by the host into the input FIFO.
  localparam int IN_W   = 64;

  typedef logic signed [ELEM_W-1:0] elem_t;
  typedef logic signed [FACT_W-1:0] fact_t;
  typedef logic signed [DEV_W-1:0]  dev_t;

  // Operation types flowing through the inverter's arithmetic pipeline.
  typedef enum logic [1:0] {
    PH_FWD  = 2'd0,  // forward elimination (upper triangle)
    PH_BWD  = 2'd1,  // backward elimination (lower triangle)
    PH_DIAG = 2'd2   // final scaling by 1/A[i][i]
  } phase_e;

  // Saturate a 64-bit signed quotient into the FACT_W range.
  function automatic fact_t sat_fact(input logic signed [DIVD_W-1:0] q);
    localparam logic signed [DIVD_W-1:0] MAXV = (64'sd1 <<< (FACT_W-1)) - 1;
    localparam logic signed [DIVD_W-1:0] MINV = -(64'sd1 <<< (FACT_W-1));
    if (q > MAXV)      return fact_t'(MAXV);
    else if (q < MINV) return fact_t'(MINV);
    else               return fact_t'(q);
  endfunction

endpackage
