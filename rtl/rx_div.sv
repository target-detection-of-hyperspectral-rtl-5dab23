// rx_div: pipelined signed integer divider with sign fix-up ("div_fix").
//
// Computes q = trunc(n / d) for a signed DIVD_W-bit dividend and a signed
// DEN_W-bit divisor, one new division accepted every cycle. The operands are
// first made positive and their sign difference is carried down the pipe as
// a tag (the div_fix stage: the vendor divider the design was built around
// loses the sign near its precision limit, so signs are handled outside it).
// The core is a restoring divider with one quotient bit per stage
// (DIVD_W stages). The magnitude is saturated to 2^(Q_W-1)-1 before the sign
// is restored, so the result always fits a Q_W-bit signed operand. A zero
// divisor gives the saturated magnitude with the dividend's sign.
// Extra register stages pad the total latency to LAT cycles (77 in the
// design's arithmetic unit table). tag_i travels alongside and leaves with
// the result. Interface: valid_i/n_i/d_i/tag_i in, valid_o/q_o/tag_o out;
// no back-pressure.
module rx_div #(
  parameter int DIVD_W = 64,
  parameter int DEN_W  = 42,
  parameter int Q_W    = 35,
  parameter int TAG_W  = 8,
  parameter int LAT    = 77
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     valid_i,
  input  logic signed [DIVD_W-1:0] n_i,
  input  logic signed [DEN_W-1:0]  d_i,
  input  logic [TAG_W-1:0]         tag_i,
  output logic                     valid_o,
  output logic signed [Q_W-1:0]    q_o,
  output logic [TAG_W-1:0]         tag_o
);
  localparam int CORE = DIVD_W;          // restoring stages
  localparam int PAD  = LAT - CORE - 2;  // extra delay stages

  initial begin
    assert (PAD >= 0) else $fatal(1, "rx_div: LAT must be at least DIVD_W+2");
  end

  typedef struct packed {
    logic              v;
    logic              neg;
    logic [TAG_W-1:0]  tag;
    logic [DEN_W:0]    rem;  // partial remainder
    logic [DIVD_W-1:0] dq;   // remaining dividend bits, then quotient bits
    logic [DEN_W-1:0]  den;  // |d|
  } st_t;

  st_t s [CORE+1];

  // div_fix input stage: absolute values and sign tag.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s[0] <= '0;
    else begin
      s[0].v   <= valid_i;
      s[0].neg <= n_i[DIVD_W-1] ^ d_i[DEN_W-1];
      s[0].tag <= tag_i;
      s[0].rem <= '0;
      s[0].dq  <= n_i[DIVD_W-1] ? DIVD_W'(-n_i) : DIVD_W'(n_i);
      s[0].den <= d_i[DEN_W-1] ? DEN_W'(-d_i) : DEN_W'(d_i);
    end
  end

  // Restoring stages: shift in one dividend bit, subtract if possible.
  for (genvar k = 0; k < CORE; k++) begin : g_stage
    logic [DEN_W+1:0] trial;
    logic [DEN_W:0]   shifted;
    assign shifted = {s[k].rem[DEN_W-1:0], s[k].dq[DIVD_W-1]};
    assign trial   = {1'b0, shifted} - {2'b00, s[k].den};
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) s[k+1] <= '0;
      else begin
        s[k+1].v   <= s[k].v;
        s[k+1].neg <= s[k].neg;
        s[k+1].tag <= s[k].tag;
        s[k+1].den <= s[k].den;
        if (!trial[DEN_W+1]) begin
          s[k+1].rem <= trial[DEN_W:0];
          s[k+1].dq  <= {s[k].dq[DIVD_W-2:0], 1'b1};
        end else begin
          s[k+1].rem <= shifted;
          s[k+1].dq  <= {s[k].dq[DIVD_W-2:0], 1'b0};
        end
      end
    end
  end

  // Output stage: saturate the magnitude, restore the sign.
  localparam logic [DIVD_W-1:0] QMAX = (DIVD_W'(1) << (Q_W-1)) - 1;
  logic [DIVD_W-1:0] mag;
  logic signed [Q_W-1:0] qs;
  assign mag = (s[CORE].dq > QMAX) ? QMAX : s[CORE].dq;
  assign qs  = s[CORE].neg ? -Q_W'(mag) : Q_W'(mag);

  logic                  pv   [PAD+1];
  logic signed [Q_W-1:0] pq   [PAD+1];
  logic [TAG_W-1:0]      ptag [PAD+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pv[0] <= 1'b0; pq[0] <= '0; ptag[0] <= '0;
    end else begin
      pv[0] <= s[CORE].v; pq[0] <= qs; ptag[0] <= s[CORE].tag;
    end
  end

  for (genvar p = 0; p < PAD; p++) begin : g_pad
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        pv[p+1] <= 1'b0; pq[p+1] <= '0; ptag[p+1] <= '0;
      end else begin
        pv[p+1] <= pv[p]; pq[p+1] <= pq[p]; ptag[p+1] <= ptag[p];
      end
    end
  end

  assign valid_o = pv[PAD];
  assign q_o     = pq[PAD];
  assign tag_o   = ptag[PAD];
endmodule
