// rx_inverter: integer Gauss-Jordan inversion of the N x N covariance matrix.
//
// The matrix A (K) and its companion A^-1 (initialised to 2^ID_SHIFT * I)
// are held row-wide: one memory word is a whole row of N elements, so one
// read, one arithmetic pass and one write handle a complete row of both
// matrices at once. Three phases run through the same arithmetic pipeline:
//   forward  (upper triangle): pivot i = 0..N-2, rows j = i+1..N-1
//   backward (lower triangle): pivot i = N-1..1, rows j = i-1..0
//       row_j <- row_j - ((pivot_row * f) >>> SH),  f = (A[j][i] << SH) / A[i][i]
//   diagonal: rows i = 0..N-1
//       row_i <- (row_i * f) >>> OUT_SHIFT,        f = 2^DIAG_SHIFT / A[i][i]
// and A^-1 ends up as 2^(ID_SHIFT+DIAG_SHIFT-OUT_SHIFT) * K^-1.
//
// Pipeline (one row operation issued per cycle):
//   counter  issues the next row; it first reads the pivot row into one of
//            two pivot banks (ping-pong, so ops of the previous pivot can
//            still drain), then the rows to update.
//   read     1-cycle memory read. The row is pushed into the row FIFO (it is
//            needed twice: its column-i element now, the whole row later)
//            and the factor's dividend/divisor go to the divider.
//   divide   rx_div, DIV_LAT cycles, sign handled outside the core.
//   multiply 2N rx_mult units (A and A^-1 rows in parallel), MUL_LAT cycles.
//   shift    product >>> SH (per-phase shift values).
//   subtract 2N rx_sub units, 2 cycles, then written back.
// A scoreboard bit per row stalls the read of a row that is still in the
// pipeline; in practice only the next pivot row ever waits, exactly as the
// design intends (stalls only while the last pivot row is being computed).
//
// Zero pivots: during the forward phase each written row is checked. When
// the row that will be the next pivot is written with a zero in the pivot
// column, a swap is pending; the next written row with a non-zero there is
// exchanged with it in a renaming table (logical row -> memory row). The
// next pivot waits until the swap is resolved. Loading applies the same
// check for the first pivot. The table is kept after the inversion and the
// result port reads through it, so rows come out in natural order (the
// original reorders the rows in RAM during the backward pass instead, which
// only works when the swapped rows are close in the pipeline).
// If no replacement row exists the matrix is singular: singular_o is set
// and the zero divisor saturates the factor.
//
// Interface: load_valid/load_data stream K row-major (always accepted while
// not busy); start begins the inversion, busy/done report it. rd_en/rd_row
// read one row of the result (N elements) on rd_data one cycle later.
// swap_o and stall_o pulse for each row exchange and each stalled cycle.
module rx_inverter
  import rx_pkg::*;
#(
  parameter int N          = 169,
  parameter int ID_SHIFT   = 24,
  parameter int FWD_SHIFT  = 20,
  parameter int BWD_SHIFT  = 20,
  parameter int DIAG_SHIFT = 48,
  parameter int OUT_SHIFT  = 24,
  parameter int DIV_LAT    = 77,
  parameter int MUL_LAT    = 6
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // matrix load, row-major
  input  logic                    load_valid,
  input  elem_t                   load_data,
  output logic                    load_ready,
  // control
  input  logic                    start,
  output logic                    busy,
  output logic                    done,
  output logic                    singular_o,
  // result read port (logical row index)
  input  logic                    rd_en,
  input  logic [$clog2(N)-1:0]    rd_row,
  output logic [N-1:0][ELEM_W-1:0] rd_data,
  // event pulses
  output logic                    swap_o,
  output logic                    stall_o
);
  localparam int LW   = $clog2(N);
  localparam int FD   = DIV_LAT + 4;    // row FIFO depth
  localparam int CW   = $clog2(FD + 2); // in-flight counters

  typedef logic [N-1:0][ELEM_W-1:0] row_t;
  typedef logic [LW-1:0]            idx_t;

  typedef struct packed {
    logic   piv_load;   // read of a pivot row into a bank
    phase_e ph;
    idx_t   pivot;      // pivot (logical) index, column used for the factor
    idx_t   logical;    // logical row being updated
    idx_t   phys;       // memory row being updated
    logic   bank;       // pivot bank used
  } op_t;

  localparam int OPW = $bits(op_t);

  // ---------------------------------------------------------------- storage
  row_t memA [N];
  row_t memI [N];
  idx_t rn   [N];       // renaming table: logical -> memory row
  logic [N-1:0] inflight;
  row_t bankA [2];
  row_t bankI [2];

  // ------------------------------------------------------------ load logic
  typedef enum logic [2:0] {S_IDLE, S_FWD, S_BWD, S_DIAG, S_DRAIN, S_DONE} state_e;
  state_e state;

  idx_t lrow, lcol;
  row_t lbuf;
  logic loaded;
  row_t load_row;
  logic load_wr;

  assign load_ready = (state == S_IDLE) || (state == S_DONE);
  assign busy       = !load_ready;
  assign done       = (state == S_DONE);

  always_comb begin
    load_row = lbuf;
    load_row[lcol] = load_data;
  end
  assign load_wr = load_valid && load_ready && (lcol == idx_t'(N-1));

  // ------------------------------------------------------------- issue side
  idx_t piv, jrow;
  logic need_piv;
  logic cur_bank;
  logic swap_pending;
  logic [CW-1:0] bank_cnt [2];
  logic [CW+LW:0] total_cnt;

  logic iss_v;          // a memory read is issued this cycle
  op_t  iss_op;
  idx_t raddr;
  logic stall;
  logic wb_v;           // a row is written back this cycle
  op_t  wb_op;
  row_t wbA, wbI;

  // identity row scaled by 2^ID_SHIFT
  function automatic row_t id_row(input idx_t r);
    row_t x;
    x = '0;
    x[r] = ELEM_W'(64'd1 << ID_SHIFT);
    return x;
  endfunction

  always_comb begin
    iss_v  = 1'b0;
    iss_op = '0;
    stall  = 1'b0;
    raddr  = rn[rd_row];
    unique case (state)
      S_FWD, S_BWD: begin
        if (need_piv) begin
          iss_op.piv_load = 1'b1;
          iss_op.ph       = (state == S_FWD) ? PH_FWD : PH_BWD;
          iss_op.pivot    = piv;
          iss_op.logical  = piv;
          iss_op.phys     = rn[piv];
          iss_op.bank     = !cur_bank;
          if (!inflight[rn[piv]] && !swap_pending && bank_cnt[!cur_bank] == '0)
            iss_v = 1'b1;
          else
            stall = 1'b1;
        end else begin
          iss_op.ph      = (state == S_FWD) ? PH_FWD : PH_BWD;
          iss_op.pivot   = piv;
          iss_op.logical = jrow;
          iss_op.phys    = rn[jrow];
          iss_op.bank    = cur_bank;
          if (!inflight[rn[jrow]]) iss_v = 1'b1;
          else                     stall = 1'b1;
        end
      end
      S_DIAG: begin
        iss_op.ph      = PH_DIAG;
        iss_op.pivot   = jrow;
        iss_op.logical = jrow;
        iss_op.phys    = rn[jrow];
        if (!inflight[rn[jrow]]) iss_v = 1'b1;
        else                     stall = 1'b1;
      end
      default: ;
    endcase
    if (iss_v) raddr = iss_op.phys;
  end

  assign stall_o = stall;

  // counter: walks pivots and rows of the three phases
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      piv        <= '0;
      jrow       <= '0;
      need_piv   <= 1'b0;
      cur_bank   <= 1'b0;
      singular_o <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: begin
          if (load_valid && lrow == '0 && lcol == '0) singular_o <= 1'b0;
          if (start && loaded) begin
            state    <= S_FWD;
            piv      <= '0;
            jrow     <= idx_t'(1);
            need_piv <= 1'b1;
          end
        end
        S_FWD: begin
          if (need_piv && swap_pending && total_cnt == '0)
            singular_o <= 1'b1;   // no non-zero pivot candidate left
          if (iss_v) begin
            if (need_piv) begin
              need_piv <= 1'b0;
              cur_bank <= !cur_bank;
            end else if (jrow == idx_t'(N-1)) begin
              if (piv == idx_t'(N-2)) begin
                state <= S_BWD;
                piv   <= idx_t'(N-1);
                jrow  <= idx_t'(N-2);
              end else begin
                piv  <= piv + 1'b1;
                jrow <= piv + idx_t'(2);
              end
              need_piv <= 1'b1;
            end else begin
              jrow <= jrow + 1'b1;
            end
          end
        end
        S_BWD: begin
          if (iss_v) begin
            if (need_piv) begin
              need_piv <= 1'b0;
              cur_bank <= !cur_bank;
            end else if (jrow == '0) begin
              if (piv == idx_t'(1)) begin
                state <= S_DIAG;
                jrow  <= '0;
              end else begin
                piv      <= piv - 1'b1;
                jrow     <= piv - idx_t'(2);
                need_piv <= 1'b1;
              end
            end else begin
              jrow <= jrow - 1'b1;
            end
          end
        end
        S_DIAG: begin
          if (iss_v) begin
            if (jrow == idx_t'(N-1)) state <= S_DRAIN;
            else                     jrow  <= jrow + 1'b1;
          end
        end
        S_DRAIN: if (total_cnt == '0) state <= S_DONE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // in-flight bookkeeping (row scoreboard, per-bank and total counters)
  logic iss_row, wb_row;
  assign iss_row = iss_v && !iss_op.piv_load;
  assign wb_row  = wb_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inflight    <= '0;
      bank_cnt[0] <= '0;
      bank_cnt[1] <= '0;
      total_cnt   <= '0;
    end else begin
      if (iss_row) inflight[iss_op.phys] <= 1'b1;
      if (wb_row)  inflight[wb_op.phys]  <= 1'b0;
      for (int b = 0; b < 2; b++) begin
        bank_cnt[b] <= bank_cnt[b]
          + CW'(iss_row && iss_op.ph != PH_DIAG && iss_op.bank == 1'(b))
          - CW'(wb_row  && wb_op.ph  != PH_DIAG && wb_op.bank  == 1'(b));
      end
      total_cnt <= total_cnt + $bits(total_cnt)'(iss_row) - $bits(total_cnt)'(wb_row);
    end
  end

  // ------------------------------------------------------- read (1 cycle)
  row_t rdA, rdI;
  logic r1_v;
  op_t  r1_op;

  always_ff @(posedge clk) begin
    if (iss_v || rd_en) begin
      rdA <= memA[raddr];
      rdI <= memI[raddr];
    end
  end
  assign rd_data = rdI;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1_v  <= 1'b0;
      r1_op <= '0;
    end else begin
      r1_v  <= iss_v;
      r1_op <= iss_op;
    end
  end

  // pivot banks
  always_ff @(posedge clk) begin
    if (r1_v && r1_op.piv_load) begin
      bankA[r1_op.bank] <= rdA;
      bankI[r1_op.bank] <= rdI;
    end
  end

  // ------------------------------------------ shift + divide (factor f)
  logic                     dv_in;
  logic signed [DIVD_W-1:0] dv_n;
  elem_t                    dv_d;
  logic                     dv_out;
  fact_t                    dv_q;
  logic [OPW-1:0]           dv_tag;
  op_t                      d_op;

  always_comb begin
    dv_in = r1_v && !r1_op.piv_load;
    unique case (r1_op.ph)
      PH_FWD:  begin
        dv_n = DIVD_W'(elem_t'(rdA[r1_op.pivot])) <<< FWD_SHIFT;
        dv_d = elem_t'(bankA[r1_op.bank][r1_op.pivot]);
      end
      PH_BWD:  begin
        dv_n = DIVD_W'(elem_t'(rdA[r1_op.pivot])) <<< BWD_SHIFT;
        dv_d = elem_t'(bankA[r1_op.bank][r1_op.pivot]);
      end
      default: begin
        dv_n = DIVD_W'(1) <<< DIAG_SHIFT;
        dv_d = elem_t'(rdA[r1_op.logical]);
      end
    endcase
  end

  rx_div #(.DIVD_W(DIVD_W), .DEN_W(ELEM_W), .Q_W(FACT_W), .TAG_W(OPW), .LAT(DIV_LAT)) u_div (
    .clk, .rst_n,
    .valid_i(dv_in), .n_i(dv_n), .d_i(dv_d), .tag_i(OPW'(r1_op)),
    .valid_o(dv_out), .q_o(dv_q), .tag_o(dv_tag)
  );
  assign d_op = op_t'(dv_tag);

  // row j waits in a FIFO until its factor is ready
  logic [2*N*ELEM_W-1:0] rf_out;
  logic                  rf_full, rf_empty;
  logic [$clog2(FD+1)-1:0] rf_count;
  row_t                  rjA, rjI;

  rx_fifo #(.WIDTH(2*N*ELEM_W), .DEPTH(FD)) u_rowfifo (
    .clk, .rst_n,
    .push(dv_in), .wr_data({rdA, rdI}),
    .pop(dv_out), .rd_data(rf_out),
    .full(rf_full), .empty(rf_empty), .count(rf_count)
  );
  assign {rjA, rjI} = rf_out;

  // ------------------------------------------------------------ multiply
  row_t mopA, mopI;
  always_comb begin
    if (d_op.ph == PH_DIAG) begin
      mopA = rjA;
      mopI = rjI;
    end else begin
      mopA = bankA[d_op.bank];
      mopI = bankI[d_op.bank];
    end
  end

  // row j, op and valid delayed alongside the multipliers
  row_t mdA [MUL_LAT];
  row_t mdI [MUL_LAT];
  op_t  mdop [MUL_LAT];
  logic mdv [MUL_LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < MUL_LAT; k++) begin
        mdv[k] <= 1'b0; mdop[k] <= '0;
      end
    end else begin
      mdv[0] <= dv_out; mdop[0] <= d_op;
      for (int k = 1; k < MUL_LAT; k++) begin
        mdv[k] <= mdv[k-1]; mdop[k] <= mdop[k-1];
      end
    end
  end
  always_ff @(posedge clk) begin
    mdA[0] <= rjA; mdI[0] <= rjI;
    for (int k = 1; k < MUL_LAT; k++) begin
      mdA[k] <= mdA[k-1]; mdI[k] <= mdI[k-1];
    end
  end

  op_t  m_op;
  logic m_v;
  assign m_op = mdop[MUL_LAT-1];
  assign m_v  = mdv[MUL_LAT-1];

  int unsigned m_sh;
  always_comb begin
    unique case (m_op.ph)
      PH_FWD:  m_sh = FWD_SHIFT;
      PH_BWD:  m_sh = BWD_SHIFT;
      default: m_sh = OUT_SHIFT;
    endcase
  end

  row_t sA, sI;   // subtract results
  for (genvar k = 0; k < N; k++) begin : g_lane
    logic signed [ELEM_W+FACT_W-1:0] pA, pI;
    elem_t shA, shI;
    rx_mult #(.A_W(ELEM_W), .B_W(FACT_W), .LAT(MUL_LAT)) u_mA (
      .clk, .a(elem_t'(mopA[k])), .b(dv_q), .p(pA));
    rx_mult #(.A_W(ELEM_W), .B_W(FACT_W), .LAT(MUL_LAT)) u_mI (
      .clk, .a(elem_t'(mopI[k])), .b(dv_q), .p(pI));
    // shift process
    assign shA = elem_t'(pA >>> m_sh);
    assign shI = elem_t'(pI >>> m_sh);
    rx_sub #(.W(ELEM_W)) u_sA (
      .clk, .sub(m_op.ph != PH_DIAG), .a(elem_t'(mdA[MUL_LAT-1][k])), .b(shA), .r(sA[k]));
    rx_sub #(.W(ELEM_W)) u_sI (
      .clk, .sub(m_op.ph != PH_DIAG), .a(elem_t'(mdI[MUL_LAT-1][k])), .b(shI), .r(sI[k]));
  end

  // op follows the two subtract stages
  op_t  s1_op, s2_op;
  logic s1_v,  s2_v;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s2_v <= 1'b0; s1_op <= '0; s2_op <= '0;
    end else begin
      s1_v <= m_v;  s1_op <= m_op;
      s2_v <= s1_v; s2_op <= s1_op;
    end
  end

  assign wb_v  = s2_v;
  assign wb_op = s2_op;
  assign wbA   = sA;
  assign wbI   = sI;

  // ------------------------------------------------------------ write side
  // zero-pivot check on written rows (forward phase and load)
  logic chk_v;
  idx_t chk_next, chk_log;
  elem_t chk_val;
  always_comb begin
    chk_v    = 1'b0;
    chk_next = '0;
    chk_log  = '0;
    chk_val  = '0;
    if (load_wr) begin
      chk_v    = 1'b1;
      chk_next = '0;
      chk_log  = lrow;
      chk_val  = elem_t'(load_row[0]);
    end else if (wb_v && wb_op.ph == PH_FWD && wb_op.pivot != idx_t'(N-2)) begin
      chk_v    = 1'b1;
      chk_next = wb_op.pivot + 1'b1;
      chk_log  = wb_op.logical;
      chk_val  = elem_t'(wbA[chk_next]);
    end
  end

  logic do_swap;
  assign do_swap = chk_v && swap_pending && (chk_log > chk_next) && (chk_val != '0);
  assign swap_o  = do_swap;

  always_ff @(posedge clk) begin
    if (load_wr) begin
      memA[lrow] <= load_row;
      memI[lrow] <= id_row(lrow);
    end else if (wb_v) begin
      memA[wb_op.phys] <= wbA;
      memI[wb_op.phys] <= wbI;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lrow         <= '0;
      lcol         <= '0;
      lbuf         <= '0;
      loaded       <= 1'b0;
      swap_pending <= 1'b0;
      for (int r = 0; r < N; r++) rn[r] <= idx_t'(r);
    end else begin
      if (load_valid && load_ready) begin
        lbuf[lcol] <= load_data;
        if (lcol == idx_t'(N-1)) begin
          lcol <= '0;
          rn[lrow] <= lrow;
          if (lrow == idx_t'(N-1)) begin
            lrow   <= '0;
            loaded <= 1'b1;
          end else begin
            lrow <= lrow + 1'b1;
          end
        end else begin
          lcol <= lcol + 1'b1;
        end
        if (lrow == '0 && lcol == '0) begin
          loaded       <= 1'b0;
          swap_pending <= 1'b0;
        end
      end
      if (chk_v && chk_log == chk_next && chk_val == '0)
        swap_pending <= 1'b1;
      if (do_swap) begin
        rn[chk_next]  <= rn[chk_log];
        rn[chk_log]   <= rn[chk_next];
        swap_pending  <= 1'b0;
      end
      // no candidate row: give up and let the zero divisor saturate
      if (state == S_FWD && need_piv && swap_pending && total_cnt == '0)
        swap_pending <= 1'b0;
      if (start && loaded && load_ready) loaded <= 1'b0;
    end
  end

  // the arithmetic pipeline never overfills the row FIFO
  always_ff @(posedge clk) begin
    if (rst_n) assert (!(dv_in && rf_full)) else $error("rx_inverter: row FIFO overflow");
  end
endmodule
