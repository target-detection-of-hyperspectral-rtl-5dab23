// rx_sorter: keeps the DEPTH highest RX scores, with their coordinates,
// in a memory used as an ordered list (highest first).
//
// Each new entry is carried down the list: at position k the stored entry is
// read, the higher of (carried, stored) is written back at k and the lower is
// carried on to k+1. The sweep stops at the first empty position (where the
// carried entry is stored) or at the end of the list (where it is dropped).
// A sweep of a list holding c entries takes c+1 cycles, so with DEPTH equal to
// the number of bands a new score can be accepted every time the matrix
// multiplier produces one. The memory has a one-cycle read latency (block
// RAM); the next read is always issued one position ahead of the write.
// Equal scores keep their arrival order. After the entry flagged last has
// been inserted, the list is sent out highest first on the out_* stream
// (out_last marks the final entry); then the sorter waits for clear.
// Interface: in_* and out_* are valid/ready streams.
module rx_sorter #(
  parameter int DEPTH = 169,
  parameter int VAL_W = 92,
  parameter int XW    = 6,
  parameter int YW    = 6
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    in_valid,
  input  logic signed [VAL_W-1:0] in_value,
  input  logic [XW-1:0]           in_x,
  input  logic [YW-1:0]           in_y,
  input  logic                    in_last,
  output logic                    in_ready,
  output logic                    out_valid,
  output logic signed [VAL_W-1:0] out_value,
  output logic [XW-1:0]           out_x,
  output logic [YW-1:0]           out_y,
  output logic                    out_last,
  input  logic                    out_ready,
  output logic                    finished
);
  localparam int AW = $clog2(DEPTH);
  localparam int CW = $clog2(DEPTH + 1);

  typedef struct packed {
    logic signed [VAL_W-1:0] value;
    logic [XW-1:0]           x;
    logic [YW-1:0]           y;
  } ent_t;

  typedef enum logic [2:0] {S_IDLE, S_SWEEP, S_ORD, S_OWAIT, S_OHOLD, S_DONE} state_e;
  state_e state;

  ent_t          mem [DEPTH];
  ent_t          rdata;
  logic [AW-1:0] raddr;
  logic          we;
  logic [AW-1:0] waddr;
  ent_t          wdata;

  logic [CW-1:0] count;
  logic [AW-1:0] k;
  ent_t          carry;
  logic          last_seen;
  logic [AW-1:0] ridx;
  logic          displaced;

  always_ff @(posedge clk) begin
    rdata <= mem[raddr];
    if (we) mem[waddr] <= wdata;
  end

  // sweep step at position k
  logic at_empty, at_end, sweep_end, carry_wins;
  assign at_empty   = (CW'(k) == count);
  assign at_end     = (k == AW'(DEPTH-1));
  // a new score loses ties; an entry already displaced from the list is
  // older than the equal scores behind it and wins them
  assign carry_wins = displaced ? (carry.value >= rdata.value)
                                : (carry.value > rdata.value);
  assign sweep_end  = (state == S_SWEEP) && (at_empty || at_end);

  // a new entry may enter while the previous sweep finishes, unless that
  // sweep writes position 0 (which the new sweep reads first)
  assign in_ready = (state == S_IDLE) ||
                    (sweep_end && !last_seen && k != '0);

  always_comb begin
    we    = 1'b0;
    waddr = k;
    wdata = carry;
    raddr = '0;
    unique case (state)
      S_SWEEP: begin
        if (at_empty) begin
          we = 1'b1;
        end else if (carry_wins) begin
          we = 1'b1;
        end
        raddr = sweep_end ? '0 : k + 1'b1;
      end
      S_ORD: raddr = ridx;
      default: raddr = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      count     <= '0;
      k         <= '0;
      carry     <= '0;
      last_seen <= 1'b0;
      displaced <= 1'b0;
      ridx      <= '0;
      out_valid <= 1'b0;
      out_value <= '0;
      out_x     <= '0;
      out_y     <= '0;
      out_last  <= 1'b0;
    end else if (clear) begin
      state     <= S_IDLE;
      count     <= '0;
      last_seen <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (in_valid) begin
            carry     <= '{value: in_value, x: in_x, y: in_y};
            last_seen <= in_last;
            displaced <= 1'b0;
            k         <= '0;
            state     <= S_SWEEP;
          end
        end
        S_SWEEP: begin
          if (at_empty) count <= count + 1'b1;
          else if (carry_wins) begin
            carry     <= rdata;
            displaced <= 1'b1;
          end
          if (!at_empty && !at_end) k <= k + 1'b1;
          if (sweep_end) begin
            if (in_valid && in_ready) begin
              carry     <= '{value: in_value, x: in_x, y: in_y};
              last_seen <= in_last;
              displaced <= 1'b0;
              k         <= '0;
            end else if (last_seen) begin
              state <= S_ORD;
              ridx  <= '0;
            end else begin
              state <= S_IDLE;
            end
          end
        end
        S_ORD: begin
          if (CW'(ridx) == count) state <= S_DONE;  // only when empty
          else                    state <= S_OWAIT;
        end
        S_OWAIT: begin
          out_valid <= 1'b1;
          out_value <= rdata.value;
          out_x     <= rdata.x;
          out_y     <= rdata.y;
          out_last  <= (CW'(ridx) == count - 1'b1);
          state     <= S_OHOLD;
        end
        S_OHOLD: begin
          if (out_ready) begin
            out_valid <= 1'b0;
            if (CW'(ridx) == count - 1'b1) state <= S_DONE;
            else begin
              ridx  <= ridx + 1'b1;
              state <= S_ORD;
            end
          end
        end
        default: ;
      endcase
    end
  end

  assign finished = (state == S_DONE);
endmodule
