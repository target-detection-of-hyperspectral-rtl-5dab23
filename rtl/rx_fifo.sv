// rx_fifo: synchronous first-in first-out buffer.
//
// Used for the host input and output queues, for the copy of row j kept by
// the matrix inverter while its factor is being divided, and for the copy of
// the deviation vector kept by the matrix multiplier. Storage is a plain
// array (mapped to block or distributed RAM); the head word is presented
// combinationally (show-ahead), so rd_data is valid whenever empty is low
// and a pop in the same cycle advances to the next word. Push on a full or
// pop on an empty FIFO is ignored. DEPTH need not be a power of two.
// Interface: push/wr_data, pop/rd_data, full, empty, count. Reset clears.
module rx_fifo #(
  parameter int WIDTH = 64,
  parameter int DEPTH = 512
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             pop,
  output logic [WIDTH-1:0] rd_data,
  output logic             full,
  output logic             empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0] wptr, rptr;

  assign full    = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign empty   = (count == '0);
  assign rd_data = mem[rptr];

  logic do_push, do_pop;
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;

  function automatic logic [AW-1:0] nxt(input logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_push) wptr <= nxt(wptr);
      if (do_pop)  rptr <= nxt(rptr);
      count <= count + $bits(count)'(do_push) - $bits(count)'(do_pop);
    end
  end

  // Overflow/underflow are flagged in simulation; the logic ignores them.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(push && full)) else $error("rx_fifo: push while full");
      assert (!(pop && empty)) else $error("rx_fifo: pop while empty");
    end
  end
endmodule
