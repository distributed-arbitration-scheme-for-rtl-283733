// sync_fifo -- single-clock first-in first-out buffer.
//
// Used as the transmit FIFO a PE fills with a whole data stream before it
// requests a connection, and as the receive buffer that collects decoded
// words. DEPTH entries of W bits are held in a register array addressed by
// wrapping read and write pointers; 'count' tells how many entries are held.
// The read side is show-ahead: 'rdata' is the oldest entry whenever 'empty'
// is low, and 'pop' removes it at the clock edge. A push into a full FIFO or
// a pop from an empty one is ignored (and flagged by an assertion). Push
// and pop in the same cycle are both performed.
module sync_fifo #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 16,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  logic [W-1:0]  wdata,
  input  logic          pop,
  output logic [W-1:0]  rdata,
  output logic          empty,
  output logic          full,
  output logic [AW:0]   count
);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_push, do_pop;

  always_comb begin
    empty   = (count == '0);
    full    = (count == (AW+1)'(DEPTH));
    do_push = push && !full;
    do_pop  = pop && !empty;
    rdata   = mem[rp];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_push) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_pop)  rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk)
    if (do_push) mem[wp] <= wdata;

  a_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full))
               else $error("sync_fifo: push while full");
  a_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty))
               else $error("sync_fifo: pop while empty");
endmodule
