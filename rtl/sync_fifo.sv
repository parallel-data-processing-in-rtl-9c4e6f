// Synchronous first-in first-out buffer (RAM with read and write pointers).
//
// Used as the output RAM that holds the sorted timestamps until the host
// reads them, and as the small per-channel queues of the sorter. The head
// word is always visible on dout while empty is low (first-word
// fall-through); pop removes it. A push while full is ignored (the caller
// detects and reports the loss); push and pop may happen in the same cycle.
// The buffer organisation and depth are this design's choices.
//
// Interface: push/din/full, pop/dout/empty, level (words held).
module sync_fifo #(
  parameter int unsigned W     = 45,
  parameter int unsigned DEPTH = 1024,   // power of two
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] din,
  output logic         full,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         empty,
  output logic [AW:0]  level
);
  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wptr, rptr;
  logic         do_push, do_pop;

  assign level   = wptr - rptr;
  assign full    = (level == (AW+1)'(DEPTH));
  assign empty   = (wptr == rptr);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr[AW-1:0]] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_push) wptr <= wptr + 1'b1;
      if (do_pop)  rptr <= rptr + 1'b1;
    end
  end

  // A pop of an empty buffer is a caller error.
  a_no_pop_empty: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));
endmodule
