// Period counter: the common time scale of all channels.
//
// Counts consecutive periods of the reference clock. Every channel latches
// the same count, so all timestamps refer to one time scale whatever the
// channel. The count wraps modulo 2^W; with W = 32 and T0 = 2 ns the range is
// 8.6 s, above the 1 s range the counter is specified for. A synchronous
// clear restarts the time scale at zero (this design's choice).
//
// Interface: clk (reference clock), rst_n (async, active low), clear (sync),
// count (current period number, valid every cycle), wrap (one-cycle pulse in
// the cycle the count goes from all ones to zero).
module period_counter #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  output logic [W-1:0] count,
  output logic         wrap
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      wrap  <= 1'b0;
    end else if (clear) begin
      count <= '0;
      wrap  <= 1'b0;
    end else begin
      count <= count + 1'b1;
      wrap  <= &count;
    end
  end
endmodule
