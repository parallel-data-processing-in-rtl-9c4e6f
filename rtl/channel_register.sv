// Channel register: latches the period count of an input event.
//
// When the interpolator reports an event (hit), the register stores the
// current period counter value N-1, i.e. the number of the reference period
// in which the event occurred, together with the interpolator code number.
// Eq. (1) of the method then gives TS = (N-1)*T0 + Tfine. The interpolator is
// assumed to assert hit in the clock cycle of the period that holds the event
// (any fixed interpolator latency is common to all channels and cancels in
// time intervals); that timing is this design's choice.
//
// Interface: hit/code from the interpolator, count from the period counter.
// Output valid/cnt/code one cycle after hit (WR1/DATA1 of the code processor).
module channel_register
  import tic_pkg::*;
#(
  parameter int unsigned PCNT_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              hit,
  input  logic [CODE_W-1:0] code_in,
  input  logic [PCNT_W-1:0] count,
  output logic              valid,
  output logic [PCNT_W-1:0] cnt,
  output logic [CODE_W-1:0] code
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= 1'b0;
      cnt   <= '0;
      code  <= '0;
    end else begin
      valid <= hit;
      if (hit) begin
        cnt  <= count;
        code <= code_in;
      end
    end
  end
endmodule
