// Data processing unit 2 (level 2): offset compensation.
//
// Adds the channel's signed offset word to each timestamp from level 1,
// TS* = TS + offset, so that all channels share one time scale. The offset
// word comes from the offset table (selected by the sensor reading). With
// the table holding -k for a channel offset k, an interval from channel a to
// channel b becomes t* = t + k_a - k_b, the compensation of eq. (3)-(4).
// The sum wraps modulo 2^TS_W like the period counter. Latency: one cycle
// (wr3 one cycle after wr2); one timestamp per cycle.
module dpu2 #(
  parameter int unsigned TS_W  = 43,
  parameter int unsigned OFS_W = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    wr2,
  input  logic [TS_W-1:0]         ts_in,
  input  logic signed [OFS_W-1:0] offset,
  output logic                    wr3,
  output logic [TS_W-1:0]         ts_out
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr3    <= 1'b0;
      ts_out <= '0;
    end else begin
      wr3 <= wr2;
      if (wr2) ts_out <= ts_in + TS_W'(offset);
    end
  end
endmodule
