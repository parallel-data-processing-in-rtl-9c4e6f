// Data processing unit 1 (level 1): interpolator result processing.
//
// Turns a channel register entry (period count N-1 and interpolator code)
// into a timestamp on the common time scale, eq. (1):
//   TS = (N-1)*T0 + Tfine,  Tfine = TF[code]  (T0 = 2^FINE_W units).
// The code addresses the transfer memory directly (combinational address);
// the fine time returns one cycle later and the sum is registered, so the
// timestamp appears 2 cycles after wr1 (WR2/DATA2). One timestamp per cycle
// can be accepted. TF[code] may equal one whole period; the addition carries
// into the period count. The pipeline depth is this design's choice.
module dpu1
  import tic_pkg::*;
#(
  parameter int unsigned PCNT_W = 32,
  localparam int unsigned TS_W  = PCNT_W + FINE_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr1,
  input  logic [PCNT_W-1:0] cnt,
  input  logic [CODE_W-1:0] code,
  // transfer memory read port
  output logic [CODE_W-1:0] tf_raddr,
  input  logic [FINE_W:0]   tf_rdata,
  output logic              wr2,
  output logic [TS_W-1:0]   ts
);
  logic              v1;
  logic [PCNT_W-1:0] cnt1;

  assign tf_raddr = code;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1   <= 1'b0;
      cnt1 <= '0;
      wr2  <= 1'b0;
      ts   <= '0;
    end else begin
      v1  <= wr1;
      if (wr1) cnt1 <= cnt;
      wr2 <= v1;
      if (v1) ts <= {cnt1, {FINE_W{1'b0}}} + TS_W'(tf_rdata);
    end
  end
endmodule
