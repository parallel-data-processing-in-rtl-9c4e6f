// Transfer characteristic memory of one interpolator.
//
// Maps an interpolator code number to its fine time Tfine, in units of
// T0/2^FINE_W (0.977 ps for T0 = 2 ns). Word k holds the delay at the end of
// bin k, from 0 up to a whole period (2^FINE_W), so words are FINE_W+1 bits.
// The calibration controller writes it; the level-1 data processing unit
// reads it with one clock cycle of latency (block RAM style). Until the first
// calibration the memory holds an ideal linear characteristic,
// word k = (k+1) * 2^FINE_W / 2^AW; this start-up content is this design's
// choice.
//
// Interface: write port we/waddr/wdata; synchronous read port raddr -> rdata
// one cycle later.
module transfer_mem #(
  parameter int unsigned AW     = 8,
  parameter int unsigned FINE_W = 11
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [FINE_W:0]   wdata,
  input  logic [AW-1:0]     raddr,
  output logic [FINE_W:0]   rdata
);
  logic [FINE_W:0] mem [2**AW];

  initial begin
    for (int k = 0; k < 2**AW; k++)
      mem[k] = (FINE_W+1)'(((k + 1) * (2**FINE_W)) / (2**AW));
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
