// Bin width memory: the code density histogram of one interpolator.
//
// One word per interpolator code number. During bin width evaluation the
// calibration controller adds one to the word of every code the calibrator
// produces; with 2^CAL_LOG2 calibration hits in total, word k divided by
// 2^CAL_LOG2 is the width of bin k as a fraction of the clock period. The
// read port is asynchronous so the controller can read, increment and write
// back one word in a single clock cycle (a distributed RAM on an FPGA); this
// is this design's choice, the memory organisation is not published.
//
// Interface: one write port (we/waddr/wdata, written at the clock edge) and
// one combinational read port (raddr/rdata).
module bin_width_mem #(
  parameter int unsigned AW = 8,   // address width = interpolator code width
  parameter int unsigned DW = 22   // word width = CAL_LOG2 + 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
endmodule
