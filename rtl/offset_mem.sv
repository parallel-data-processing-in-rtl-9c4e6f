// Offset compensation table of one channel.
//
// Holds signed offset words, in units of T0/2^FINE_W, that the level-2 data
// processing unit adds to every timestamp of the channel. The table has one
// word per sensor reading: the index comes from external temperature/voltage
// sensors, so the offset can follow the environment (offsets were seen to
// move by up to 200 ps over -10..60 C). The depth, the word width and the
// direct use of the sensor reading as the address are this design's choices.
// The words are written from outside (the host), as the offset values come
// from a separate measurement. All words start at zero.
//
// Interface: write port we/waddr/wdata; synchronous read raddr -> rdata one
// cycle later.
module offset_mem #(
  parameter int unsigned AW = 4,
  parameter int unsigned DW = 16
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [AW-1:0]        waddr,
  input  logic signed [DW-1:0] wdata,
  input  logic [AW-1:0]        raddr,
  output logic signed [DW-1:0] rdata
);
  logic signed [DW-1:0] mem [2**AW];

  initial begin
    for (int k = 0; k < 2**AW; k++) mem[k] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
