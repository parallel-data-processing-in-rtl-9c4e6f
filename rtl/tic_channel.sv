// One measurement channel of the counter: channel register + code processor.
//
// The interpolator of the channel is outside this module; its hit strobe and
// code number enter here. The channel register latches the shared period
// count with the code (1 cycle), and the two-level code processor turns the
// entry into an offset-compensated timestamp (3 cycles), so wr3/ts3 follow a
// hit by 4 cycles. Three such channels work independently and in parallel.
module tic_channel
  import tic_pkg::*;
#(
  parameter int unsigned PCNT_W   = 32,
  parameter int unsigned CAL_LOG2 = 21,
  parameter int unsigned OFS_AW   = 4,
  parameter int unsigned OFS_W    = 16,
  localparam int unsigned TS_W    = PCNT_W + FINE_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    hit,
  input  logic [CODE_W-1:0]       code,
  input  logic [PCNT_W-1:0]       count,
  input  logic                    cal_start,
  output logic                    cal_busy,
  output logic                    cal_done,
  output cal_state_e              cal_state,
  input  logic                    ofs_we,
  input  logic [OFS_AW-1:0]       ofs_waddr,
  input  logic signed [OFS_W-1:0] ofs_wdata,
  input  logic [OFS_AW-1:0]       sensor_idx,
  output logic                    wr3,
  output logic [TS_W-1:0]         ts3
);
  logic              wr1;
  logic [PCNT_W-1:0] cnt1;
  logic [CODE_W-1:0] code1;

  channel_register #(.PCNT_W(PCNT_W)) u_reg (
    .clk, .rst_n,
    .hit, .code_in (code), .count,
    .valid (wr1), .cnt (cnt1), .code (code1)
  );

  code_processor #(
    .PCNT_W(PCNT_W), .CAL_LOG2(CAL_LOG2), .OFS_AW(OFS_AW), .OFS_W(OFS_W)
  ) u_cp (
    .clk, .rst_n,
    .wr1, .cnt (cnt1), .code (code1),
    .cal_start, .cal_busy, .cal_done, .cal_state,
    .ofs_we, .ofs_waddr, .ofs_wdata, .sensor_idx,
    .wr3, .ts3
  );
endmodule
