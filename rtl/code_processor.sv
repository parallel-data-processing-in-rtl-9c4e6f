// Two-level code processor of one measurement channel.
//
// Level 1 (interpolator result processing): dpu1 converts each channel
// register entry into a timestamp through the channel's transfer memory.
// Level 2 (offset compensation): dpu2 adds the offset word selected by the
// sensor reading from the channel's offset memory. The calibration
// controller (cal_fsm) and the bin width memory fill the transfer memory.
// This two-level organisation follows the published design; the ports and
// the mode rule below are this design's choices.
//
// Modes: while the calibration controller is busy, channel register entries
// go to the controller as calibrator hits and no timestamps are produced;
// otherwise they go to level 1. Calibration is started with cal_start.
//
// Timing: wr3/ts3 three cycles after wr1; one entry per cycle sustained.
// The offset memory is read continuously at sensor_idx, so a new sensor
// reading or offset word applies from two cycles after it changes.
module code_processor
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
  // WR1 / DATA1 from the channel register
  input  logic                    wr1,
  input  logic [PCNT_W-1:0]       cnt,
  input  logic [CODE_W-1:0]       code,
  // calibration control
  input  logic                    cal_start,
  output logic                    cal_busy,
  output logic                    cal_done,
  output cal_state_e              cal_state,
  // offset table write port and sensor reading
  input  logic                    ofs_we,
  input  logic [OFS_AW-1:0]       ofs_waddr,
  input  logic signed [OFS_W-1:0] ofs_wdata,
  input  logic [OFS_AW-1:0]       sensor_idx,
  // WR3 / DATA3 to the sorter / RAM
  output logic                    wr3,
  output logic [TS_W-1:0]         ts3
);
  // calibration datapath
  logic                bw_we;
  logic [CODE_W-1:0]   bw_addr;
  logic [CAL_LOG2:0]   bw_wdata, bw_rdata;
  logic                tf_we;
  logic [CODE_W-1:0]   tf_waddr, tf_raddr;
  logic [FINE_W:0]     tf_wdata, tf_rdata;
  // processing datapath
  logic                meas_wr;
  logic                wr2;
  logic [TS_W-1:0]     ts2;
  logic signed [OFS_W-1:0] offset;

  cal_fsm #(.CAL_LOG2(CAL_LOG2)) u_cal (
    .clk, .rst_n,
    .start (cal_start),
    .hit   (wr1),
    .code  (code),
    .busy  (cal_busy),
    .done  (cal_done),
    .state (cal_state),
    .bw_we, .bw_addr, .bw_wdata, .bw_rdata,
    .tf_we, .tf_addr (tf_waddr), .tf_wdata
  );

  bin_width_mem #(.AW(CODE_W), .DW(CAL_LOG2+1)) u_bw (
    .clk,
    .we    (bw_we),
    .waddr (bw_addr),
    .wdata (bw_wdata),
    .raddr (bw_addr),
    .rdata (bw_rdata)
  );

  transfer_mem #(.AW(CODE_W), .FINE_W(FINE_W)) u_tf (
    .clk,
    .we    (tf_we),
    .waddr (tf_waddr),
    .wdata (tf_wdata),
    .raddr (tf_raddr),
    .rdata (tf_rdata)
  );

  // Level 1 only sees entries while the channel is in measurement mode.
  assign meas_wr = wr1 && !cal_busy;

  dpu1 #(.PCNT_W(PCNT_W)) u_dpu1 (
    .clk, .rst_n,
    .wr1 (meas_wr),
    .cnt, .code,
    .tf_raddr, .tf_rdata,
    .wr2, .ts (ts2)
  );

  offset_mem #(.AW(OFS_AW), .DW(OFS_W)) u_ofs (
    .clk,
    .we    (ofs_we),
    .waddr (ofs_waddr),
    .wdata (ofs_wdata),
    .raddr (sensor_idx),
    .rdata (offset)
  );

  dpu2 #(.TS_W(TS_W), .OFS_W(OFS_W)) u_dpu2 (
    .clk, .rst_n,
    .wr2, .ts_in (ts2),
    .offset,
    .wr3, .ts_out (ts3)
  );
endmodule
