// Three-channel interpolating time-interval counter: digital data processing.
//
// A shared period counter counts reference clock periods (T0 = 2 ns) and is
// the common time scale. Each of the NCH channels latches the count when its
// interpolator reports an input event and converts the pair (count, code)
// into a timestamp with 11 fraction bits, TS = (N-1)*T0 + TF[code]
// (level 1), then adds the channel's offset word chosen by the sensor reading
// (level 2). The channels work in parallel and independently. A sorter merges
// their streams into chronological order and writes them, tagged with the
// channel number, into the output RAM, which the host empties.
//
// The interpolators, the calibration pulse source, the environment sensors
// and the host link are outside: their signals are ports. Each channel can
// run its code density calibration (cal_start) on its own; the offset tables
// are written through ofs_*.
//
// Interface (all synchronous to clk, the reference clock):
//   tc_clear            restart the period counter at zero; pc_wrap pulses
//                       when the count wraps to zero
//   ip_hit/ip_code      per channel: event strobe and interpolator code
//   cal_start/busy/done/state  per channel calibration control
//   ofs_we/ch/addr/data offset table write; sensor_idx selects the word used
//   out_valid/out_ch/out_ts/out_pop  head of the output RAM, first-word
//                       fall-through; out_pop removes it
//   out_level           words in the output RAM
//   overflow            sticky per channel: a timestamp was lost
// Latency: a hit reaches the sorter after 4 cycles; a released timestamp is
// visible on out_* one cycle after it is written to the output RAM.
//
// Published: 3 channels, T0 = 2 ns, 11 fraction bits, 256 code numbers,
// 2^21 (about 2 million) calibration hits, the two-level processing and the
// chronological order of the output. This design's choices: the 32-bit period
// count, 16-entry x 16-bit offset tables, 16-word sorter queues and a
// 1024-word output RAM.
module tic_top
  import tic_pkg::*;
#(
  parameter int unsigned PCNT_W    = 32,
  parameter int unsigned CAL_LOG2  = 21,
  parameter int unsigned OFS_AW    = 4,
  parameter int unsigned OFS_W     = 16,
  parameter int unsigned QDEPTH    = 16,
  parameter int unsigned OUT_DEPTH = 1024,
  localparam int unsigned TS_W     = PCNT_W + FINE_W,
  localparam int unsigned CH_W     = $clog2(NCH)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         tc_clear,
  output logic [PCNT_W-1:0]            period_count,
  output logic                         pc_wrap,
  // interpolators
  input  logic [NCH-1:0]               ip_hit,
  input  logic [NCH-1:0][CODE_W-1:0]   ip_code,
  // calibration
  input  logic [NCH-1:0]               cal_start,
  output logic [NCH-1:0]               cal_busy,
  output logic [NCH-1:0]               cal_done,
  output cal_state_e [NCH-1:0]         cal_state,
  // offset tables and sensor reading
  input  logic                         ofs_we,
  input  logic [CH_W-1:0]              ofs_ch,
  input  logic [OFS_AW-1:0]            ofs_addr,
  input  logic signed [OFS_W-1:0]      ofs_wdata,
  input  logic [OFS_AW-1:0]            sensor_idx,
  // output RAM read side
  output logic                         out_valid,
  output logic [CH_W-1:0]              out_ch,
  output logic [TS_W-1:0]              out_ts,
  input  logic                         out_pop,
  output logic [$clog2(OUT_DEPTH):0]   out_level,
  output logic [NCH-1:0]               overflow
);
  logic [NCH-1:0]           wr3;
  logic [NCH-1:0][TS_W-1:0] ts3;
  logic                     s_valid, s_ready;
  logic [CH_W-1:0]          s_ch;
  logic [TS_W-1:0]          s_ts;
  logic [NCH-1:0]           drop;
  logic                     ram_empty;

  period_counter #(.W(PCNT_W)) u_pc (
    .clk, .rst_n, .clear (tc_clear), .count (period_count), .wrap (pc_wrap)
  );

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    tic_channel #(
      .PCNT_W(PCNT_W), .CAL_LOG2(CAL_LOG2), .OFS_AW(OFS_AW), .OFS_W(OFS_W)
    ) u_ch (
      .clk, .rst_n,
      .hit        (ip_hit[c]),
      .code       (ip_code[c]),
      .count      (period_count),
      .cal_start  (cal_start[c]),
      .cal_busy   (cal_busy[c]),
      .cal_done   (cal_done[c]),
      .cal_state  (cal_state[c]),
      .ofs_we     (ofs_we && (ofs_ch == CH_W'(c))),
      .ofs_waddr  (ofs_addr),
      .ofs_wdata  (ofs_wdata),
      .sensor_idx (sensor_idx),
      .wr3        (wr3[c]),
      .ts3        (ts3[c])
    );
  end

  ts_sorter #(.PCNT_W(PCNT_W), .OFS_W(OFS_W), .QDEPTH(QDEPTH), .PIPE_LAT(4)) u_sort (
    .clk, .rst_n,
    .in_valid  (wr3),
    .in_ts     (ts3),
    .now       (period_count),
    .out_valid (s_valid),
    .out_ch    (s_ch),
    .out_ts    (s_ts),
    .out_ready (s_ready),
    .overflow,
    .drop
  );

  sync_fifo #(.W(CH_W + TS_W), .DEPTH(OUT_DEPTH)) u_ram (
    .clk, .rst_n,
    .push  (s_valid),
    .din   ({s_ch, s_ts}),
    .full  (),
    .pop   (out_pop && !ram_empty),
    .dout  ({out_ch, out_ts}),
    .empty (ram_empty),
    .level (out_level)
  );

  // The sorter stalls while the output RAM is full.
  assign s_ready   = (out_level != ($clog2(OUT_DEPTH)+1)'(OUT_DEPTH));
  assign out_valid = !ram_empty;
endmodule
