// Testbench of tic_channel: a free-running period count, random hits with
// random codes, offset words for two sensor readings. Each timestamp must be
// count_at_hit*2048 + 8*(code+1) + offset (start-up linear characteristic)
// and appear 4 cycles after the hit. A short calibration (CAL_LOG2 = 12) with
// all hits on codes 0..127 must then give TF[k] = 16*(k+1) for a flat
// histogram of 32 hits per code, which the last phase checks.
module tb_tic_channel;
  import tic_pkg::*;
  localparam int PW = 32, TW = PW + FINE_W, CL = 12;
  logic clk = 0, rst_n = 0;
  logic hit = 0;
  logic [CODE_W-1:0] code = '0;
  logic [PW-1:0] count = 32'hFFFF_FF00;
  logic cal_start = 0, cal_busy, cal_done;
  cal_state_e cal_state;
  logic ofs_we = 0;
  logic [3:0] ofs_waddr = '0, sensor_idx = '0;
  logic signed [15:0] ofs_wdata = '0;
  logic wr3;
  logic [TW-1:0] ts3;
  int checks = 0, failures = 0;
  int tf [256];
  logic exp_v [$];
  logic [TW-1:0] exp_ts [$];
  int cur_ofs = 0;

  tic_channel #(.PCNT_W(PW), .CAL_LOG2(CL)) dut (
    .clk, .rst_n, .hit, .code, .count, .cal_start, .cal_busy, .cal_done, .cal_state,
    .ofs_we, .ofs_waddr, .ofs_wdata, .sensor_idx, .wr3, .ts3);

  always #5 clk = ~clk;
  always @(posedge clk) count <= count + 1'b1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic v, input logic [CODE_W-1:0] k, input bit measure);
    @(negedge clk);
    hit = v; code = k;
    exp_v.push_back(v && measure);
    exp_ts.push_back({count, {FINE_W{1'b0}}} + TW'(tf[k]) + TW'(cur_ofs));
    @(posedge clk);
    #1;
    if (exp_v.size() == 4) begin
      logic ev;
      logic [TW-1:0] et;
      ev = exp_v.pop_front();
      et = exp_ts.pop_front();
      checks++;
      if (wr3 !== ev || (ev && ts3 !== et)) begin
        failures++;
        if (failures < 10) $display("wr3=%b exp %b ts3=%h exp %h", wr3, ev, ts3, et);
      end
    end
  endtask

  initial begin
    for (int k = 0; k < 256; k++) tf[k] = 8 * (k + 1);
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 600; i++) step(1'($urandom_range(0, 1)), CODE_W'($urandom), 1);
    ofs_we = 1; ofs_waddr = 4'd5; ofs_wdata = -16'sd1609; step(0, '0, 0);
    ofs_we = 0; sensor_idx = 4'd5; step(0, '0, 0);
    repeat (3) step(0, '0, 1);
    cur_ofs = -1609;
    for (int i = 0; i < 600; i++) step(1'($urandom_range(0, 1)), CODE_W'($urandom), 1);
    repeat (5) step(0, '0, 1);
    // flat calibration over codes 0..127: 32 hits each
    cal_start = 1; step(0, '0, 0);
    cal_start = 0; step(0, '0, 0);
    while (cal_state != CAL_COUNT) step(0, '0, 0);
    for (int r = 0; r < 32; r++)
      for (int k = 0; k < 128; k++) step(1, CODE_W'(k), 0);
    while (!cal_done) step(0, '0, 0);
    for (int k = 0; k < 256; k++) tf[k] = (k < 128) ? 16 * (k + 1) : 2048;
    repeat (5) step(0, '0, 0);
    for (int i = 0; i < 600; i++) step(1'($urandom_range(0, 1)), CODE_W'($urandom), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
