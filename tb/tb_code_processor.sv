// Testbench of code_processor (CAL_LOG2 = 12). Phases:
//   1. measurement with the start-up linear characteristic, offset 0;
//   2. offset words written for several sensor readings, the reading changed;
//   3. calibration with 4096 hits from a non-uniform code distribution; no
//      timestamp may come out while it runs;
//   4. measurement with the calibrated characteristic.
// Expected timestamps are cnt*2048 + TF[code] + offset, with TF worked out in
// the testbench from its own histogram of the calibration codes; each must
// appear exactly 3 cycles after its entry.
module tb_code_processor;
  import tic_pkg::*;
  localparam int PW = 32, TW = PW + FINE_W, CL = 12;
  logic clk = 0, rst_n = 0;
  logic wr1 = 0;
  logic [PW-1:0] cnt = '0;
  logic [CODE_W-1:0] code = '0;
  logic cal_start = 0, cal_busy, cal_done;
  cal_state_e cal_state;
  logic ofs_we = 0;
  logic [3:0] ofs_waddr = '0, sensor_idx = '0;
  logic signed [15:0] ofs_wdata = '0;
  logic wr3;
  logic [TW-1:0] ts3;
  int checks = 0, failures = 0;
  int tf [256];
  int hist [256];
  int ofs_tab [16];
  // expected output per cycle: 3-deep delay line of (valid, ts)
  logic exp_v [$];
  logic [TW-1:0] exp_ts [$];
  int exp_k [$];
  int cur_ofs;

  code_processor #(.PCNT_W(PW), .CAL_LOG2(CL)) dut (
    .clk, .rst_n, .wr1, .cnt, .code, .cal_start, .cal_busy, .cal_done, .cal_state,
    .ofs_we, .ofs_waddr, .ofs_wdata, .sensor_idx, .wr3, .ts3);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one cycle of stimulus; expected result is compared 3 cycles later
  task automatic step(input logic v, input logic [PW-1:0] c, input logic [CODE_W-1:0] k, input bit measure);
    @(negedge clk);
    wr1 = v; cnt = c; code = k;
    exp_v.push_back(v && measure);
    exp_k.push_back(int'(k));
    exp_ts.push_back({c, {FINE_W{1'b0}}} + TW'(tf[k]) + TW'(cur_ofs));
    @(posedge clk);
    #1;
    if (exp_v.size() == 3) begin
      logic ev;
      logic [TW-1:0] et;
      int kk;
      ev = exp_v.pop_front();
      et = exp_ts.pop_front();
      kk = exp_k.pop_front();
      checks++;
      if (wr3 !== ev || (ev && ts3 !== et)) begin
        failures++;
        if (failures < 10) $display("wr3=%b exp %b ts3=%h exp %h code %0d", wr3, ev, ts3, et, kk);
      end
    end
  endtask

  function automatic int pick_code();
    int r;
    r = $urandom_range(0, 99);
    if (r < 50) return $urandom_range(20, 40);
    if (r < 80) return $urandom_range(70, 100);
    return $urandom_range(200, 245);
  endfunction

  initial begin
    int acc, sent;
    for (int k = 0; k < 256; k++) begin tf[k] = 8 * (k + 1); hist[k] = 0; end
    for (int a = 0; a < 16; a++) ofs_tab[a] = 0;
    cur_ofs = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // 1. linear characteristic
    for (int i = 0; i < 500; i++) step(1'($urandom_range(0, 1)), $urandom, CODE_W'($urandom), 1);
    // 2. offsets: -1.571 ns, -1.175 ns, -0.939 ns and one positive word
    ofs_tab[1] = -1609; ofs_tab[2] = -1203; ofs_tab[3] = -962; ofs_tab[9] = 3000;
    foreach (ofs_tab[a]) begin
      ofs_we = 1; ofs_waddr = 4'(a); ofs_wdata = 16'(ofs_tab[a]); step(0, '0, '0, 0);
    end
    ofs_we = 0; step(0, '0, '0, 0);
    for (int s = 1; s < 10; s += 2) begin
      repeat (3) step(0, '0, '0, 1);   // let entries in flight leave first
      sensor_idx = 4'(s); step(0, '0, '0, 0);
      // the new word is used from two cycles after the change
      repeat (3) step(0, '0, '0, 1);
      cur_ofs = ofs_tab[s];
      for (int i = 0; i < 200; i++) step(1'($urandom_range(0, 1)), $urandom, CODE_W'($urandom), 1);
    end
    // 3. calibration
    repeat (4) step(0, '0, '0, 1);
    cal_start = 1; step(0, '0, '0, 0);
    cal_start = 0; step(0, '0, '0, 0);
    sent = 0;
    while (!cal_done) begin
      logic v;
      logic [CODE_W-1:0] k;
      v = ($urandom_range(0, 2) != 0);
      k = CODE_W'(pick_code());
      // the controller counts an entry when it is in the counting state
      if (v && cal_state == CAL_COUNT) begin
        hist[k]++;
        sent++;
      end
      step(v, $urandom, k, 0);
    end
    checks++;
    if (sent != 2**CL) begin failures++; $display("calibration hits %0d", sent); end
    acc = 0;
    for (int k = 0; k < 256; k++) begin
      acc += hist[k];
      tf[k] = (acc + 1) >> 1;       // round(sum / 2^(12-11))
    end
    repeat (4) step(0, '0, '0, 0);
    // 4. calibrated characteristic, offset word of sensor reading 9
    for (int i = 0; i < 1000; i++) step(1'($urandom_range(0, 1)), $urandom, CODE_W'(pick_code()), 1);
    for (int i = 0; i < 300; i++) step(1, $urandom, CODE_W'($urandom), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
