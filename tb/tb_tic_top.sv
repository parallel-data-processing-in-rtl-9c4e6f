// End-to-end testbench of tic_top at reduced size: 16-bit period counter (so
// the time scale wraps during the run), 2^12 calibration hits per channel,
// 32-word output RAM.
//
// Three behavioural interpolators (tb_interp_pkg) with different non-linear
// bin widths turn event times into codes. Channel i sees every event late by
// its input offset k_i (1.571, 1.175 and 0.939 ns). The run:
//   1. writes the offset tables (reading 0: -k_i; reading 1: shifted words for
//      another temperature; reading 15 stays zero = no compensation);
//   2. calibrates all channels at once with a common calibrator (codes of
//      uniformly distributed fine times) and builds its own histograms;
//   3. measures a 4.8 ns interval START->STOP in all six input pairs,
//      compensated (reading 0) and uncompensated (reading 15);
//   4. sends random events and close pairs whose hit order differs from
//      their true order, with reading 1, across the wrap of the counter;
//   5. stops reading the output RAM while events keep coming, so the RAM
//      fills, the sorter stalls and the channel queues overflow.
// Every delivered timestamp is compared with cnt*2048 + TF[code] + offset
// computed here from the testbench's own histograms; the output must be in
// time order and hold every event that was not reported dropped. The mean
// intervals must match 4.8 ns (compensated) and 4.8 ns + k_stop - k_start
// (uncompensated) within 20 ps. Each mechanism must have happened at least
// once: calibration done, wrap, sensor switch, reordering, watermark
// release, RAM-full stall and overflow.
module tb_tic_top;
  import tic_pkg::*;
  import tb_interp_pkg::*;

  localparam int PW = 16, CL = 12, OUTD = 32, QD = 16;
  localparam int TW = PW + FINE_W;
  localparam longint PER = 65536;                  // model units per period
  localparam int R = 16;                           // repeats per input pair
  localparam int WATCHDOG = 400000;                // cycles

  logic clk = 0, rst_n = 0, tc_clear = 0;
  logic [PW-1:0] period_count;
  logic pc_wrap;
  logic [2:0] ip_hit = '0;
  logic [2:0][CODE_W-1:0] ip_code = '0;
  logic [2:0] cal_start = '0, cal_busy, cal_done;
  cal_state_e [2:0] cal_state;
  logic ofs_we = 0;
  logic [1:0] ofs_ch = '0;
  logic [3:0] ofs_addr = '0, sensor_idx = '0;
  logic signed [15:0] ofs_wdata = '0;
  logic out_valid, out_pop = 0;
  logic [1:0] out_ch;
  logic [TW-1:0] out_ts;
  logic [$clog2(OUTD):0] out_level;
  logic [2:0] overflow;

  tic_top #(.PCNT_W(PW), .CAL_LOG2(CL), .QDEPTH(QD), .OUT_DEPTH(OUTD)) dut (.*);

  always #5 clk = ~clk;


  int checks = 0, failures = 0;

  // ---------------------------------------------------------------- model
  real k_ps [3] = '{1571.0, 1175.0, 939.0};      // input offsets of the channels
  int  ofs_word [16][3];                          // offset table contents
  int  tf [3][256];                               // expected transfer functions
  int  hist [3][256];

  typedef struct {
    bit v [3];
    int code [3];
  } slot_t;
  slot_t sched [longint];                         // hits by absolute period

  typedef struct {
    longint abs_ts;                               // unwrapped expected timestamp
    int     ch;
    longint hit_p;                                // period of the hit
    int     tag;                                  // interval pair id, -1 none
    bit     stop;
  } ev_t;
  ev_t exp_ev [$];

  typedef struct {
    int ch;
    logic [TW-1:0] ts;
  } out_t;
  out_t got [$];
  out_t dropped [$];

  longint abs_cnt = 0;                            // periods since reset release
  int cnt_mismatch = 0;
  int n_caldone [3] = '{0, 0, 0};
  int n_wrap = 0, n_ramfull = 0, n_wm = 0, n_sensor_sw = 0;
  longint sensor_at [$];                          // period at which a reading applies
  int sensor_val [$];
  int cur_sensor = 0;
  longint stall_from = -1, stall_to = -1;

  function automatic longint units(input real ps);
    return longint'(ps * real'(PER) / 2000.0);
  endfunction

  // Schedule one event seen by channel ch at observed time obs (model
  // units); returns 0 if that channel already has a hit in that period.
  function automatic bit add_event(input int ch, input longint obs, input int sensor,
                                   input int tag, input bit stop);
    longint p;
    int fine, code;
    ev_t e;
    p = obs / PER;
    fine = int'(obs % PER);
    if (sched.exists(p) && sched[p].v[ch]) return 0;
    code = code_of(ch, fine);
    if (!sched.exists(p)) begin
      slot_t z;
      z.v = '{0, 0, 0};
      z.code = '{0, 0, 0};
      sched[p] = z;
    end
    sched[p].v[ch] = 1;
    sched[p].code[ch] = code;
    e.abs_ts = p * 2048 + longint'(tf[ch][code]) + longint'(ofs_word[sensor][ch]);
    e.ch = ch;
    e.hit_p = p;
    e.tag = tag;
    e.stop = stop;
    exp_ev.push_back(e);
    return 1;
  endfunction

  // ------------------------------------------------------- cycle driver
  task automatic run_until(input longint last);
    while (abs_cnt < last) begin
      @(negedge clk);
      if (period_count !== PW'(abs_cnt)) cnt_mismatch++;
      if (sensor_at.size() > 0 && abs_cnt == sensor_at[0]) begin
        sensor_idx = 4'(sensor_val[0]);
        void'(sensor_at.pop_front());
        void'(sensor_val.pop_front());
        n_sensor_sw++;
      end
      for (int c = 0; c < 3; c++) begin
        ip_hit[c] = sched.exists(abs_cnt) && sched[abs_cnt].v[c];
        ip_code[c] = ip_hit[c] ? CODE_W'(sched[abs_cnt].code[c]) : '0;
      end
      if (sched.exists(abs_cnt)) sched.delete(abs_cnt);
      out_pop = (abs_cnt >= stall_from && abs_cnt < stall_to) ? 1'b0
              : ($urandom_range(0, 99) < 85);
      #1;
      if (out_valid && out_pop) begin
        out_t o;
        o.ch = int'(out_ch);
        o.ts = out_ts;
        got.push_back(o);
      end
      for (int c = 0; c < 3; c++)
        if (dut.u_sort.drop[c]) begin
          out_t d;
          d.ch = c;
          d.ts = dut.ts3[c];
          dropped.push_back(d);
        end
      if (dut.s_valid && !dut.s_ready) n_ramfull++;
      if (dut.s_valid && dut.s_ready && (|dut.u_sort.q_empty)) n_wm++;
      @(posedge clk);
      #1;
      abs_cnt++;
      if (pc_wrap) n_wrap++;
      for (int c = 0; c < 3; c++) if (cal_done[c]) n_caldone[c]++;
    end
  endtask

  task automatic expect_true(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    longint t0, p0;
    int n;
    for (int c = 0; c < 3; c++) init_model(c, 17 + 101 * c);
    for (int s = 0; s < 16; s++)
      for (int c = 0; c < 3; c++) ofs_word[s][c] = 0;
    for (int c = 0; c < 3; c++) begin
      ofs_word[0][c] = -int'($floor(k_ps[c] * 2048.0 / 2000.0 + 0.5));
      ofs_word[1][c] = ofs_word[0][c] - 100 * (c + 1);   // another temperature
      for (int k = 0; k < 256; k++) hist[c][k] = 0;
    end

    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(posedge clk); #1; abs_cnt = 1;

    // 1. offset tables
    for (int s = 0; s < 2; s++)
      for (int c = 0; c < 3; c++) begin
        @(negedge clk);
        ofs_we = 1; ofs_ch = 2'(c); ofs_addr = 4'(s); ofs_wdata = 16'(ofs_word[s][c]);
        @(posedge clk); #1; abs_cnt++;
      end
    @(negedge clk); ofs_we = 0;
    @(posedge clk); #1; abs_cnt++;

    // 2. calibration of all channels with one calibrator
    @(negedge clk); cal_start = 3'b111;
    @(posedge clk); #1; abs_cnt++;
    @(negedge clk); cal_start = 3'b000;
    while (cal_state[0] != CAL_COUNT) begin
      @(posedge clk); #1; abs_cnt++;
    end
    for (int i = 0; i < 2**CL; i++) begin
      int fine;
      @(negedge clk);
      fine = $urandom_range(0, int'(PER) - 1);
      for (int c = 0; c < 3; c++) begin
        ip_hit[c] = 1;
        ip_code[c] = CODE_W'(code_of(c, fine));
        hist[c][ip_code[c]]++;
      end
      @(posedge clk); #1; abs_cnt++;
    end
    @(negedge clk); ip_hit = '0;
    while (cal_busy != 3'b000) begin
      @(posedge clk); #1; abs_cnt++;
      for (int c = 0; c < 3; c++) if (cal_done[c]) n_caldone[c]++;
    end
    for (int c = 0; c < 3; c++) begin
      longint acc;
      acc = 0;
      for (int k = 0; k < 256; k++) begin
        acc += hist[c][k];
        tf[c][k] = int'((acc + (1 << (CL - FINE_W - 1))) >> (CL - FINE_W));
      end
    end
    $display("calibration done at period %0d", abs_cnt);

    // 3. the six input pairs, compensated (reading 0) then not (reading 15)
    p0 = abs_cnt + 50;
    sensor_at.push_back(p0 - 20); sensor_val.push_back(0);
    n = 0;
    for (int comp = 0; comp < 2; comp++) begin
      int s;
      s = (comp != 0) ? 15 : 0;
      if (comp != 0) begin
        sensor_at.push_back(p0 - 20); sensor_val.push_back(15);
      end
      for (int a = 0; a < 3; a++)
        for (int b = 0; b < 3; b++) begin
          if (a == b) continue;
          for (int r = 0; r < R; r++) begin
            t0 = p0 * PER + longint'($urandom_range(0, int'(PER) - 1));
            void'(add_event(a, t0 + units(k_ps[a]), s, comp * 100 + a * 10 + b, 0));
            void'(add_event(b, t0 + units(4800.0) + units(k_ps[b]), s, comp * 100 + a * 10 + b, 1));
            p0 += 8;
          end
        end
      p0 += 60;
    end
    run_until(p0);

    // 4. random traffic and close pairs, reading 1, across the counter wrap
    if (PW <= 20 && abs_cnt < (longint'(1) << PW) - 3000) p0 = (longint'(1) << PW) - 3000;
    else p0 = abs_cnt + 50;
    sensor_at.push_back(p0 - 20); sensor_val.push_back(1);
    for (int i = 0; i < 6000; i++) begin
      for (int c = 0; c < 3; c++)
        if ($urandom_range(0, 99) < 15)
          void'(add_event(c, (p0 + i) * PER + longint'($urandom_range(0, int'(PER) - 1)), 1, -1, 0));
      if (i % 50 == 10) begin
        // true order ch0 then ch2, 0.5 ns apart; ch2 is hit first
        t0 = (p0 + i) * PER + PER - units(1700.0);
        void'(add_event(0, t0 + units(k_ps[0]), 1, -1, 0));
        void'(add_event(2, t0 + units(500.0) + units(k_ps[2]), 1, -1, 0));
      end
    end
    p0 += 6100;

    // 5. output RAM not read while traffic goes on
    stall_from = p0;
    stall_to = p0 + OUTD + 400;
    for (int i = 0; i < OUTD + 300; i++)
      for (int c = 0; c < 3; c++)
        if ($urandom_range(0, 99) < 60)
          void'(add_event(c, (p0 + i) * PER + longint'($urandom_range(0, int'(PER) - 1)), 1, -1, 0));
    p0 += OUTD + 400;
    run_until(p0 + 2 * OUTD + 200);

    // ------------------------------------------------------- checking
    // remove what the sorter reported as dropped
    foreach (dropped[d]) begin
      int idx;
      idx = -1;
      foreach (exp_ev[e])
        if (exp_ev[e].ch == dropped[d].ch && TW'(exp_ev[e].abs_ts) == dropped[d].ts) begin
          idx = e;
          break;
        end
      expect_true(idx >= 0, "dropped timestamp was never sent");
      if (idx >= 0) exp_ev.delete(idx);
    end
    exp_ev.sort() with ((item.abs_ts << 2) | longint'(item.ch));
    expect_true(cnt_mismatch == 0, "period counter follows the clock");
    expect_true(exp_ev.size() == got.size(),
                $sformatf("delivered %0d of %0d", got.size(), exp_ev.size()));
    begin
      int nerr, nreorder;
      real sum [200];
      int  num [200];
      nerr = 0;
      nreorder = 0;
      for (int i = 0; i < 200; i++) begin sum[i] = 0.0; num[i] = 0; end
      for (int i = 0; i < exp_ev.size() && i < got.size(); i++) begin
        checks++;
        if (got[i].ch != exp_ev[i].ch || got[i].ts != TW'(exp_ev[i].abs_ts)) begin
          failures++;
          if (nerr++ < 8)
            $display("output %0d: ch%0d %h, expected ch%0d %h", i, got[i].ch, got[i].ts,
                     exp_ev[i].ch, TW'(exp_ev[i].abs_ts));
        end
        if (i > 0 && exp_ev[i].hit_p < exp_ev[i-1].hit_p) nreorder++;
      end
      // intervals START -> STOP from the delivered timestamps
      for (int i = 0; i < exp_ev.size() && i < got.size(); i++)
        if (exp_ev[i].tag >= 0 && !exp_ev[i].stop)
          for (int j = i + 1; j < exp_ev.size() && j < got.size(); j++)
            if (exp_ev[j].tag == exp_ev[i].tag && exp_ev[j].stop) begin
              logic [TW-1:0] d;
              d = got[j].ts - got[i].ts;
              sum[exp_ev[i].tag] += real'(d) * 2000.0 / 2048.0;
              num[exp_ev[i].tag]++;
              break;
            end
      $display("pair      mean t* (compensated)   mean t (uncompensated)");
      for (int a = 0; a < 3; a++)
        for (int b = 0; b < 3; b++) begin
          real mc, mu, eu;
          if (a == b) continue;
          mc = sum[a * 10 + b] / real'(num[a * 10 + b]);
          mu = sum[100 + a * 10 + b] / real'(num[100 + a * 10 + b]);
          eu = 4800.0 + k_ps[b] - k_ps[a];
          $display("%0d -> %0d   %9.1f ps (%0d)        %9.1f ps (expected %7.1f)", a + 1, b + 1,
                   mc, num[a * 10 + b], mu, eu);
          expect_true(num[a * 10 + b] == R && num[100 + a * 10 + b] == R, "all pairs delivered");
          expect_true(mc > 4780.0 && mc < 4820.0, "compensated interval near 4.8 ns");
          expect_true(mu > eu - 20.0 && mu < eu + 20.0, "uncompensated interval");
        end
      $display("reordered %0d, watermark releases %0d, RAM-full stall cycles %0d, dropped %0d, wraps %0d, sensor switches %0d",
               nreorder, n_wm, n_ramfull, dropped.size(), n_wrap, n_sensor_sw);
      expect_true(nreorder > 0, "reordering happened");
    end
    for (int c = 0; c < 3; c++) expect_true(n_caldone[c] == 1, "calibration done once per channel");
    if (PW <= 20) expect_true(n_wrap > 0, "period counter wrapped");
    expect_true(n_sensor_sw >= 3, "sensor reading switched");
    expect_true(n_wm > 0, "watermark release happened");
    expect_true(n_ramfull > 0, "output RAM full stall happened");
    expect_true(dropped.size() > 0 && overflow != 3'b000, "queue overflow happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
