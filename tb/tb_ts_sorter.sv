// Testbench of ts_sorter. Three channels send increasing timestamps on random
// cycles, each shifted by its own offset (the published channel offsets
// -1.571/-1.175/-0.939 ns and, on one channel in one phase, an offset near
// the most negative allowed), while the period count runs through its wrap.
// The consumer is stalled at random and, in one phase, long enough for the
// queues to overflow. Checks: the output equals the sorted list of all
// timestamps that were not dropped (ties by channel number); the channel tag
// of each output; drops happen only on a full queue; the sticky overflow
// flags; every timestamp is delivered once the watermark has passed.
module tb_ts_sorter;
  import tic_pkg::*;
  localparam int PW = 32, TW = PW + FINE_W, OW = 16, QD = 16;
  logic clk = 0, rst_n = 0;
  logic [2:0] in_valid = '0;
  logic [2:0][TW-1:0] in_ts = '0;
  logic [PW-1:0] now;
  logic out_valid, out_ready = 0;
  logic [1:0] out_ch;
  logic [TW-1:0] out_ts;
  logic [2:0] overflow, drop;
  int checks = 0, failures = 0;
  longint sent [$];
  longint got [$];
  int ndrop = 0, nstall = 0;
  logic [TW-1:0] base;

  ts_sorter #(.PCNT_W(PW), .OFS_W(OW), .QDEPTH(QD), .PIPE_LAT(4)) dut (
    .clk, .rst_n, .in_valid, .in_ts, .now, .out_valid, .out_ch, .out_ts, .out_ready,
    .overflow, .drop);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint key(input logic [TW-1:0] ts, input int ch);
    logic [TW-1:0] rel;
    rel = ts - base;
    return (longint'(rel) << 2) | longint'(ch);
  endfunction

  // consumer side

  initial begin
    int ofs [3];
    now = PW'(32'hFFFF_F000);            // the count wraps during the run
    base = {now - PW'(100), {FINE_W{1'b0}}};
    ofs = '{-1609, -1203, -962};
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 12000; i++) begin
      @(negedge clk);
      if (i == 8000) ofs[2] = -32000;     // extreme negative offset on channel 2
      for (int c = 0; c < 3; c++) begin
        in_valid[c] = (i < 10000) && ($urandom_range(0, 99) < 20);
        begin
          logic [PW-1:0] per;
          logic [FINE_W-1:0] fine;
          logic [TW-1:0] t;
          per = now - PW'(4);
          fine = FINE_W'($urandom);
          t = {per, fine};
          in_ts[c] = t + TW'(ofs[c]);
        end
        if (i >= 8000 && c == 2) in_valid[c] = in_valid[c] && (i > 8100);
      end
      if (i >= 3000 && i < 3200) out_ready = 0;          // long stall: queues overflow
      else out_ready = ($urandom_range(0, 99) < 80);
      #1;
      if (out_valid && !out_ready) nstall++;
      if (out_valid && out_ready) got.push_back(key(out_ts, int'(out_ch)));
      for (int c = 0; c < 3; c++) begin
        if (in_valid[c]) begin
          if (drop[c]) ndrop++;
          else sent.push_back(key(in_ts[c], c));
        end
      end
      @(posedge clk);
      #1;
      now = now + 1'b1;
    end
    sent.sort();
    checks++;
    if (sent.size() != got.size()) begin
      failures++;
      $display("sent %0d, delivered %0d", sent.size(), got.size());
    end
    for (int k = 0; k < sent.size() && k < got.size(); k++) begin
      checks++;
      if (sent[k] != got[k]) begin
        failures++;
        if (failures < 10) $display("output %0d: key %h exp %h", k, got[k], sent[k]);
      end
    end
    checks++;
    if (ndrop == 0 || overflow == 3'b000) begin failures++; $display("no overflow seen"); end
    checks++;
    if (nstall == 0) begin failures++; $display("no stall seen"); end
    $display("delivered %0d, dropped %0d, stalled cycles %0d, overflow %b", got.size(), ndrop, nstall, overflow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
