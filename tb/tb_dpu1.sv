// Testbench of dpu1: a reference transfer table is served with one cycle of
// read latency; random entries are sent on random cycles and each timestamp
// must equal cnt*2048 + TF[code] (modulo 2^43) exactly two cycles after wr1.
module tb_dpu1;
  import tic_pkg::*;
  localparam int PW = 32, TW = PW + FINE_W;
  logic clk = 0, rst_n = 0;
  logic wr1 = 0;
  logic [PW-1:0] cnt = '0;
  logic [CODE_W-1:0] code = '0, tf_raddr;
  logic [FINE_W:0] tf_rdata = '0;
  logic wr2;
  logic [TW-1:0] ts;
  logic [FINE_W:0] table_tf [256];
  logic [TW-1:0] exp_q [$];
  logic exp_v [$];
  int checks = 0, failures = 0;

  dpu1 #(.PCNT_W(PW)) dut (.clk, .rst_n, .wr1, .cnt, .code, .tf_raddr, .tf_rdata, .wr2, .ts);

  always #5 clk = ~clk;
  always @(posedge clk) tf_rdata <= table_tf[tf_raddr];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int acc;
    acc = 0;
    for (int k = 0; k < 256; k++) begin
      acc += $urandom_range(0, 16);
      table_tf[k] = (FINE_W+1)'(acc > 2048 ? 2048 : acc);
    end
    table_tf[255] = 12'd2048;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      wr1 = ($urandom_range(0, 1) == 0);
      cnt = (i % 500 == 7) ? '1 : $urandom;   // include the carry at wrap
      code = (i % 300 == 5) ? 8'd255 : CODE_W'($urandom);
      exp_v.push_back(wr1);
      exp_q.push_back({cnt, {FINE_W{1'b0}}} + TW'(table_tf[code]));
      @(posedge clk);
      #1;
      if (exp_v.size() == 2) begin
        logic v;
        logic [TW-1:0] e;
        v = exp_v.pop_front();
        e = exp_q.pop_front();
        checks++;
        if (wr2 !== v || (v && ts !== e)) begin
          failures++;
          $display("i=%0d wr2=%b exp %b ts=%h exp %h", i, wr2, v, ts, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
