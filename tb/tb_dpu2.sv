// Testbench of dpu2: random timestamps and signed offsets (including the
// channel offsets -1609, -1203 and -962 units, i.e. -1.571, -1.175 and
// -0.939 ns); ts_out must equal ts_in + offset modulo 2^43 one cycle later.
module tb_dpu2;
  localparam int TW = 43, OW = 16;
  logic clk = 0, rst_n = 0;
  logic wr2 = 0;
  logic [TW-1:0] ts_in = '0;
  logic signed [OW-1:0] offset = '0;
  logic wr3;
  logic [TW-1:0] ts_out;
  int checks = 0, failures = 0;
  int ofs_set [3] = '{-1609, -1203, -962};

  dpu2 #(.TS_W(TW), .OFS_W(OW)) dut (.clk, .rst_n, .wr2, .ts_in, .offset, .wr3, .ts_out);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [TW-1:0] last;
    last = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      longint exp;
      @(negedge clk);
      wr2 = ($urandom_range(0, 2) != 0);
      ts_in = (i % 100 == 3) ? TW'(5) : TW'({$urandom, $urandom});
      offset = (i % 2 == 1) ? OW'(ofs_set[i % 3]) : OW'($urandom);
      exp = (longint'(ts_in) + longint'(offset)) & ((64'd1 << TW) - 1);
      if (wr2) last = TW'(exp);
      @(posedge clk);
      #1;
      checks++;
      if (wr3 !== wr2 || ts_out !== last) begin
        failures++;
        $display("i=%0d wr3=%b ts_out=%h exp %h", i, wr3, ts_out, last);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
