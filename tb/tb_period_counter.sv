// Testbench of period_counter: counting, wrap pulse and synchronous clear,
// checked against a reference count kept in the testbench. Uses an 8-bit
// counter so the wrap happens within the run.
module tb_period_counter;
  localparam int W = 8;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [W-1:0] count;
  logic wrap;
  int checks = 0, failures = 0;
  int ref_cnt, wraps;

  period_counter #(.W(W)) dut (.clk, .rst_n, .clear, .count, .wrap);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_wrap;
    wraps = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    ref_cnt = 1;
    exp_wrap = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      checks++;
      if (count !== W'(ref_cnt) || wrap !== exp_wrap) begin
        failures++;
        $display("cycle %0d: count=%0d exp %0d wrap=%b exp %b", i, count, ref_cnt, wrap, exp_wrap);
      end
      if (wrap) wraps++;
      clear = (i == 600);
      @(posedge clk);
      #1;
      if (i == 600) begin
        ref_cnt = 0;
        exp_wrap = 0;
      end else begin
        exp_wrap = (ref_cnt == 2**W - 1);
        ref_cnt = (ref_cnt + 1) % (2**W);
      end
      clear = 0;
    end
    checks++;
    if (wraps < 2) begin
      failures++;
      $display("too few wraps: %0d", wraps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
