// Testbench of sync_fifo: random push/pop against a queue model, with phases
// that fill the buffer completely (pushes while full are dropped) and drain
// it. Checks head word, empty, full and level every cycle.
module tb_sync_fifo;
  localparam int W = 45, D = 16;
  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0;
  logic [W-1:0] din = '0, dout;
  logic full, empty;
  logic [$clog2(D):0] level;
  logic [W-1:0] q [$];
  int checks = 0, failures = 0, fulls = 0;

  sync_fifo #(.W(W), .DEPTH(D)) dut (.clk, .rst_n, .push, .din, .full, .pop, .dout, .empty, .level);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 6000; i++) begin
      int pp;
      @(negedge clk);
      checks++;
      if (empty !== (q.size() == 0) || full !== (q.size() == D) || level !== ($clog2(D)+1)'(q.size())
          || (q.size() > 0 && dout !== q[0])) begin
        failures++;
        $display("i=%0d empty=%b full=%b level=%0d model %0d", i, empty, full, level, q.size());
      end
      if (full) fulls++;
      pp = ((i / 500) % 2 == 0) ? 70 : 30;   // filling and draining phases
      push = ($urandom_range(0, 99) < pp);
      pop  = !empty && ($urandom_range(0, 99) < 100 - pp);
      din  = W'({$urandom, $urandom});
      @(posedge clk);
      begin
        bit was_full;
        was_full = (q.size() == D);
        if (pop) void'(q.pop_front());
        if (push && !was_full) q.push_back(din);
      end
    end
    checks++;
    if (fulls == 0) begin failures++; $display("never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
