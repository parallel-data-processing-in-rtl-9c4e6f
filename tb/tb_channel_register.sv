// Testbench of channel_register: random hits, codes and counts; the entry
// must appear one cycle after the hit with the count and code of that cycle,
// and must hold between hits.
module tb_channel_register;
  import tic_pkg::*;
  localparam int PW = 32;
  logic clk = 0, rst_n = 0;
  logic hit = 0;
  logic [CODE_W-1:0] code_in = '0;
  logic [PW-1:0] count = '0;
  logic valid;
  logic [PW-1:0] cnt;
  logic [CODE_W-1:0] code;
  int checks = 0, failures = 0;

  channel_register #(.PCNT_W(PW)) dut (.clk, .rst_n, .hit, .code_in, .count, .valid, .cnt, .code);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_v;
    logic [PW-1:0] exp_cnt;
    logic [CODE_W-1:0] exp_code;
    exp_v = 0; exp_cnt = 0; exp_code = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      hit = ($urandom_range(0, 2) == 0);
      code_in = CODE_W'($urandom);
      count = $urandom;
      @(posedge clk);
      if (hit) begin
        exp_cnt = count;
        exp_code = code_in;
      end
      exp_v = hit;
      #1;
      checks++;
      if (valid !== exp_v || cnt !== exp_cnt || code !== exp_code) begin
        failures++;
        $display("i=%0d valid=%b/%b cnt=%h/%h code=%h/%h", i, valid, exp_v, cnt, exp_cnt, code, exp_code);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
