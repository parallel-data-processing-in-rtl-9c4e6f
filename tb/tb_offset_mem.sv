// Testbench of offset_mem: all words start at zero; signed words written at
// random are read back one cycle after the address is applied.
module tb_offset_mem;
  localparam int AW = 4, DW = 16;
  logic clk = 0;
  logic we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic signed [DW-1:0] wdata = '0, rdata;
  logic signed [DW-1:0] model [2**AW];
  int checks = 0, failures = 0;

  offset_mem #(.AW(AW), .DW(DW)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2**AW; k++) model[k] = '0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = (i >= 2**AW) && ($urandom_range(0, 2) == 0);
      waddr = AW'($urandom);
      wdata = DW'($urandom_range(0, 8000)) - DW'(4000);
      raddr = (i < 2**AW) ? AW'(i) : AW'($urandom);
      @(posedge clk);
      begin
        logic signed [DW-1:0] exp;
        exp = model[raddr];
        if (we) model[waddr] = wdata;
        #1;
        checks++;
        if (rdata !== exp) begin
          failures++;
          $display("i=%0d word %0d: %0d exp %0d", i, raddr, rdata, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
