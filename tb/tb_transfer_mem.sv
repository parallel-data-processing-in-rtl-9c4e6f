// Testbench of transfer_mem: the linear start-up characteristic
// (word k = (k+1)*2048/256 = 8*(k+1)), then random writes and reads with the
// one-cycle read latency, compared with a reference array.
module tb_transfer_mem;
  localparam int AW = 8, FW = 11;
  logic clk = 0;
  logic we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [FW:0] wdata = '0, rdata;
  logic [FW:0] model [2**AW];
  int checks = 0, failures = 0;

  transfer_mem #(.AW(AW), .FINE_W(FW)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2**AW; k++) model[k] = (FW+1)'(8 * (k + 1));
    for (int k = 0; k < 2**AW; k++) begin
      @(negedge clk);
      raddr = AW'(k);
      @(posedge clk);
      #1;
      checks++;
      if (rdata !== model[k]) begin
        failures++;
        $display("initial word %0d: %0d exp %0d", k, rdata, model[k]);
      end
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we = ($urandom_range(0, 1) == 0);
      waddr = AW'($urandom);
      wdata = (FW+1)'($urandom);
      raddr = AW'($urandom);
      @(posedge clk);
      begin
        logic [FW:0] exp;
        exp = model[raddr];          // read-before-write on the same address
        if (we) model[waddr] = wdata;
        #1;
        checks++;
        if (rdata !== exp) begin
          failures++;
          $display("i=%0d read %0d: %0d exp %0d", i, raddr, rdata, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
