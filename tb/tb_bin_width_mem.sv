// Testbench of bin_width_mem: random writes and combinational reads compared
// with a reference array, including a read-increment-write of one word in
// consecutive cycles as the calibration controller does it.
module tb_bin_width_mem;
  localparam int AW = 8, DW = 22;
  logic clk = 0;
  logic we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [DW-1:0] wdata = '0, rdata;
  logic [DW-1:0] model [2**AW];
  int checks = 0, failures = 0;

  bin_width_mem #(.AW(AW), .DW(DW)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = DW'($urandom); model[a] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      raddr = AW'($urandom);
      #1;
      checks++;
      if (rdata !== model[raddr]) begin
        failures++;
        $display("read %0d: %h exp %h", raddr, rdata, model[raddr]);
      end
      // increment the word just read, as the controller does
      we = 1; waddr = raddr; wdata = rdata + 1'b1;
      model[raddr] = model[raddr] + 1'b1;
      @(posedge clk);
      #1;
      we = 0;
      checks++;
      if (rdata !== model[raddr]) begin
        failures++;
        $display("after increment %0d: %h exp %h", raddr, rdata, model[raddr]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
