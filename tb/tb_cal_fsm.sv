// Testbench of cal_fsm with its bin width memory (CAL_LOG2 = 12, 4096 hits).
// Codes are drawn from a strongly non-uniform distribution with gaps, hits
// arrive on random cycles (sometimes back to back with the same code). The
// testbench builds its own histogram of the hits it sent and from it the
// expected transfer function round(sum_{j<=k} H[j] / 2^(12-11)); every
// word written to the transfer memory and the number of cycles from start to
// done are checked. Hits sent before the start must not be counted.
module tb_cal_fsm;
  import tic_pkg::*;
  localparam int CL = 12;
  logic clk = 0, rst_n = 0, start = 0, hit = 0;
  logic [CODE_W-1:0] code = '0;
  logic busy, done;
  cal_state_e state;
  logic bw_we, tf_we;
  logic [CODE_W-1:0] bw_addr, tf_addr;
  logic [CL:0] bw_wdata, bw_rdata;
  logic [FINE_W:0] tf_wdata;
  int checks = 0, failures = 0;
  int hist [256];
  int exp_tf [256];
  int tf_written [256];
  int nwrites = 0;

  cal_fsm #(.CAL_LOG2(CL)) dut (
    .clk, .rst_n, .start, .hit, .code, .busy, .done, .state,
    .bw_we, .bw_addr, .bw_wdata, .bw_rdata, .tf_we, .tf_addr, .tf_wdata);
  bin_width_mem #(.AW(CODE_W), .DW(CL+1)) u_bw (
    .clk, .we(bw_we), .waddr(bw_addr), .wdata(bw_wdata), .raddr(bw_addr), .rdata(bw_rdata));

  always #5 clk = ~clk;

  always @(posedge clk) if (tf_we) begin
    tf_written[tf_addr] = int'(tf_wdata);
    nwrites++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pick_code();
    int r;
    r = $urandom_range(0, 99);
    if (r < 40) return $urandom_range(20, 35);
    if (r < 70) return $urandom_range(75, 100);
    if (r < 72) return 255;
    return $urandom_range(140, 160);
  endfunction

  initial begin
    int cycles, sent, acc;
    for (int k = 0; k < 256; k++) begin hist[k] = 0; tf_written[k] = -1; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // hits before start are ignored
    repeat (20) begin
      @(negedge clk); hit = 1; code = 8'd7;
    end
    @(negedge clk); hit = 0; start = 1;
    @(negedge clk); start = 0;
    checks++;
    if (!busy) begin failures++; $display("not busy after start"); end
    cycles = 1;
    sent = 0;
    while (!done) begin
      @(negedge clk);
      cycles++;
      hit = 0;
      if (state == CAL_COUNT && sent < 2**CL && $urandom_range(0, 3) != 0) begin
        hit = 1;
        if (sent > 0 && $urandom_range(0, 3) == 0) ; // repeat previous code
        else code = CODE_W'(pick_code());
        hist[code]++;
        sent++;
      end
      if (state != CAL_COUNT && state != CAL_DONE && sent > 0 && $urandom_range(0, 1) == 0) begin
        hit = 1; code = CODE_W'(pick_code());  // must be ignored during the sum
      end
      if (cycles > 60000) break;
    end
    hit = 0;
    acc = 0;
    for (int k = 0; k < 256; k++) begin
      acc += hist[k];
      exp_tf[k] = (acc + 1) >> 1;
    end
    for (int k = 0; k < 256; k++) begin
      checks++;
      if (tf_written[k] != exp_tf[k]) begin
        failures++;
        if (failures < 10) $display("TF[%0d] = %0d exp %0d", k, tf_written[k], exp_tf[k]);
      end
    end
    checks++;
    if (nwrites != 256) begin failures++; $display("tf writes %0d", nwrites); end
    checks++;
    if (exp_tf[255] != 2048) begin failures++; $display("last TF %0d", exp_tf[255]); end
    // start -> done: 256 clear + counting cycles + 256 sum cycles
    checks++;
    $display("start to done: %0d cycles, %0d hits", cycles, sent);
    if (sent != 2**CL) begin failures++; $display("hits counted %0d", sent); end
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("still busy"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
