// Calibration controller: statistical code density test of one interpolator.
//
// On start the controller
//   1. clears the bin width memory, one word per cycle (2^CODE_W cycles);
//   2. bin width evaluation: for each calibrator hit it reads the word of
//      the hit's code, adds one and writes it back in the same cycle, until
//      2^CAL_LOG2 hits have been counted (2^21 = 2,097,152 by default, the
//      "2 million" measurements found sufficient). Word k / 2^CAL_LOG2 is
//      then the width of bin k as a fraction of the clock period;
//   3. transfer function evaluation: it steps the address through all code
//      numbers, accumulates the bin width words read and writes the running
//      sum, rounded to FINE_W fraction bits, into the transfer memory:
//        TF[k] = round( sum_{j<=k} BW[j] / 2^(CAL_LOG2-FINE_W) ).
//      TF[last] is one whole period (2^FINE_W).
// The sequence of the steps follows the published method; the power-of-two
// hit count (so the scaling is a shift), end-of-bin rather than mid-bin
// values and round-half-up are this design's choices.
//
// Interface: start (pulse), hit/code (channel register output), busy (high
// from the cycle after start until the end), done (one-cycle pulse), state.
// Memory ports: bw_addr serves both the read and write of the bin width
// memory; tf_* writes the transfer memory.
// Timing: 2^CODE_W + (hits) + 2^CODE_W + 1 cycles from start to done.
module cal_fsm
  import tic_pkg::*;
#(
  parameter int unsigned CAL_LOG2 = 21
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic                  hit,
  input  logic [CODE_W-1:0]     code,
  output logic                  busy,
  output logic                  done,
  output cal_state_e            state,
  // bin width memory
  output logic                  bw_we,
  output logic [CODE_W-1:0]     bw_addr,
  output logic [CAL_LOG2:0]     bw_wdata,
  input  logic [CAL_LOG2:0]     bw_rdata,
  // transfer memory
  output logic                  tf_we,
  output logic [CODE_W-1:0]     tf_addr,
  output logic [FINE_W:0]       tf_wdata
);
  localparam int unsigned SHIFT = CAL_LOG2 - FINE_W;

  initial begin
    if (CAL_LOG2 <= FINE_W)
      $error("cal_fsm: CAL_LOG2 (%0d) must exceed FINE_W (%0d)", CAL_LOG2, FINE_W);
  end

  cal_state_e            st;
  logic [CODE_W-1:0]     addr;   // sweep address for clear and sum
  logic [CAL_LOG2-1:0]   nhits;  // hits counted so far
  logic [CAL_LOG2:0]     acc;    // running sum of bin widths
  logic [CAL_LOG2:0]     acc_next;
  logic [CAL_LOG2:0]     rounded;

  assign acc_next = acc + bw_rdata;
  assign rounded  = acc_next + (CAL_LOG2+1)'(1 << (SHIFT - 1));

  always_comb begin
    bw_we    = 1'b0;
    bw_addr  = addr;
    bw_wdata = '0;
    tf_we    = 1'b0;
    tf_addr  = addr;
    tf_wdata = rounded[CAL_LOG2 -: (FINE_W+1)];
    unique case (st)
      CAL_CLEAR: begin
        bw_we = 1'b1;
      end
      CAL_COUNT: begin
        bw_addr  = code;
        bw_we    = hit;
        bw_wdata = bw_rdata + 1'b1;
      end
      CAL_SUM: begin
        tf_we = 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= CAL_IDLE;
      addr  <= '0;
      nhits <= '0;
      acc   <= '0;
    end else begin
      unique case (st)
        CAL_IDLE: begin
          if (start) begin
            st   <= CAL_CLEAR;
            addr <= '0;
          end
        end
        CAL_CLEAR: begin
          addr <= addr + 1'b1;
          if (&addr) begin
            st    <= CAL_COUNT;
            nhits <= '0;
          end
        end
        CAL_COUNT: begin
          if (hit) begin
            nhits <= nhits + 1'b1;
            if (&nhits) begin
              st   <= CAL_SUM;
              addr <= '0;
              acc  <= '0;
            end
          end
        end
        CAL_SUM: begin
          acc  <= acc_next;
          addr <= addr + 1'b1;
          if (&addr) st <= CAL_DONE;
        end
        CAL_DONE: st <= CAL_IDLE;
        default:  st <= CAL_IDLE;
      endcase
    end
  end

  assign state = st;
  assign busy  = (st != CAL_IDLE);
  assign done  = (st == CAL_DONE);
endmodule
