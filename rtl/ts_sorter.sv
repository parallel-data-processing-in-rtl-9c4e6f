// Chronological sorter: merges the channels' timestamp streams.
//
// Each channel produces compensated timestamps in its own time order; the
// host wants one stream of all events in time order. Every channel feeds a
// small queue (QDEPTH words). Each cycle the sorter may pass on the head of
// one queue: the head h of channel c is released when, for every other
// channel j,
//   - j's queue is not empty and h is earlier than j's head (ties go to the
//     lower channel number), or
//   - j's queue is empty and h is earlier than the watermark
//     (now - GUARD) * T0: no timestamp still on its way through a channel
//     can be earlier than that, because it belongs to a period at most
//     PIPE_LAT periods old and its offset is at least -2^(OFS_W-1) units.
// Comparisons take the difference modulo 2^TS_W as signed, so they hold
// across the wrap of the period counter as long as the timestamps compared
// are less than half the range apart.
//
// The requirement to deliver timestamps in chronological order is published;
// the merge rule, queue depth and watermark are this design's choices. A
// channel's stream is in order while its offset word is constant: a change of
// offset larger than the gap between two of its events can reorder them.
//
// An assertion checks that the released stream never goes back in time.
//
// Interface: in_valid/in_ts per channel (no back-pressure; a timestamp that
// finds its queue full is lost and sets the sticky overflow bit of the
// channel and pulses drop); now = period counter; out_valid/out_ch/out_ts,
// out_ready (taken when both are high).
module ts_sorter
  import tic_pkg::*;
#(
  parameter int unsigned PCNT_W   = 32,
  parameter int unsigned OFS_W    = 16,
  parameter int unsigned QDEPTH   = 16,
  parameter int unsigned PIPE_LAT = 4,   // hit to queue input, in cycles
  localparam int unsigned TS_W    = PCNT_W + FINE_W,
  localparam int unsigned CH_W    = $clog2(NCH),
  localparam int unsigned GUARD   = PIPE_LAT + 2**(OFS_W-1-FINE_W) + 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [NCH-1:0]             in_valid,
  input  logic [NCH-1:0][TS_W-1:0]   in_ts,
  input  logic [PCNT_W-1:0]          now,
  output logic                       out_valid,
  output logic [CH_W-1:0]            out_ch,
  output logic [TS_W-1:0]            out_ts,
  input  logic                       out_ready,
  output logic [NCH-1:0]             overflow,
  output logic [NCH-1:0]             drop
);
  localparam int unsigned QAW = $clog2(QDEPTH);

  logic [NCH-1:0]           q_full, q_empty, q_pop, eligible;
  logic [NCH-1:0][TS_W-1:0] head;
  logic [TS_W-1:0]          wmark;

  // a is earlier than b on the wrapping time scale
  function automatic logic earlier(input logic [TS_W-1:0] a, input logic [TS_W-1:0] b);
    logic [TS_W-1:0] d;
    d = a - b;
    return d[TS_W-1];
  endfunction

  assign wmark = {now - PCNT_W'(GUARD), {FINE_W{1'b0}}};

  for (genvar c = 0; c < NCH; c++) begin : g_q
    logic [QAW:0] lvl;
    sync_fifo #(.W(TS_W), .DEPTH(QDEPTH)) u_q (
      .clk, .rst_n,
      .push  (in_valid[c]),
      .din   (in_ts[c]),
      .full  (q_full[c]),
      .pop   (q_pop[c]),
      .dout  (head[c]),
      .empty (q_empty[c]),
      .level (lvl)
    );
    assign drop[c] = in_valid[c] && q_full[c];
  end

  always_comb begin
    for (int c = 0; c < NCH; c++) begin
      eligible[c] = !q_empty[c];
      for (int j = 0; j < NCH; j++) begin
        if (j != c) begin
          if (!q_empty[j]) begin
            if (j > c) eligible[c] &= !earlier(head[j], head[c]);
            else       eligible[c] &= earlier(head[c], head[j]);
          end else begin
            eligible[c] &= earlier(head[c], wmark);
          end
        end
      end
    end
  end

  always_comb begin
    out_valid = 1'b0;
    out_ch    = '0;
    for (int c = NCH-1; c >= 0; c--) begin
      if (eligible[c]) begin
        out_valid = 1'b1;
        out_ch    = CH_W'(c);
      end
    end
    out_ts = head[out_ch];
    q_pop  = '0;
    q_pop[out_ch] = out_valid && out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) overflow <= '0;
    else        overflow <= overflow | drop;
  end

  // The released stream never goes back in time. The comparison is only
  // meaningful within half the range of the time scale, so the reference is
  // forgotten once it is a quarter of the range old.
  logic            released;
  logic [TS_W-1:0] last_ts;
  logic [TS_W-1:0] stale_mark;
  assign stale_mark = {now - (PCNT_W'(1) << (PCNT_W - 2)), {FINE_W{1'b0}}};
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      released <= 1'b0;
      last_ts  <= '0;
    end else if (out_valid && out_ready) begin
      released <= 1'b1;
      last_ts  <= out_ts;
    end else if (earlier(last_ts, stale_mark)) begin
      released <= 1'b0;
    end
  end
  a_in_order: assert property (@(posedge clk) disable iff (!rst_n)
    (out_valid && out_ready && released) |-> !earlier(out_ts, last_ts));
endmodule
