// Classification and enqueueing: chooses a sorting queue for each lane.
//
// For every lane of a dispatch group the predicted wait time is rounded
// down to the nearest queue delay (0, 5, 10, 20 or 150 cycles), so that no
// instruction is held longer than its estimate. Lanes are served in program
// order; each takes the lowest-numbered queue of its class that can accept
// an entry this cycle and has not been taken by an earlier lane. If every
// queue of that class is busy, the next lower class is tried, down to the
// 0-cycle queues; a lane with no queue left reports lane_ok = 0. Rounding
// down and the queue line-up are the Zephyr scheme's; falling back to a lower
// class and one entry per queue per cycle are this design's reading of
// "closest granularity queue available". Purely combinational.
module classifier
  import zephyr_pkg::*;
#(
  parameter int unsigned LANES = ISSUE_W,
  parameter int unsigned NUM_Q = NUM_SORTQ
) (
  input  logic                     lane_v    [LANES],
  input  logic signed [31:0]       lane_wait [LANES],
  input  logic                     q_ready   [NUM_Q],
  output logic                     lane_ok   [LANES],
  output logic [$clog2(NUM_Q)-1:0] lane_q    [LANES],
  output qclass_e                  lane_cls  [LANES]
);

  always_comb begin
    logic [NUM_Q-1:0] taken;
    taken = '0;
    for (int i = 0; i < LANES; i++) begin
      qclass_e want;
      want        = wait_class(lane_wait[i]);
      lane_ok[i]  = 1'b0;
      lane_q[i]   = '0;
      lane_cls[i] = want;
      if (lane_v[i]) begin
        for (int c = NUM_QCLASS - 1; c >= 0; c--) begin
          if (!lane_ok[i] && c <= int'(want)) begin
            for (int q = 0; q < NUM_Q; q++) begin
              if (!lane_ok[i] && int'(sortq_class(q)) == c && q_ready[q] && !taken[q]) begin
                lane_ok[i]  = 1'b1;
                lane_q[i]   = q[$clog2(NUM_Q)-1:0];
                lane_cls[i] = qclass_e'(c);
                taken[q]    = 1'b1;
              end
            end
          end
        end
      end
    end
  end

endmodule
