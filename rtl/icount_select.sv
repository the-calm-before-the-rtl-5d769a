// ICOUNT thread selection among the pre-issue buffers.
//
// Picks the thread whose PIB is not empty and which has the fewest
// instructions in the Cyclone queues; ties go to the lower thread number.
// `sel_v` is low when every PIB is empty. ICOUNT over the fine-grain
// scheduler and the empty-PIB exclusion follow the Zephyr scheme; the tie rule is
// this design's. Purely combinational.
module icount_select
  import zephyr_pkg::*;
#(
  parameter int unsigned CNT_W = 12
) (
  input  logic             pib_nonempty [NUM_THREADS],
  input  logic [CNT_W-1:0] icount       [NUM_THREADS],
  output logic             sel_v,
  output thr_t             sel_thr
);
  always_comb begin
    logic [CNT_W-1:0] best;
    sel_v   = 1'b0;
    sel_thr = '0;
    best    = '1;
    for (int t = 0; t < NUM_THREADS; t++)
      if (pib_nonempty[t] && (!sel_v || icount[t] < best)) begin
        sel_v   = 1'b1;
        sel_thr = thr_t'(t);
        best    = icount[t];
      end
  end
endmodule
