// Thread stall control for the stalling variant of the scheduler.
//
// When `stall_en` is set and dispatch accepts a load whose latency could not
// be predicted (set_v), that load is tagged and its thread is held at the
// prediction stage. The hold ends when an issued instruction of that thread
// carries the tag with the recorded sequence number: the load's address is
// then being computed. One tagged load per thread is outstanding at a time,
// since the thread dispatches nothing else while it waits. With stall_en low
// nothing is ever stalled. The stall/tag/release protocol follows the Zephyr
// scheme; holding the thread at the prediction stage and matching by
// sequence number are this design's choices. `stalled` is registered.
module stall_ctrl
  import zephyr_pkg::*;
#(
  parameter int unsigned ISS = ISSUE_W
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    stall_en,
  input  logic    set_v,
  input  thr_t    set_thr,
  input  seq_t    set_seq,
  input  logic    iss_v [ISS],
  input  sinstr_t iss_d [ISS],
  output logic    stalled [NUM_THREADS]
);
  logic st_q  [NUM_THREADS];
  seq_t tag_q [NUM_THREADS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < NUM_THREADS; t++) begin
        st_q[t]  <= 1'b0;
        tag_q[t] <= '0;
      end
    end else begin
      for (int i = 0; i < ISS; i++)
        if (iss_v[i] && iss_d[i].stall_tag && st_q[iss_d[i].thr] &&
            tag_q[iss_d[i].thr] == iss_d[i].seq)
          st_q[iss_d[i].thr] <= 1'b0;
      if (stall_en && set_v) begin
        st_q[set_thr]  <= 1'b1;
        tag_q[set_thr] <= set_seq;
      end
    end
  end

  always_comb
    for (int t = 0; t < NUM_THREADS; t++) stalled[t] = st_q[t] && stall_en;

endmodule
