// Coarse-grain sorting engine: sixteen delay FIFOs and the parent lock.
//
// Dispatch lanes push predicted instructions into the queue chosen by the
// classifier (one lane per queue per cycle). Each queue holds its entries
// for its class delay (0, 5, 10, 20 or 150 cycles). A ripe head leaves for
// the pre-issue buffer (PIB) of its thread when
//   - neither of its parents is still inside the sorting engine (lock), and
//   - that PIB has room and fewer than PIB_WR instructions were already
//     sent to it this cycle (queues are served in index order).
// The lock keeps one bit per thread and sequence number, set when an
// instruction enters a queue and cleared when it leaves; parents are found
// by sequence number, which must not be reused while an older holder is in
// flight. Instructions enter in program order but leave out of order across
// queues. The queue line-up and the lock rule follow the Zephyr scheme; the
// bit-vector lock, PIB_WR and the priority order are this design's.
// Outputs toward the PIBs are combinational; all state changes at the edge.
module coarse_sort_engine
  import zephyr_pkg::*;
#(
  parameter int unsigned LANES  = ISSUE_W,
  parameter int unsigned NUM_Q  = NUM_SORTQ,
  parameter int unsigned PIB_WR = 4,
  parameter int unsigned PIB_DEPTH = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  time_t                    now,
  // enqueue side
  input  logic                     in_v    [LANES],
  input  logic [$clog2(NUM_Q)-1:0] in_q    [LANES],
  input  sinstr_t                  in_data [LANES],
  output logic                     q_ready [NUM_Q],
  // toward the PIBs
  input  logic [$clog2(PIB_DEPTH):0] pib_space [NUM_THREADS],
  output logic                     pib_wr_v [NUM_THREADS][PIB_WR],
  output sinstr_t                  pib_wr_d [NUM_THREADS][PIB_WR],
  // status
  output logic [15:0]              occupancy,
  output logic                     lock_hold   // some ripe head waited on a parent
);

  logic    q_push [NUM_Q];
  sinstr_t q_pdat [NUM_Q];
  logic    q_pop  [NUM_Q];
  logic    q_can  [NUM_Q];
  logic    q_hv   [NUM_Q];
  logic    q_ripe [NUM_Q];
  sinstr_t q_head [NUM_Q];

  logic [(1<<SEQ_W)-1:0] in_sort_q [NUM_THREADS];
  logic [15:0]           occ_q;

  for (genvar q = 0; q < NUM_Q; q++) begin : g_q
    sort_fifo #(.SLOTS(qclass_delay(sortq_class(q)))) u_fifo (
      .clk, .rst_n, .now,
      .push(q_push[q]), .push_data(q_pdat[q]), .pop(q_pop[q]),
      .can_push(q_can[q]), .head_v(q_hv[q]), .head_ripe(q_ripe[q]), .head(q_head[q]));
  end

  always_comb begin
    for (int q = 0; q < NUM_Q; q++) begin
      q_ready[q] = q_can[q];
      q_push[q]  = 1'b0;
      q_pdat[q]  = '0;
    end
    for (int l = 0; l < LANES; l++)
      if (in_v[l]) begin
        q_push[in_q[l]] = 1'b1;
        q_pdat[in_q[l]] = in_data[l];
      end
  end

  // Drain: ripe, unlocked heads into PIBs with room.
  always_comb begin
    int unsigned sent [NUM_THREADS];
    for (int t = 0; t < NUM_THREADS; t++) begin
      sent[t] = 0;
      for (int k = 0; k < PIB_WR; k++) begin
        pib_wr_v[t][k] = 1'b0;
        pib_wr_d[t][k] = '0;
      end
    end
    lock_hold = 1'b0;
    for (int q = 0; q < NUM_Q; q++) begin
      sinstr_t h;
      logic    locked;
      h         = q_head[q];
      q_pop[q]  = 1'b0;
      locked    = (h.par1_v && in_sort_q[h.thr][h.par1]) ||
                  (h.par2_v && in_sort_q[h.thr][h.par2]);
      if (q_ripe[q] && locked) lock_hold = 1'b1;
      if (q_ripe[q] && !locked && sent[h.thr] < PIB_WR &&
          sent[h.thr] < int'(pib_space[h.thr])) begin
        q_pop[q] = 1'b1;
        for (int k = 0; k < PIB_WR; k++)
          if (k == sent[h.thr]) begin
            pib_wr_v[h.thr][k] = 1'b1;
            pib_wr_d[h.thr][k] = h;
          end
        sent[h.thr] = sent[h.thr] + 1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < NUM_THREADS; t++) in_sort_q[t] <= '0;
      occ_q <= '0;
    end else begin
      int unsigned ins, outs;
      ins  = 0;
      outs = 0;
      for (int q = 0; q < NUM_Q; q++) begin
        if (q_pop[q]) begin
          in_sort_q[q_head[q].thr][q_head[q].seq] <= 1'b0;
          outs++;
        end
      end
      for (int q = 0; q < NUM_Q; q++) begin
        if (q_push[q] && q_can[q]) begin
          in_sort_q[q_pdat[q].thr][q_pdat[q].seq] <= 1'b1;
          ins++;
        end
      end
      occ_q <= occ_q + 16'(ins) - 16'(outs);
    end
  end

  assign occupancy = occ_q;

  // The classifier never hands a lane a queue that cannot take it.
  for (genvar q = 0; q < NUM_Q; q++) begin : g_chk
    a_push_ok: assert property (@(posedge clk) disable iff (!rst_n) q_push[q] |-> q_can[q]);
  end

endmodule
