// Timing table: predicted ready cycle of every logical register, per thread.
//
// Each entry holds the absolute cycle at which the register's newest value
// is expected, the sequence number of the instruction that produces it and
// a flag saying a producer has been recorded. Dispatch reads source entries
// (combinational, RD_PORTS ports) and writes destination entries (WR_PORTS
// ports, higher port number wins, written at the clock edge). Completion
// updates (UPD_PORTS ports) correct an entry with the real completion cycle
// but only while the completing instruction is still the register's latest
// producer; a dispatch write to the same register in the same cycle wins.
// Indexing by thread and logical register follows the Zephyr description;
// absolute timestamps, the producer tag and the update rule are this
// design's choices. Reset makes every register ready at cycle 0.
module timing_table
  import zephyr_pkg::*;
#(
  parameter int unsigned RD_PORTS  = 2 * ISSUE_W,
  parameter int unsigned WR_PORTS  = ISSUE_W,
  parameter int unsigned UPD_PORTS = ISSUE_W
) (
  input  logic  clk,
  input  logic  rst_n,
  // source reads
  input  thr_t  rd_thr   [RD_PORTS],
  input  lreg_t rd_reg   [RD_PORTS],
  output time_t rd_time  [RD_PORTS],
  output seq_t  rd_seq   [RD_PORTS],
  output logic  rd_pv    [RD_PORTS],
  // destination writes at dispatch
  input  logic  wr_en    [WR_PORTS],
  input  thr_t  wr_thr   [WR_PORTS],
  input  lreg_t wr_reg   [WR_PORTS],
  input  time_t wr_time  [WR_PORTS],
  input  seq_t  wr_seq   [WR_PORTS],
  // completion updates
  input  logic  upd_en   [UPD_PORTS],
  input  thr_t  upd_thr  [UPD_PORTS],
  input  lreg_t upd_reg  [UPD_PORTS],
  input  seq_t  upd_seq  [UPD_PORTS],
  input  time_t upd_time [UPD_PORTS]
);

  time_t ready_q [NUM_THREADS][NUM_LREGS];
  seq_t  prod_q  [NUM_THREADS][NUM_LREGS];
  logic  pv_q    [NUM_THREADS][NUM_LREGS];

  always_comb begin
    for (int p = 0; p < RD_PORTS; p++) begin
      rd_time[p] = ready_q[rd_thr[p]][rd_reg[p]];
      rd_seq[p]  = prod_q[rd_thr[p]][rd_reg[p]];
      rd_pv[p]   = pv_q[rd_thr[p]][rd_reg[p]];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < NUM_THREADS; t++)
        for (int r = 0; r < NUM_LREGS; r++) begin
          ready_q[t][r] <= '0;
          prod_q[t][r]  <= '0;
          pv_q[t][r]    <= 1'b0;
        end
    end else begin
      for (int u = 0; u < UPD_PORTS; u++)
        if (upd_en[u] && pv_q[upd_thr[u]][upd_reg[u]] &&
            prod_q[upd_thr[u]][upd_reg[u]] == upd_seq[u])
          ready_q[upd_thr[u]][upd_reg[u]] <= upd_time[u];
      for (int w = 0; w < WR_PORTS; w++)
        if (wr_en[w]) begin
          ready_q[wr_thr[w]][wr_reg[w]] <= wr_time[w];
          prod_q[wr_thr[w]][wr_reg[w]]  <= wr_seq[w];
          pv_q[wr_thr[w]][wr_reg[w]]    <= 1'b1;
        end
    end
  end

endmodule
