// One coarse-grain sorting queue.
//
// A FIFO of max(SLOTS,1) entries that records the cycle each instruction
// entered. Its head is "ripe" once it has waited at least SLOTS cycles; the
// sorting engine pops it when it is ripe and allowed to leave. A queue with
// SLOTS = 0 is a fast queue: an instruction written in one cycle can leave
// the next. One push and one pop per cycle; a push into a full queue is
// accepted in the same cycle as a pop (can_push already accounts for it).
// Holding instructions for a class delay follows the Zephyr scheme; storing the
// entry time and the push-during-pop rule are this design's choices.
module sort_fifo
  import zephyr_pkg::*;
#(
  parameter int unsigned SLOTS = 5
) (
  input  logic    clk,
  input  logic    rst_n,
  input  time_t   now,
  input  logic    push,
  input  sinstr_t push_data,
  input  logic    pop,
  output logic    can_push,
  output logic    head_v,
  output logic    head_ripe,
  output sinstr_t head
);
  localparam int unsigned DEPTH = (SLOTS == 0) ? 1 : SLOTS;
  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  sinstr_t            mem_q [DEPTH];
  time_t              t_q   [DEPTH];
  logic [PTR_W-1:0]   rd_q, wr_q;
  logic [PTR_W:0]     cnt_q;

  function automatic logic [PTR_W-1:0] inc(logic [PTR_W-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  assign head_v    = cnt_q != '0;
  assign head      = mem_q[rd_q];
  assign head_ripe = head_v && tdiff(now, t_q[rd_q]) >= SLOTS;
  assign can_push  = (int'(cnt_q) < DEPTH) || pop;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
      for (int i = 0; i < DEPTH; i++) begin
        mem_q[i] <= '0;
        t_q[i]   <= '0;
      end
    end else begin
      if (push && can_push) begin
        mem_q[wr_q] <= push_data;
        t_q[wr_q]   <= now;
        wr_q        <= inc(wr_q);
      end
      if (pop && head_v) rd_q <= inc(rd_q);
      cnt_q <= cnt_q + (PTR_W+1)'(push && can_push) - (PTR_W+1)'(pop && head_v);
    end
  end

  // A pop must only be requested for a ripe head.
  a_pop_ripe: assert property (@(posedge clk) disable iff (!rst_n) pop |-> head_ripe);

endmodule
