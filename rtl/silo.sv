// SILO: status of in-flight loads (outstanding cache-miss blocks).
//
// A fully associative table of ENTRIES block addresses (32-byte blocks),
// each with the cycle at which its miss completes. The memory side
// allocates an entry when a load misses (a_en, completion cycle known from
// the miss level) and frees it when the block is filled (f_en). A lookup
// (PORTS combinational ports) matches a predicted load address against
// every entry by block address and returns the completion cycle of the
// aliasing miss, which lets a later load inherit the remaining latency.
// Propagating miss completion times to aliasing loads is the Zephyr scheme's
// mechanism; the table size, the fully associative organisation and the
// drop-when-full policy are this design's choices. An allocation of a block
// that is already present refreshes its completion cycle.
module silo
  import zephyr_pkg::*;
#(
  parameter int unsigned ENTRIES = 16,
  parameter int unsigned PORTS   = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] q_addr [PORTS],
  output logic              q_hit  [PORTS],
  output time_t             q_done [PORTS],
  input  logic              a_en,
  input  logic [ADDR_W-1:0] a_addr,
  input  time_t             a_done,
  input  logic              f_en,
  input  logic [ADDR_W-1:0] f_addr,
  output logic              full
);
  localparam int unsigned BLK_W = ADDR_W - BLK_OFF;

  logic             v_q    [ENTRIES];
  logic [BLK_W-1:0] blk_q  [ENTRIES];
  time_t            done_q [ENTRIES];

  always_comb begin
    for (int p = 0; p < PORTS; p++) begin
      q_hit[p]  = 1'b0;
      q_done[p] = '0;
      for (int e = 0; e < ENTRIES; e++)
        if (v_q[e] && blk_q[e] == q_addr[p][ADDR_W-1:BLK_OFF]) begin
          q_hit[p]  = 1'b1;
          q_done[p] = done_q[e];
        end
    end
  end

  // Entry chosen for an allocation: the matching entry, else the lowest
  // free one.
  logic                       a_match, a_free;
  logic [$clog2(ENTRIES)-1:0] a_idx;
  always_comb begin
    a_match = 1'b0;
    a_free  = 1'b0;
    a_idx   = '0;
    for (int e = ENTRIES - 1; e >= 0; e--)
      if (!v_q[e]) begin
        a_free = 1'b1;
        a_idx  = e[$clog2(ENTRIES)-1:0];
      end
    for (int e = 0; e < ENTRIES; e++)
      if (v_q[e] && blk_q[e] == a_addr[ADDR_W-1:BLK_OFF]) begin
        a_match = 1'b1;
        a_idx   = e[$clog2(ENTRIES)-1:0];
      end
    full = !a_free;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) begin
        v_q[e]    <= 1'b0;
        blk_q[e]  <= '0;
        done_q[e] <= '0;
      end
    end else begin
      if (f_en)
        for (int e = 0; e < ENTRIES; e++)
          if (v_q[e] && blk_q[e] == f_addr[ADDR_W-1:BLK_OFF]) v_q[e] <= 1'b0;
      if (a_en && (a_match || a_free)) begin
        v_q[a_idx]    <= 1'b1;
        blk_q[a_idx]  <= a_addr[ADDR_W-1:BLK_OFF];
        done_q[a_idx] <= a_done;
      end
    end
  end

endmodule
