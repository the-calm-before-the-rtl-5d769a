// Pre-issue buffer (PIB) of one thread.
//
// A circular FIFO of DEPTH sorted instructions. Up to WR writes per cycle
// are appended in port order (only enabled ports count); the reader sees the
// RD oldest entries (rd_v/rd_d, combinational) and removes `pop_n` of them at
// the clock edge. `space` is the number of free entries before this cycle's
// writes; writers must not exceed it. A per-thread buffer between the
// sorting queues and the Cyclone queue is the Zephyr scheme's; depth and port
// counts are this design's choices.
module pib
  import zephyr_pkg::*;
#(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned WR    = 4,
  parameter int unsigned RD    = ISSUE_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   wr_v  [WR],
  input  sinstr_t                wr_d  [WR],
  output logic [$clog2(DEPTH):0] space,
  output logic [$clog2(DEPTH):0] count,
  output logic                   rd_v  [RD],
  output sinstr_t                rd_d  [RD],
  input  logic [$clog2(RD):0]    pop_n
);
  localparam int unsigned PTR_W = $clog2(DEPTH);

  sinstr_t            mem_q [DEPTH];
  logic [PTR_W-1:0]   rd_q, wr_q;
  logic [PTR_W:0]     cnt_q;

  assign count = cnt_q;
  assign space = (PTR_W+1)'(DEPTH) - cnt_q;

  always_comb
    for (int r = 0; r < RD; r++) begin
      rd_v[r] = r < int'(cnt_q);
      rd_d[r] = mem_q[PTR_W'(rd_q + PTR_W'(r))];
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
      for (int i = 0; i < DEPTH; i++) mem_q[i] <= '0;
    end else begin
      logic [PTR_W-1:0] w;
      int unsigned      n;
      w = wr_q;
      n = 0;
      for (int k = 0; k < WR; k++)
        if (wr_v[k]) begin
          mem_q[w] <= wr_d[k];
          w = w + 1'b1;
          n++;
        end
      wr_q  <= w;
      rd_q  <= rd_q + PTR_W'(pop_n);
      cnt_q <= cnt_q + (PTR_W+1)'(n) - (PTR_W+1)'(pop_n);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    int'(cnt_q) + int'(wr_v.sum() with (int'(item))) <= DEPTH);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    int'(pop_n) <= int'(cnt_q));

endmodule
