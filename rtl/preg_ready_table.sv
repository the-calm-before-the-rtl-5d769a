// Physical register ready bits, read at the head of the Cyclone main queue.
//
// One bit per physical register. Dispatch clears the bit of each newly
// allocated destination (CLR_PORTS ports); writeback sets it (SET_PORTS
// ports); a set and a clear of the same register in one cycle leave it set.
// Reads (RD_PORTS ports) are combinational and see the state before this
// cycle's updates. The table itself is the Cyclone replay check described
// by the Zephyr scheme; port counts and the reset value (all ready) are this
// design's choices.
module preg_ready_table
  import zephyr_pkg::*;
#(
  parameter int unsigned RD_PORTS  = 2 * ISSUE_W,
  parameter int unsigned CLR_PORTS = ISSUE_W,
  parameter int unsigned SET_PORTS = ISSUE_W
) (
  input  logic  clk,
  input  logic  rst_n,
  input  preg_t rd_reg  [RD_PORTS],
  output logic  rd_rdy  [RD_PORTS],
  input  logic  clr_en  [CLR_PORTS],
  input  preg_t clr_reg [CLR_PORTS],
  input  logic  set_en  [SET_PORTS],
  input  preg_t set_reg [SET_PORTS]
);
  logic [NUM_PREGS-1:0] rdy_q;

  always_comb
    for (int p = 0; p < RD_PORTS; p++) rd_rdy[p] = rdy_q[rd_reg[p]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rdy_q <= '1;
    else begin
      logic [NUM_PREGS-1:0] n;
      n = rdy_q;
      for (int c = 0; c < CLR_PORTS; c++) if (clr_en[c]) n[clr_reg[c]] = 1'b0;
      for (int s = 0; s < SET_PORTS; s++) if (set_en[s]) n[set_reg[s]] = 1'b1;
      rdy_q <= n;
    end
  end

endmodule
