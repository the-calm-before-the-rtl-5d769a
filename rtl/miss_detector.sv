// Miss detection engine: answers "definite miss" or "maybe hit".
//
// The engine keeps, for every value of the low IDX_W block-address bits, a
// count of L1 blocks currently resident with those bits. The cache reports
// each fill (count +1) and each eviction (count -1). A lookup of a
// predicted load address whose count is zero cannot match any resident
// block and is a definite miss; any other count is a maybe hit. With the
// default 512 counters over 32-byte blocks of a 16KB 4-way L1 (128 sets),
// at most 4 resident blocks share a counter, so 3 bits never overflow.
// The two answers come from the Zephyr scheme; the counting organisation is this
// design's own choice. Lookups are combinational, updates land at the next
// clock edge; a fill and an eviction of the same counter cancel.
module miss_detector
  import zephyr_pkg::*;
#(
  parameter int unsigned ENTRIES = 512,
  parameter int unsigned PORTS   = 2,
  parameter int unsigned CNT_W   = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] q_addr [PORTS],
  output logic              q_miss [PORTS],
  input  logic              fill_en,
  input  logic [ADDR_W-1:0] fill_addr,
  input  logic              evict_en,
  input  logic [ADDR_W-1:0] evict_addr
);
  localparam int unsigned IDX_W = $clog2(ENTRIES);

  logic [CNT_W-1:0] cnt_q [ENTRIES];

  function automatic logic [IDX_W-1:0] idx_of(logic [ADDR_W-1:0] a);
    return a[BLK_OFF+IDX_W-1:BLK_OFF];
  endfunction

  always_comb
    for (int p = 0; p < PORTS; p++) q_miss[p] = cnt_q[idx_of(q_addr[p])] == '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) cnt_q[i] <= '0;
    end else begin
      if (fill_en && evict_en && idx_of(fill_addr) == idx_of(evict_addr)) begin
        // no change
      end else begin
        if (fill_en)  cnt_q[idx_of(fill_addr)]  <= cnt_q[idx_of(fill_addr)] + 1'b1;
        if (evict_en && cnt_q[idx_of(evict_addr)] != '0)
          cnt_q[idx_of(evict_addr)] <= cnt_q[idx_of(evict_addr)] - 1'b1;
      end
    end
  end

endmodule
