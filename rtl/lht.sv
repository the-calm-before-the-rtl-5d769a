// Latency History Table (LHT): last-value predictor of load latency.
//
// Direct-mapped table indexed by PC bits [IDX_W+1:2], each entry holding a
// partial PC tag, the latency of the last execution of that load and a
// 2-bit confidence counter. A lookup (PORTS combinational ports) hits when
// the entry is valid and its tag matches; the prediction is confident when
// the counter is saturated at 3. An update with the resolved latency
// increments the counter if the latency repeats and otherwise stores the
// new latency with the counter cleared; a tag miss replaces the entry.
// Being a last-value predictor indexed by PC follows the Zephyr description
// of the LHT; table size, tag width and the confidence rule are this
// design's choices. Updates take effect at the next clock edge.
module lht
  import zephyr_pkg::*;
#(
  parameter int unsigned ENTRIES = 1024,
  parameter int unsigned PORTS   = 2,
  parameter int unsigned TAG_W   = 10
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [PC_W-1:0] q_pc   [PORTS],
  output logic            q_conf [PORTS],
  output lat_t            q_lat  [PORTS],
  input  logic            u_en,
  input  logic [PC_W-1:0] u_pc,
  input  lat_t            u_lat
);
  localparam int unsigned IDX_W = $clog2(ENTRIES);

  typedef struct packed {
    logic             v;
    logic [TAG_W-1:0] tag;
    lat_t             lat;
    logic [1:0]       cnt;
  } lht_e;

  lht_e tab [ENTRIES];

  function automatic logic [IDX_W-1:0] idx_of(logic [PC_W-1:0] pc);
    return pc[IDX_W+1:2];
  endfunction
  function automatic logic [TAG_W-1:0] tag_of(logic [PC_W-1:0] pc);
    return pc[IDX_W+2+TAG_W-1:IDX_W+2];
  endfunction

  always_comb begin
    for (int p = 0; p < PORTS; p++) begin
      lht_e e;
      e = tab[idx_of(q_pc[p])];
      q_conf[p] = e.v && e.tag == tag_of(q_pc[p]) && e.cnt == 2'd3;
      q_lat[p]  = e.lat;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) tab[i] <= '0;
    end else if (u_en) begin
      lht_e e;
      e = tab[idx_of(u_pc)];
      if (e.v && e.tag == tag_of(u_pc) && e.lat == u_lat) begin
        if (e.cnt != 2'd3) e.cnt = e.cnt + 2'd1;
      end else begin
        e.v   = 1'b1;
        e.tag = tag_of(u_pc);
        e.lat = u_lat;
        e.cnt = 2'd0;
      end
      tab[idx_of(u_pc)] <= e;
    end
  end

endmodule
