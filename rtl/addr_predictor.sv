// Load address predictor (stride predictor).
//
// Direct-mapped table indexed by PC bits [IDX_W+1:2]; each entry keeps a
// partial PC tag, the last address the load accessed, the last stride and
// a 2-bit confidence counter. A lookup predicts last address + stride and is
// confident when the tag matches and the counter is at least 2. An update
// with the resolved address increments the counter when the new stride
// equals the stored one and otherwise stores the new stride and clears the
// counter. The Zephyr scheme only needs "an address predictor" feeding the
// miss detector and the in-flight load table; the stride scheme, table size
// and confidence rule are this design's choices. Lookups are combinational,
// updates land at the next clock edge.
module addr_predictor
  import zephyr_pkg::*;
#(
  parameter int unsigned ENTRIES = 1024,
  parameter int unsigned PORTS   = 2,
  parameter int unsigned TAG_W   = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [PC_W-1:0]   q_pc   [PORTS],
  output logic              q_conf [PORTS],
  output logic [ADDR_W-1:0] q_addr [PORTS],
  input  logic              u_en,
  input  logic [PC_W-1:0]   u_pc,
  input  logic [ADDR_W-1:0] u_addr
);
  localparam int unsigned IDX_W = $clog2(ENTRIES);

  typedef struct packed {
    logic              v;
    logic [TAG_W-1:0]  tag;
    logic [ADDR_W-1:0] last;
    logic [ADDR_W-1:0] stride;
    logic [1:0]        cnt;
  } ap_e;

  ap_e tab [ENTRIES];

  function automatic logic [IDX_W-1:0] idx_of(logic [PC_W-1:0] pc);
    return pc[IDX_W+1:2];
  endfunction
  function automatic logic [TAG_W-1:0] tag_of(logic [PC_W-1:0] pc);
    return pc[IDX_W+2+TAG_W-1:IDX_W+2];
  endfunction

  always_comb begin
    for (int p = 0; p < PORTS; p++) begin
      ap_e e;
      e = tab[idx_of(q_pc[p])];
      q_conf[p] = e.v && e.tag == tag_of(q_pc[p]) && e.cnt >= 2'd2;
      q_addr[p] = e.last + e.stride;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) tab[i] <= '0;
    end else if (u_en) begin
      ap_e e;
      logic [ADDR_W-1:0] s;
      e = tab[idx_of(u_pc)];
      if (e.v && e.tag == tag_of(u_pc)) begin
        s = u_addr - e.last;
        if (s == e.stride) begin
          if (e.cnt != 2'd3) e.cnt = e.cnt + 2'd1;
        end else begin
          e.stride = s;
          e.cnt    = 2'd0;
        end
        e.last = u_addr;
      end else begin
        e.v      = 1'b1;
        e.tag    = tag_of(u_pc);
        e.last   = u_addr;
        e.stride = '0;
        e.cnt    = 2'd0;
      end
      tab[idx_of(u_pc)] <= e;
    end
  end

endmodule
