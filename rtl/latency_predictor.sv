// Hybrid load latency predictor.
//
// Holds the latency history table, the address predictor, the in-flight
// load table (SILO) and the miss detection engine, and selects a latency for
// up to PORTS loads per cycle:
//   1. LHT confident               -> the LHT's last latency;
//   2. else, address predictable:
//        SILO hit                  -> cycles left until that miss completes
//                                     (at least the L1 latency);
//        definite miss             -> L1 + L2 latency (14 cycles);
//        maybe hit                 -> L1 latency (2 cycles);
//   3. neither predictable         -> L1 latency, and `unpred` is raised.
// The priority of LHT over cache latency propagation, the parallel SILO and
// miss-detector lookup and the cache-hit guess for unpredictable loads come
// from the Zephyr scheme; the order SILO-before-miss-detector and the L2 hit as
// the definite-miss latency are this design's choices. Lookups are
// combinational from q_pc and `now`. Training inputs: a resolved load (PC,
// address, latency), a miss starting (block, completion cycle), a fill and
// an eviction; all take effect at the next clock edge.
module latency_predictor
  import zephyr_pkg::*;
#(
  parameter int unsigned PORTS       = 2,
  parameter int unsigned LHT_ENTRIES = 1024,
  parameter int unsigned AP_ENTRIES  = 1024,
  parameter int unsigned SILO_ENTRIES = 16,
  parameter int unsigned MD_ENTRIES  = 512
) (
  input  logic              clk,
  input  logic              rst_n,
  input  time_t             now,
  input  logic [PC_W-1:0]   q_pc     [PORTS],
  output lat_t              q_lat    [PORTS],
  output logic              q_unpred [PORTS],
  // training from the memory side
  input  logic              res_en,
  input  logic [PC_W-1:0]   res_pc,
  input  logic [ADDR_W-1:0] res_addr,
  input  lat_t              res_lat,
  input  logic              miss_en,
  input  logic [ADDR_W-1:0] miss_addr,
  input  time_t             miss_done,
  input  logic              fill_en,
  input  logic [ADDR_W-1:0] fill_addr,
  input  logic              evict_en,
  input  logic [ADDR_W-1:0] evict_addr
);

  logic              lht_conf [PORTS];
  lat_t              lht_lat  [PORTS];
  logic              ap_conf  [PORTS];
  logic [ADDR_W-1:0] ap_addr  [PORTS];
  logic              silo_hit [PORTS];
  time_t             silo_done[PORTS];
  logic              md_miss  [PORTS];
  logic              silo_full;

  lht #(.ENTRIES(LHT_ENTRIES), .PORTS(PORTS)) u_lht (
    .clk, .rst_n, .q_pc, .q_conf(lht_conf), .q_lat(lht_lat),
    .u_en(res_en), .u_pc(res_pc), .u_lat(res_lat));

  addr_predictor #(.ENTRIES(AP_ENTRIES), .PORTS(PORTS)) u_ap (
    .clk, .rst_n, .q_pc, .q_conf(ap_conf), .q_addr(ap_addr),
    .u_en(res_en), .u_pc(res_pc), .u_addr(res_addr));

  silo #(.ENTRIES(SILO_ENTRIES), .PORTS(PORTS)) u_silo (
    .clk, .rst_n, .q_addr(ap_addr), .q_hit(silo_hit), .q_done(silo_done),
    .a_en(miss_en), .a_addr(miss_addr), .a_done(miss_done),
    .f_en(fill_en), .f_addr(fill_addr), .full(silo_full));

  miss_detector #(.ENTRIES(MD_ENTRIES), .PORTS(PORTS)) u_md (
    .clk, .rst_n, .q_addr(ap_addr), .q_miss(md_miss),
    .fill_en, .fill_addr, .evict_en, .evict_addr);

  always_comb begin
    for (int p = 0; p < PORTS; p++) begin
      logic signed [31:0] left;
      left        = tdiff(silo_done[p], now);
      q_unpred[p] = 1'b0;
      if (lht_conf[p]) begin
        q_lat[p] = lht_lat[p];
      end else if (ap_conf[p]) begin
        if (silo_hit[p]) begin
          if (left < L1_LAT)      q_lat[p] = lat_t'(L1_LAT);
          else if (left > 255)    q_lat[p] = 8'd255;
          else                    q_lat[p] = lat_t'(left);
        end else if (md_miss[p]) begin
          q_lat[p] = lat_t'(L1_LAT + L2_LAT);
        end else begin
          q_lat[p] = lat_t'(L1_LAT);
        end
      end else begin
        q_lat[p]    = lat_t'(L1_LAT);
        q_unpred[p] = 1'b1;
      end
    end
  end

endmodule
