// Latency prediction engine: wait-time prediction and dispatch acceptance.
//
// Takes a dispatch group of up to LANES renamed instructions of one thread,
// in program order. For each lane it
//   - reads the timing table for both sources (a source written by an
//     earlier lane of the same group takes that lane's new value instead);
//   - predicts the latency: the instruction's own latency, or for loads the
//     hybrid load latency predictor (at most MAX_LOAD_PRED loads per cycle);
//   - computes issue_at = MAX(now + MIN_PIPE, source ready cycles) and the
//     destination's ready cycle issue_at + latency;
//   - lets the classifier pick a sorting queue from the wait issue_at - now.
// Lanes are accepted in order; the first lane that is stalled, is a load
// beyond the prediction limit, follows a tagged load, or finds no sorting
// queue ends the accepted prefix (acc_n). Accepted lanes write the timing
// table, clear their destination ready bit, and go to the sorting engine.
// With stall_en set an unpredictable load is tagged and reported on tag_v.
// The timing table with a MAX calculation, the two-load limit and the
// tagging come from the Zephyr scheme; MIN_PIPE, single-thread groups and the
// prefix acceptance are this design's choices. All outputs are
// combinational from the inputs and the tables; tables update at the edge.
module prediction_engine
  import zephyr_pkg::*;
#(
  parameter int unsigned LANES         = ISSUE_W,
  parameter int unsigned NUM_Q         = NUM_SORTQ,
  parameter int unsigned MAX_LOAD_PRED = 2,
  parameter int unsigned MIN_PIPE      = 3,
  parameter int unsigned WB_PORTS      = ISSUE_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  time_t                    now,
  input  logic                     stall_en,
  // dispatch group
  input  logic                     d_v     [LANES],
  input  instr_t                   d_i     [LANES],
  output logic [$clog2(LANES):0]   acc_n,
  // to the sorting engine
  input  logic                     q_ready [NUM_Q],
  output logic                     o_v     [LANES],
  output logic [$clog2(NUM_Q)-1:0] o_q     [LANES],
  output sinstr_t                  o_d     [LANES],
  // ready-bit clears for accepted destinations
  output logic                     clr_en  [LANES],
  output preg_t                    clr_reg [LANES],
  // stall control
  input  logic                     stalled [NUM_THREADS],
  output logic                     tag_v,
  output thr_t                     tag_thr,
  output seq_t                     tag_seq,
  // completion updates of the timing table
  input  logic                     wb_en   [WB_PORTS],
  input  thr_t                     wb_thr  [WB_PORTS],
  input  lreg_t                    wb_ldst [WB_PORTS],
  input  seq_t                     wb_seq  [WB_PORTS],
  // load predictor training
  input  logic                     res_en,
  input  logic [PC_W-1:0]          res_pc,
  input  logic [ADDR_W-1:0]        res_addr,
  input  lat_t                     res_lat,
  input  logic                     miss_en,
  input  logic [ADDR_W-1:0]        miss_addr,
  input  time_t                    miss_done,
  input  logic                     fill_en,
  input  logic [ADDR_W-1:0]        fill_addr,
  input  logic                     evict_en,
  input  logic [ADDR_W-1:0]        evict_addr
);

  thr_t  tt_rthr [2*LANES];
  lreg_t tt_rreg [2*LANES];
  time_t tt_rt   [2*LANES];
  seq_t  tt_rseq [2*LANES];
  logic  tt_rpv  [2*LANES];
  logic  tt_wen  [LANES];
  thr_t  tt_wthr [LANES];
  lreg_t tt_wreg [LANES];
  time_t tt_wt   [LANES];
  seq_t  tt_wseq [LANES];
  time_t wb_time [WB_PORTS];

  logic [PC_W-1:0] lp_pc  [MAX_LOAD_PRED];
  lat_t            lp_lat [MAX_LOAD_PRED];
  logic            lp_unp [MAX_LOAD_PRED];

  logic               c_v    [LANES];
  logic signed [31:0] c_wait [LANES];
  logic               c_ok   [LANES];
  qclass_e            c_cls  [LANES];

  time_t dst_rdy [LANES];

  timing_table #(.RD_PORTS(2*LANES), .WR_PORTS(LANES), .UPD_PORTS(WB_PORTS)) u_tt (
    .clk, .rst_n,
    .rd_thr(tt_rthr), .rd_reg(tt_rreg), .rd_time(tt_rt), .rd_seq(tt_rseq), .rd_pv(tt_rpv),
    .wr_en(tt_wen), .wr_thr(tt_wthr), .wr_reg(tt_wreg), .wr_time(tt_wt), .wr_seq(tt_wseq),
    .upd_en(wb_en), .upd_thr(wb_thr), .upd_reg(wb_ldst), .upd_seq(wb_seq), .upd_time(wb_time));

  latency_predictor #(.PORTS(MAX_LOAD_PRED)) u_lp (
    .clk, .rst_n, .now, .q_pc(lp_pc), .q_lat(lp_lat), .q_unpred(lp_unp),
    .res_en, .res_pc, .res_addr, .res_lat, .miss_en, .miss_addr, .miss_done,
    .fill_en, .fill_addr, .evict_en, .evict_addr);

  classifier #(.LANES(LANES), .NUM_Q(NUM_Q)) u_cls (
    .lane_v(c_v), .lane_wait(c_wait), .q_ready, .lane_ok(c_ok), .lane_q(o_q), .lane_cls(c_cls));

  always_comb
    for (int w = 0; w < WB_PORTS; w++) wb_time[w] = now;

  always_comb
    for (int l = 0; l < LANES; l++) begin
      tt_rthr[2*l]   = d_i[l].thr;
      tt_rreg[2*l]   = d_i[l].lsrc1;
      tt_rthr[2*l+1] = d_i[l].thr;
      tt_rreg[2*l+1] = d_i[l].lsrc2;
    end

  // Load lanes are mapped to predictor ports in order.
  always_comb begin
    int unsigned nl;
    nl = 0;
    for (int p = 0; p < MAX_LOAD_PRED; p++) lp_pc[p] = '0;
    for (int l = 0; l < LANES; l++)
      if (d_v[l] && d_i[l].is_load) begin
        for (int p = 0; p < MAX_LOAD_PRED; p++) if (p == nl) lp_pc[p] = d_i[l].pc;
        nl++;
      end
  end

  // Per-lane prediction with in-group chaining, then prefix acceptance.
  logic    lane_unp [LANES];
  logic    lane_ldok[LANES];
  always_comb begin
    int unsigned nl;
    time_t dr [LANES];
    nl = 0;
    for (int l = 0; l < LANES; l++) dr[l] = '0;
    for (int l = 0; l < LANES; l++) begin
      time_t r1, r2, ia;
      seq_t  p1, p2;
      logic  pv1, pv2;
      lat_t  lat;
      r1 = tt_rt[2*l];   p1 = tt_rseq[2*l];   pv1 = tt_rpv[2*l];
      r2 = tt_rt[2*l+1]; p2 = tt_rseq[2*l+1]; pv2 = tt_rpv[2*l+1];
      for (int j = 0; j < l; j++)
        if (d_v[j] && d_i[j].dst_v) begin
          if (d_i[j].ldst == d_i[l].lsrc1) begin r1 = dr[j]; p1 = d_i[j].seq; pv1 = 1'b1; end
          if (d_i[j].ldst == d_i[l].lsrc2) begin r2 = dr[j]; p2 = d_i[j].seq; pv2 = 1'b1; end
        end
      lat          = d_i[l].lat;
      lane_unp[l]  = 1'b0;
      lane_ldok[l] = 1'b1;
      if (d_v[l] && d_i[l].is_load) begin
        lane_ldok[l] = nl < MAX_LOAD_PRED;
        for (int p = 0; p < MAX_LOAD_PRED; p++)
          if (p == nl) begin
            lat         = lp_lat[p];
            lane_unp[l] = lp_unp[p];
          end
        nl++;
      end
      ia = now + MIN_PIPE;
      if (d_i[l].src1_v && tdiff(r1, ia) > 0) ia = r1;
      if (d_i[l].src2_v && tdiff(r2, ia) > 0) ia = r2;
      dr[l]      = ia + time_t'(lat);
      dst_rdy[l] = dr[l];
      c_v[l]     = d_v[l];
      c_wait[l]  = tdiff(ia, now);

      o_d[l]          = '0;
      o_d[l].thr      = d_i[l].thr;
      o_d[l].seq      = d_i[l].seq;
      o_d[l].is_load  = d_i[l].is_load;
      o_d[l].stall_tag   = stall_en && d_i[l].is_load && lane_unp[l];
      o_d[l].issue_at = ia;
      o_d[l].par1_v   = d_i[l].src1_v && pv1;
      o_d[l].par1     = p1;
      o_d[l].par2_v   = d_i[l].src2_v && pv2;
      o_d[l].par2     = p2;
      o_d[l].src1_v   = d_i[l].src1_v;
      o_d[l].psrc1    = d_i[l].psrc1;
      o_d[l].src2_v   = d_i[l].src2_v;
      o_d[l].psrc2    = d_i[l].psrc2;
      o_d[l].dst_v    = d_i[l].dst_v;
      o_d[l].ldst     = d_i[l].ldst;
      o_d[l].pdst     = d_i[l].pdst;
    end
  end

  always_comb begin
    logic go;
    int unsigned n;
    go      = 1'b1;
    n       = 0;
    tag_v   = 1'b0;
    tag_thr = '0;
    tag_seq = '0;
    for (int l = 0; l < LANES; l++) begin
      go = go && d_v[l] && !stalled[d_i[l].thr] && lane_ldok[l] && c_ok[l];
      o_v[l]     = go;
      tt_wen[l]  = go && d_i[l].dst_v;
      tt_wthr[l] = d_i[l].thr;
      tt_wreg[l] = d_i[l].ldst;
      tt_wt[l]   = dst_rdy[l];
      tt_wseq[l] = d_i[l].seq;
      clr_en[l]  = go && d_i[l].dst_v;
      clr_reg[l] = d_i[l].pdst;
      if (go) n++;
      if (go && o_d[l].stall_tag) begin
        tag_v   = 1'b1;
        tag_thr = d_i[l].thr;
        tag_seq = d_i[l].seq;
        go      = 1'b0;   // the thread stops after its tagged load
      end
    end
    acc_n = ($clog2(LANES)+1)'(n);
  end

endmodule
