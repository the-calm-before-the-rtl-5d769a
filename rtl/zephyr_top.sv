// Zephyr scheduler: coarse-grain sorting in front of a Cyclone scheduler.
//
// A replay-based Cyclone scheduler degrades badly on an SMT core when many
// instructions wait in its switchback queues: crowded queues cause switchback
// conflicts, conflicts cause replays, and replays crowd the queues further.
// Zephyr keeps the Cyclone queues short by letting instructions in only
// shortly before their operands should be ready:
//   1. prediction_engine  - timing table + load latency prediction give each
//                           instruction a predicted issue cycle;
//   2. coarse_sort_engine - sixteen delay FIFOs (0/5/10/20/150 cycles) absorb
//                           most of the wait, with a parent lock;
//   3. pib x NUM_THREADS  - per-thread pre-issue buffers, chosen by ICOUNT;
//   4. cyclone_queue      - countdown/main queues with switchback and
//                           selective replay do the fine-grain timing.
// With stall_en set (the stalling variant), a thread that dispatches a load
// of unpredictable latency is held until that load issues.
// Interface: a dispatch group of up to ISSUE_W renamed instructions of one
// thread per cycle (d_v/d_i); acc_n lanes of it are taken, the rest must be
// offered again. Issued instructions leave on iss_v/iss_d; the functional
// units and caches outside report writebacks (wb_*: sets the ready bit and
// corrects the timing table) and load outcomes (res_*, miss_*, fill_*,
// evict_*) that train the latency predictor. `now` is the cycle counter used
// for all timestamps. Status outputs give per-cycle switchback hazards and
// replays, queue occupancies, per-thread ICOUNT and stall state.
module zephyr_top
  import zephyr_pkg::*;
#(
  parameter int unsigned QLEN         = 100,
  parameter int unsigned PIB_DEPTH    = 32,
  parameter int unsigned PIB_WR       = 4,
  parameter int unsigned REPLAY_DELAY = 4,
  parameter int unsigned MIN_PIPE     = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              stall_en,
  // dispatch
  input  logic              d_v      [ISSUE_W],
  input  instr_t            d_i      [ISSUE_W],
  output logic [$clog2(ISSUE_W):0] acc_n,
  // issue
  output logic              iss_v    [ISSUE_W],
  output sinstr_t           iss_d    [ISSUE_W],
  // writeback
  input  logic              wb_en    [ISSUE_W],
  input  thr_t              wb_thr   [ISSUE_W],
  input  lreg_t             wb_ldst  [ISSUE_W],
  input  seq_t              wb_seq   [ISSUE_W],
  input  preg_t             wb_preg  [ISSUE_W],
  // memory-side training
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
  input  logic [ADDR_W-1:0] evict_addr,
  // status
  output time_t             now,
  output logic [$clog2(ISSUE_W):0] hazards,
  output logic [$clog2(ISSUE_W):0] replays,
  output logic [15:0]       cq_occupancy,
  output logic [15:0]       sort_occupancy,
  output logic [11:0]       icount   [NUM_THREADS],
  output logic              stalled  [NUM_THREADS],
  output logic              lock_hold
);
  localparam int unsigned PS_W = $clog2(PIB_DEPTH) + 1;

  time_t now_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) now_q <= '0;
    else        now_q <= now_q + 1'b1;
  assign now = now_q;

  // prediction -> sorting
  logic                         q_ready [NUM_SORTQ];
  logic                         p_v     [ISSUE_W];
  logic [$clog2(NUM_SORTQ)-1:0] p_q     [ISSUE_W];
  sinstr_t                      p_d     [ISSUE_W];
  logic                         clr_en  [ISSUE_W];
  preg_t                        clr_reg [ISSUE_W];
  logic                         tag_v;
  thr_t                         tag_thr;
  seq_t                         tag_seq;

  prediction_engine #(.MIN_PIPE(MIN_PIPE)) u_pred (
    .clk, .rst_n, .now(now_q), .stall_en,
    .d_v, .d_i, .acc_n,
    .q_ready, .o_v(p_v), .o_q(p_q), .o_d(p_d),
    .clr_en, .clr_reg,
    .stalled, .tag_v, .tag_thr, .tag_seq,
    .wb_en, .wb_thr, .wb_ldst, .wb_seq,
    .res_en, .res_pc, .res_addr, .res_lat, .miss_en, .miss_addr, .miss_done,
    .fill_en, .fill_addr, .evict_en, .evict_addr);

  // sorting -> PIBs
  logic [PS_W-1:0] pib_space [NUM_THREADS];
  logic [PS_W-1:0] pib_count [NUM_THREADS];
  logic            pib_wr_v  [NUM_THREADS][PIB_WR];
  sinstr_t         pib_wr_d  [NUM_THREADS][PIB_WR];

  coarse_sort_engine #(.PIB_WR(PIB_WR), .PIB_DEPTH(PIB_DEPTH)) u_sort (
    .clk, .rst_n, .now(now_q),
    .in_v(p_v), .in_q(p_q), .in_data(p_d), .q_ready,
    .pib_space, .pib_wr_v, .pib_wr_d,
    .occupancy(sort_occupancy), .lock_hold);

  logic                     pib_rd_v [NUM_THREADS][ISSUE_W];
  sinstr_t                  pib_rd_d [NUM_THREADS][ISSUE_W];
  logic [$clog2(ISSUE_W):0] pib_pop  [NUM_THREADS];
  logic                     pib_ne   [NUM_THREADS];

  for (genvar t = 0; t < NUM_THREADS; t++) begin : g_pib
    pib #(.DEPTH(PIB_DEPTH), .WR(PIB_WR), .RD(ISSUE_W)) u_pib (
      .clk, .rst_n, .wr_v(pib_wr_v[t]), .wr_d(pib_wr_d[t]),
      .space(pib_space[t]), .count(pib_count[t]),
      .rd_v(pib_rd_v[t]), .rd_d(pib_rd_d[t]), .pop_n(pib_pop[t]));
    assign pib_ne[t] = pib_count[t] != '0;
  end

  // ICOUNT selection and injection into Cyclone
  logic                     sel_v;
  thr_t                     sel_thr;
  logic [$clog2(ISSUE_W):0] inj_avail, inj_take;
  sinstr_t                  inj_d [ISSUE_W];

  icount_select u_icount (.pib_nonempty(pib_ne), .icount, .sel_v, .sel_thr);

  always_comb begin
    inj_avail = '0;
    if (sel_v)
      inj_avail = (int'(pib_count[sel_thr]) > ISSUE_W) ? ($clog2(ISSUE_W)+1)'(ISSUE_W)
                                                       : ($clog2(ISSUE_W)+1)'(pib_count[sel_thr]);
    for (int r = 0; r < ISSUE_W; r++) inj_d[r] = pib_rd_d[sel_thr][r];
    for (int t = 0; t < NUM_THREADS; t++)
      pib_pop[t] = (sel_v && thr_t'(t) == sel_thr) ? inj_take : '0;
  end

  cyclone_queue #(.QLEN(QLEN), .REPLAY_DELAY(REPLAY_DELAY)) u_cyc (
    .clk, .rst_n, .now(now_q),
    .inj_avail, .inj_d, .inj_take,
    .clr_en, .clr_reg, .wb_en, .wb_reg(wb_preg),
    .iss_v, .iss_d,
    .icount, .hazards, .replays, .occupancy(cq_occupancy));

  stall_ctrl u_stall (
    .clk, .rst_n, .stall_en,
    .set_v(tag_v), .set_thr(tag_thr), .set_seq(tag_seq),
    .iss_v, .iss_d, .stalled);

endmodule
