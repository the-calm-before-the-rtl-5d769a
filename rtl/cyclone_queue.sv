// Cyclone fine-grain scheduler: countdown/replay queue, main queue,
// switchback datapaths and the replay check.
//
// Both queues are QLEN columns of ROWS entries, and each row works on its
// own. Column 0 of the countdown queue sits next to the functional units;
// countdown entries move one column per cycle away from them, main-queue
// entries move one column per cycle toward them. An entry carries `rem`, the
// cycles left until it should reach the execution check. An entry in
// countdown column k switches back into main column k once rem <= k+1, so
// it arrives on time or one cycle late. The switch fails when that main slot
// is filled by an entry coming down the main queue: a structural hazard. The
// entry then stays in the countdown queue and tries again at the next column;
// in the last column it always succeeds, since nothing enters the main tail.
// At main column 0 the physical-register ready bits are read: an entry with
// all sources ready issues (iss_v/iss_d, one per row per cycle); otherwise
// it replays into countdown column 0 of its row with rem = REPLAY_DELAY.
// Replays take precedence; rows left free take new instructions from the
// selected PIB, in PIB order, with rem = predicted issue cycle - (now+1).
// `inj_take` says how many were taken. An instruction takes at least two
// cycles from injection to the check. The queue structure, switchback
// hazards, ready-bit check and selective replay follow the Zephyr scheme (Cyclone
// with queue length 100, 8 rows for the 8-wide machine); the per-row
// organisation, the rem <= k+1 switch rule and REPLAY_DELAY are this
// design's choices. The ready table is instantiated inside; dispatch
// clears destination bits, writeback sets them.
module cyclone_queue
  import zephyr_pkg::*;
#(
  parameter int unsigned QLEN         = 100,
  parameter int unsigned ROWS         = ISSUE_W,
  parameter int unsigned REPLAY_DELAY = 4,
  parameter int unsigned CLR_PORTS    = ISSUE_W,
  parameter int unsigned WB_PORTS     = ISSUE_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  time_t                 now,
  // injection from the selected PIB
  input  logic [$clog2(ROWS):0] inj_avail,
  input  sinstr_t               inj_d     [ROWS],
  output logic [$clog2(ROWS):0] inj_take,
  // ready-bit maintenance
  input  logic                  clr_en    [CLR_PORTS],
  input  preg_t                 clr_reg   [CLR_PORTS],
  input  logic                  wb_en     [WB_PORTS],
  input  preg_t                 wb_reg    [WB_PORTS],
  // issue to the functional units
  output logic                  iss_v     [ROWS],
  output sinstr_t               iss_d     [ROWS],
  // status
  output logic [11:0]           icount    [NUM_THREADS],
  output logic [$clog2(ROWS):0] hazards,    // switchback conflicts this cycle
  output logic [$clog2(ROWS):0] replays,    // replays this cycle
  output logic [15:0]           occupancy
);
  localparam int unsigned REM_W = 10;

  typedef struct packed {
    logic  v;
    thr_t  thr;
    seq_t  seq;
    logic  is_load;
    logic  stall_tag;
    logic  src1_v;
    preg_t psrc1;
    logic  src2_v;
    preg_t psrc2;
    logic  dst_v;
    lreg_t ldst;
    preg_t pdst;
    logic signed [REM_W-1:0] rem;
  } cq_e;

  cq_e cd_q [QLEN][ROWS];
  cq_e mq_q [QLEN][ROWS];
  cq_e cd_n [QLEN][ROWS];
  cq_e mq_n [QLEN][ROWS];

  logic [11:0] icnt_q [NUM_THREADS];
  logic [15:0] occ_q;

  preg_t rt_rd  [2*ROWS];
  logic  rt_rdy [2*ROWS];

  preg_ready_table #(.RD_PORTS(2*ROWS), .CLR_PORTS(CLR_PORTS), .SET_PORTS(WB_PORTS)) u_rdy (
    .clk, .rst_n, .rd_reg(rt_rd), .rd_rdy(rt_rdy),
    .clr_en, .clr_reg, .set_en(wb_en), .set_reg(wb_reg));

  function automatic cq_e from_s(sinstr_t s, logic signed [REM_W-1:0] rem);
    cq_e e;
    e.v = 1'b1;       e.thr = s.thr;       e.seq = s.seq;
    e.is_load = s.is_load;                 e.stall_tag = s.stall_tag;
    e.src1_v = s.src1_v; e.psrc1 = s.psrc1;
    e.src2_v = s.src2_v; e.psrc2 = s.psrc2;
    e.dst_v = s.dst_v;   e.ldst = s.ldst;  e.pdst = s.pdst;
    e.rem = rem;
    return e;
  endfunction

  function automatic sinstr_t to_s(cq_e e, time_t t);
    sinstr_t s;
    s = '0;
    s.thr = e.thr;  s.seq = e.seq;  s.is_load = e.is_load;  s.stall_tag = e.stall_tag;
    s.issue_at = t;
    s.src1_v = e.src1_v; s.psrc1 = e.psrc1;
    s.src2_v = e.src2_v; s.psrc2 = e.psrc2;
    s.dst_v = e.dst_v;   s.ldst = e.ldst;  s.pdst = e.pdst;
    return s;
  endfunction

  function automatic logic signed [REM_W-1:0] dec_sat(logic signed [REM_W-1:0] r);
    return (r == -(1 <<< (REM_W-1))) ? r : r - REM_W'(1);
  endfunction

  logic replay_row [ROWS];
  int unsigned n_iss [NUM_THREADS];
  int unsigned n_inj [NUM_THREADS];

  always_comb begin
    int unsigned j, hz, rp;
    logic signed [31:0] w;
    w = 0;
    for (int r = 0; r < ROWS; r++) begin
      rt_rd[2*r]   = mq_q[0][r].psrc1;
      rt_rd[2*r+1] = mq_q[0][r].psrc2;
    end
    for (int t = 0; t < NUM_THREADS; t++) begin
      n_iss[t] = 0;
      n_inj[t] = 0;
    end
    rp = 0;
    hz = 0;
    // replay check at the head of the main queue
    for (int r = 0; r < ROWS; r++) begin
      cq_e h;
      logic rdy;
      h   = mq_q[0][r];
      rdy = (!h.src1_v || rt_rdy[2*r]) && (!h.src2_v || rt_rdy[2*r+1]);
      iss_v[r]      = h.v && rdy;
      iss_d[r]      = to_s(h, now);
      replay_row[r] = h.v && !rdy;
      if (h.v && rdy) n_iss[h.thr]++;
      if (h.v && !rdy) rp++;
    end
    // main queue advances toward execution
    for (int m = 0; m < QLEN; m++)
      for (int r = 0; r < ROWS; r++)
        mq_n[m][r] = (m < QLEN - 1) ? mq_q[m+1][r] : '0;
    // countdown queue advances away from execution, switching back when due
    for (int k = 0; k < QLEN; k++)
      for (int r = 0; r < ROWS; r++) cd_n[k][r] = '0;
    for (int k = 0; k < QLEN; k++)
      for (int r = 0; r < ROWS; r++) begin
        cq_e e;
        logic due;
        e   = cd_q[k][r];
        due = (e.rem <= REM_W'(k + 1)) || (k == QLEN - 1);
        if (e.v) begin
          if (due && !mq_n[k][r].v) begin
            mq_n[k][r]     = e;
            mq_n[k][r].rem = '0;
          end else begin
            if (due) hz++;
            if (k < QLEN - 1) begin
              cd_n[k+1][r]     = e;
              cd_n[k+1][r].rem = dec_sat(e.rem);
            end
          end
        end
      end
    // column 0: replays first, then new instructions
    j = 0;
    for (int r = 0; r < ROWS; r++) begin
      if (replay_row[r]) begin
        cd_n[0][r] = mq_q[0][r];
        cd_n[0][r].rem = REM_W'(REPLAY_DELAY);
      end else if (j < int'(inj_avail)) begin
        w = tdiff(inj_d[j].issue_at, now + 1);
        if (w < 0)                 w = 0;
        if (w > 2 * int'(QLEN))    w = 2 * QLEN;
        cd_n[0][r] = from_s(inj_d[j], REM_W'(w));
        n_inj[inj_d[j].thr]++;
        j++;
      end
    end
    inj_take = ($clog2(ROWS)+1)'(j);
    hazards  = ($clog2(ROWS)+1)'(hz);
    replays  = ($clog2(ROWS)+1)'(rp);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < QLEN; k++)
        for (int r = 0; r < ROWS; r++) begin
          cd_q[k][r] <= '0;
          mq_q[k][r] <= '0;
        end
      for (int t = 0; t < NUM_THREADS; t++) icnt_q[t] <= '0;
      occ_q <= '0;
    end else begin
      int unsigned ti, tx;
      ti = 0;
      tx = 0;
      cd_q <= cd_n;
      mq_q <= mq_n;
      for (int t = 0; t < NUM_THREADS; t++) begin
        icnt_q[t] <= icnt_q[t] + 12'(n_inj[t]) - 12'(n_iss[t]);
        ti += n_inj[t];
        tx += n_iss[t];
      end
      occ_q <= occ_q + 16'(ti) - 16'(tx);
    end
  end

  assign icount    = icnt_q;
  assign occupancy = occ_q;

endmodule
