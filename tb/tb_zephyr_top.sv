// End-to-end test of the Zephyr scheduler at its default size.
//
// Around the scheduler the testbench models what the design leaves outside:
//  - a front end: four threads, each looping over a 16-instruction program
//    (ALU, multiply and five loads with strided, constant or random addresses),
//    renamed onto a free list of physical registers, in-order retirement with
//    at most 48 instructions per thread in flight, one thread per cycle
//    offering up to 8 instructions (round robin);
//  - functional units: a writeback ISSUE latency cycles after issue (up to 8
//    writebacks per cycle, excess delayed);
//  - a memory side: a set of resident L1 blocks, in-flight misses with L2
//    (14-cycle) or memory (164-cycle) latency, fills, random evictions, and a
//    load-resolution report per issued load.
// Phase 1 runs without stalling, phase 2 with stall_en = 1; each phase
// dispatches a fixed number of instructions and drains. Checks: every
// dispatched instruction issues exactly once and only after its sources
// were written back; everything drains (queues empty, ICOUNT zero).
// Counted mechanisms, each of which must occur: switchback hazards, replays,
// every sorting-queue class, the parent lock holding a head, the two-load
// limit cutting a group, ICOUNT choosing among several non-empty PIBs, each
// latency-prediction path (LHT, SILO, definite miss, maybe hit,
// unpredictable), thread stalls and their release.
module tb_zephyr_top;
  import zephyr_pkg::*;
  localparam int N_PER_PHASE = 1500;
  localparam int MAX_INFLIGHT = 48;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic stall_en = 0;
  logic d_v[ISSUE_W]; instr_t d_i[ISSUE_W]; logic [3:0] acc_n;
  logic iss_v[ISSUE_W]; sinstr_t iss_d[ISSUE_W];
  logic wb_en[ISSUE_W]; thr_t wb_thr[ISSUE_W]; lreg_t wb_ldst[ISSUE_W]; seq_t wb_seq[ISSUE_W]; preg_t wb_preg[ISSUE_W];
  logic res_en; logic [PC_W-1:0] res_pc; logic [ADDR_W-1:0] res_addr; lat_t res_lat;
  logic miss_en; logic [ADDR_W-1:0] miss_addr; time_t miss_done;
  logic fill_en; logic [ADDR_W-1:0] fill_addr; logic evict_en; logic [ADDR_W-1:0] evict_addr;
  time_t now; logic [3:0] hazards, replays; logic [15:0] cq_occupancy, sort_occupancy;
  logic [11:0] icount[NUM_THREADS]; logic stalled[NUM_THREADS]; logic lock_hold;

  zephyr_top dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(string w, logic ok); checks++; if (!ok) begin failures++; $display("FAIL %s", w); end endtask

  // ---------------- static programs ----------------
  typedef struct { int kind; int s1, s2, d; int amode; } sop_t;  // kind 0 alu,1 mul,2 load; amode 0 stride 8,1 const,2 random,3 stride 32
  sop_t prog [NUM_THREADS][16];

  // ---------------- per-thread dynamic state ----------------
  typedef struct {
    instr_t i;
    logic [ADDR_W-1:0] addr;
    logic issued, done;
    preg_t old_preg;
  } dyn_t;
  dyn_t  rob [NUM_THREADS][128];
  int    head [NUM_THREADS], tail [NUM_THREADS], pc_i [NUM_THREADS], iter [NUM_THREADS];
  preg_t map [NUM_THREADS][NUM_LREGS];
  preg_t freel [$];
  logic  prdy [NUM_PREGS];
  int    dispatched = 0, issued_n = 0, phase_disp = 0;
  int    rr = 0;

  // writeback and memory event queues
  typedef struct { time_t t; thr_t thr; lreg_t ldst; seq_t seq; preg_t p; logic dv; } wbq_t;
  wbq_t wbq [$];
  typedef struct { time_t t; logic [ADDR_W-1:0] blk; } fillq_t;
  fillq_t fillq [$];
  typedef struct { logic [PC_W-1:0] pc; logic [ADDR_W-1:0] a; int lat; } resq_t;
  resq_t resq [$];
  typedef struct { logic [ADDR_W-1:0] a; time_t d; } missq_t;
  missq_t missq [$];
  bit    resident [logic [ADDR_W-1:0]];
  time_t inflight [logic [ADDR_W-1:0]];

  // mechanism counters
  int c_hz = 0, c_rp = 0, c_lock = 0, c_ldcut = 0, c_icnt = 0, c_stall = 0, c_release = 0;
  int c_cls [5] = '{0, 0, 0, 0, 0};
  int c_lht = 0, c_silo = 0, c_dmiss = 0, c_mhit = 0, c_unp = 0;
  logic st_prev [NUM_THREADS];

  function automatic logic [PC_W-1:0] pc_of(int t, int k); return 32'h1000 + 32'(t) * 32'h100 + 32'(k) * 4; endfunction

  function automatic logic [ADDR_W-1:0] addr_of(int t, int k, int it);
    case (prog[t][k].amode)
      0: return 32'h0010_0000 * (t + 1) + 32'(k) * 32'h1000 + 32'(it) * 8;
      1: return 32'h0080_0000 + 32'(t) * 64;
      3: return 32'h0200_0000 * (t + 1) + 32'(it) * 32;
      default: return 32'h0100_0000 + ($urandom & 32'h000F_FFE0);
    endcase
  endfunction

  function automatic int inflight_n(int t); return tail[t] - head[t]; endfunction

  initial begin #5000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // ---------------- drive ----------------
  task automatic drive_idle();
    foreach (d_v[l]) begin d_v[l] = 0; d_i[l] = '0; end
    foreach (wb_en[w]) begin wb_en[w] = 0; wb_thr[w] = 0; wb_ldst[w] = 0; wb_seq[w] = 0; wb_preg[w] = 0; end
    res_en = 0; res_pc = 0; res_addr = 0; res_lat = 0;
    miss_en = 0; miss_addr = 0; miss_done = 0;
    fill_en = 0; fill_addr = 0; evict_en = 0; evict_addr = 0;
  endtask

  // Build (without committing) the next instructions of thread t.
  int offer_t;
  dyn_t offer [ISSUE_W];
  int offer_n;
  task automatic build_offer(int limit);
    preg_t m [NUM_LREGS];
    int fl;
    offer_n = 0;
    offer_t = -1;
    for (int k = 0; k < NUM_THREADS; k++) begin
      int t; t = (rr + k) % NUM_THREADS;
      if (offer_t < 0 && !stalled[t] && inflight_n(t) < MAX_INFLIGHT) offer_t = t;
    end
    if (offer_t < 0) return;
    rr = (offer_t + 1) % NUM_THREADS;
    m = map[offer_t];
    fl = 0;
    for (int l = 0; l < ISSUE_W; l++) begin
      int t, k, it; sop_t o; instr_t i; dyn_t d;
      t = offer_t;
      if (offer_n >= limit || inflight_n(t) + l >= MAX_INFLIGHT || fl >= freel.size()) break;
      k = (pc_i[t] + l) % 16; it = iter[t] + (pc_i[t] + l) / 16;
      o = prog[t][k];
      i = '0;
      i.thr = thr_t'(t); i.seq = seq_t'(tail[t] + l); i.pc = pc_of(t, k);
      i.is_load = o.kind == 2; i.lat = lat_t'(o.kind == 1 ? 3 : 1);
      i.src1_v = 1; i.lsrc1 = lreg_t'(o.s1); i.psrc1 = m[o.s1];
      i.src2_v = o.s2 >= 0; i.lsrc2 = lreg_t'(o.s2 < 0 ? 0 : o.s2); i.psrc2 = m[o.s2 < 0 ? 0 : o.s2];
      i.dst_v = 1; i.ldst = lreg_t'(o.d); i.pdst = freel[fl];
      d.old_preg = m[o.d];
      m[o.d] = freel[fl]; fl++;
      d.i = i; d.addr = addr_of(t, k, it); d.issued = 0; d.done = 0;
      offer[l] = d;
      offer_n++;
    end
  endtask

  always @(negedge clk) if (rst_n) begin
    int nl, third;
    drive_idle();
    // dispatch offer
    build_offer(phase_disp < N_PER_PHASE ? ISSUE_W : 0);
    nl = 0; third = -1;
    for (int l = 0; l < offer_n; l++) begin
      d_v[l] = 1; d_i[l] = offer[l].i;
      if (offer[l].i.is_load) begin nl++; if (nl == 3) third = l; end
    end
    // writebacks due
    begin
      int n; n = 0;
      for (int q = 0; q < wbq.size() && n < ISSUE_W; ) begin
        if (tdiff(now, wbq[q].t) >= 0) begin
          wb_en[n] = wbq[q].dv; wb_thr[n] = wbq[q].thr; wb_ldst[n] = wbq[q].ldst; wb_seq[n] = wbq[q].seq; wb_preg[n] = wbq[q].p;
          n++; wbq.delete(q);
        end else q++;
      end
    end
    // memory side: one of each event per cycle
    if (resq.size() > 0) begin res_en = 1; res_pc = resq[0].pc; res_addr = resq[0].a; res_lat = lat_t'(resq[0].lat > 255 ? 255 : resq[0].lat); void'(resq.pop_front()); end
    if (missq.size() > 0) begin miss_en = 1; miss_addr = missq[0].a; miss_done = missq[0].d; void'(missq.pop_front()); end
    if (fillq.size() > 0 && tdiff(now, fillq[0].t) >= 0) begin
      fill_en = 1; fill_addr = fillq[0].blk;
      resident[fillq[0].blk] = 1; inflight.delete(fillq[0].blk);
      void'(fillq.pop_front());
    end else if (resident.num() > 400) begin
      logic [ADDR_W-1:0] b; void'(resident.first(b));
      for (int s = $urandom_range(0, 50); s > 0; s--) void'(resident.next(b));
      evict_en = 1; evict_addr = b; resident.delete(b);
    end
    #1;
    if (third >= 0 && int'(acc_n) <= third) c_ldcut++;
  end

  // ---------------- observe at the clock edge ----------------
  always @(posedge clk) if (rst_n) begin
    // prediction paths of accepted loads
    for (int p = 0; p < 2; p++) if (dut.u_pred.lp_pc[p] != 0) begin
      if (dut.u_pred.u_lp.lht_conf[p]) c_lht++;
      else if (dut.u_pred.u_lp.q_unpred[p]) c_unp++;
      else if (dut.u_pred.u_lp.silo_hit[p]) c_silo++;
      else if (dut.u_pred.u_lp.md_miss[p]) c_dmiss++;
      else c_mhit++;
    end
    for (int l = 0; l < ISSUE_W; l++) if (dut.u_pred.o_v[l]) c_cls[int'(sortq_class(int'(dut.u_pred.o_q[l])))]++;
    if (lock_hold) c_lock++;
    c_hz += hazards; c_rp += replays;
    begin
      int ne; ne = 0;
      for (int t = 0; t < NUM_THREADS; t++) if (dut.pib_ne[t]) ne++;
      if (ne >= 2 && dut.sel_v && int'(dut.inj_take) > 0) c_icnt++;
    end
    for (int t = 0; t < NUM_THREADS; t++) begin
      if (stalled[t] && !st_prev[t]) c_stall++;
      if (!stalled[t] && st_prev[t]) c_release++;
      st_prev[t] = stalled[t];
    end
    // accepted dispatch: commit rename state
    if (offer_t >= 0) begin
      int t; t = offer_t;
      for (int l = 0; l < int'(acc_n); l++) begin
        rob[t][(tail[t] + l) % 128] = offer[l];
        map[t][offer[l].i.ldst] = offer[l].i.pdst;
        prdy[offer[l].i.pdst] = 0;
        void'(freel.pop_front());
      end
      tail[t] += int'(acc_n);
      pc_i[t] += int'(acc_n);
      while (pc_i[t] >= 16) begin pc_i[t] -= 16; iter[t]++; end
      dispatched += int'(acc_n); phase_disp += int'(acc_n);
    end
    // issue
    for (int r = 0; r < ISSUE_W; r++) if (iss_v[r]) begin
      int t, idx, lat; dyn_t d; wbq_t w;
      t = iss_d[r].thr;
      idx = -1;
      for (int j = head[t]; j < tail[t]; j++) if (seq_t'(j) == iss_d[r].seq) idx = j;
      chk("issued instruction is in flight", idx >= 0);
      if (idx >= 0) begin
        d = rob[t][idx % 128];
        chk("issued once", !d.issued);
        chk("src1 written back", !d.i.src1_v || prdy[d.i.psrc1]);
        chk("src2 written back", !d.i.src2_v || prdy[d.i.psrc2]);
        lat = d.i.lat;
        if (d.i.is_load) begin
          logic [ADDR_W-1:0] b; b = {d.addr[ADDR_W-1:BLK_OFF], 5'd0};
          if (resident.exists(b)) lat = L1_LAT;
          else if (inflight.exists(b)) lat = tdiff(inflight[b], now) < L1_LAT ? L1_LAT : int'(tdiff(inflight[b], now));
          else begin
            fillq_t f;
            lat = ($urandom_range(0, 3) == 0) ? MEM_LAT : L1_LAT + L2_LAT;
            inflight[b] = now + time_t'(lat);
            f.t = now + time_t'(lat) - 1; f.blk = b; fillq.push_back(f);
            missq.push_back('{b, now + time_t'(lat)});
          end
          resq.push_back('{d.i.pc, d.addr, lat});
        end
        w.t = now + time_t'(lat) - 1; w.thr = d.i.thr; w.ldst = d.i.ldst; w.seq = d.i.seq; w.p = d.i.pdst; w.dv = 1;
        wbq.push_back(w);
        rob[t][idx % 128].issued = 1;
        issued_n++;
      end
    end
    // writebacks land
    for (int w = 0; w < ISSUE_W; w++) if (wb_en[w]) begin
      int t; t = wb_thr[w];
      prdy[wb_preg[w]] = 1;
      for (int j = head[t]; j < tail[t]; j++) if (seq_t'(j) == wb_seq[w]) rob[t][j % 128].done = 1;
    end
    // in-order retirement frees the previous mapping
    for (int t = 0; t < NUM_THREADS; t++)
      while (head[t] < tail[t] && rob[t][head[t] % 128].done) begin
        freel.push_back(rob[t][head[t] % 128].old_preg);
        head[t]++;
      end
  end

  task automatic drain(string ph);
    int guard; guard = 0;
    while ((issued_n < dispatched || wbq.size() > 0) && guard < 20000) begin @(posedge clk); guard++; end
    repeat (5) @(posedge clk);
    chk({ph, ": all issued"}, issued_n == dispatched);
    chk({ph, ": cyclone empty"}, cq_occupancy == 0);
    chk({ph, ": sorting empty"}, sort_occupancy == 0);
    for (int t = 0; t < NUM_THREADS; t++) chk({ph, ": icount zero"}, icount[t] == 0);
    $display("%s: cycle %0d dispatched %0d issued %0d", ph, now, dispatched, issued_n);
  endtask

  initial begin
    // programs: r1..r31; loads feed later ALU ops
    for (int t = 0; t < NUM_THREADS; t++)
      for (int k = 0; k < 16; k++) begin
        prog[t][k].kind  = (k % 4 == 1 || k == 2) ? 2 : (k % 7 == 3) ? 1 : 0;
        prog[t][k].s1    = (k % 2) ? 1 + (k + 15) % 16 : 1 + (k + 13) % 16;
        prog[t][k].s2    = (k % 2) ? -1 : 1 + (k + 31 - 3) % 31;
        prog[t][k].d     = 1 + k;
        prog[t][k].amode = (k == 5) ? 2 : (k == 9 && t < 2) ? 1 : (k == 2) ? 3 : 0;
      end
    for (int t = 0; t < NUM_THREADS; t++) begin
      head[t] = 0; tail[t] = 0; pc_i[t] = 0; iter[t] = 0; st_prev[t] = 0;
      for (int r = 0; r < NUM_LREGS; r++) map[t][r] = preg_t'(t * NUM_LREGS + r);
    end
    for (int p = NUM_THREADS * NUM_LREGS; p < NUM_PREGS; p++) freel.push_back(preg_t'(p));
    foreach (prdy[p]) prdy[p] = 1;
    drive_idle();
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1: Zephyr
    while (phase_disp < N_PER_PHASE) @(posedge clk);
    drain("zephyr");
    // phase 2: stalling on unpredictable loads
    phase_disp = 0; stall_en = 1;
    while (phase_disp < N_PER_PHASE) @(posedge clk);
    drain("zephyr-stall");
    $display("hazards=%0d replays=%0d lock=%0d ldcut=%0d icount_choices=%0d stalls=%0d releases=%0d",
             c_hz, c_rp, c_lock, c_ldcut, c_icnt, c_stall, c_release);
    $display("classes 0:%0d 5:%0d 10:%0d 20:%0d 150:%0d", c_cls[0], c_cls[1], c_cls[2], c_cls[3], c_cls[4]);
    $display("pred lht=%0d silo=%0d dmiss=%0d mhit=%0d unpred=%0d", c_lht, c_silo, c_dmiss, c_mhit, c_unp);
    chk("switchback hazards seen", c_hz > 0);
    chk("replays seen", c_rp > 0);
    chk("parent lock held", c_lock > 0);
    chk("two-load limit cut", c_ldcut > 0);
    chk("icount choice", c_icnt > 0);
    chk("thread stalled", c_stall > 0);
    chk("thread released", c_release > 0);
    for (int c = 0; c < 5; c++) chk($sformatf("class %0d used", c), c_cls[c] > 0);
    chk("lht path", c_lht > 0);
    chk("silo path", c_silo > 0);
    chk("definite miss path", c_dmiss > 0);
    chk("maybe hit path", c_mhit > 0);
    chk("unpredictable path", c_unp > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
