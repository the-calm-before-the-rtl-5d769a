// Self-checking test of the coarse-grain sorting engine.
// Pushes instructions of two threads into random queues, some naming an
// earlier instruction as parent. Checks: each leaves no earlier than its
// queue's delay; a child never leaves before (or with) its parent; at most
// PIB_WR per thread per cycle and never more than the PIB space offered;
// every instruction leaves exactly once; the lock is seen holding a child;
// occupancy returns to zero. Full default queue line-up.
module tb_coarse_sort_engine;
  import zephyr_pkg::*;
  localparam int L = 4, WRP = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  time_t now = 0;
  always @(posedge clk) if (rst_n) now <= now + 1;
  logic in_v[L]; logic [3:0] in_q[L]; sinstr_t in_data[L]; logic q_ready[16];
  logic [5:0] pib_space[NUM_THREADS]; logic pib_wr_v[NUM_THREADS][WRP]; sinstr_t pib_wr_d[NUM_THREADS][WRP];
  logic [15:0] occupancy; logic lock_hold;
  int checks = 0, failures = 0;
  coarse_sort_engine #(.LANES(L), .PIB_WR(WRP), .PIB_DEPTH(32)) dut (.*);
  task automatic chk(string w, logic ok); checks++; if (!ok) begin failures++; $display("FAIL %s", w); end endtask

  time_t t_in [int]; int qd [int]; time_t t_out [int]; int par [int];
  int holds = 0;
  function automatic int key(int thr, int seq); return thr * 128 + seq; endfunction

  always @(posedge clk) if (rst_n) begin
    if (lock_hold) holds++;
    for (int t = 0; t < NUM_THREADS; t++) begin
      int n; n = 0;
      for (int k = 0; k < WRP; k++) if (pib_wr_v[t][k]) begin
        int kk; kk = key(pib_wr_d[t][k].thr, pib_wr_d[t][k].seq);
        n++;
        chk("known", t_in.exists(kk));
        chk("once", !t_out.exists(kk));
        t_out[kk] = now;
        chk($sformatf("delay %0d >= %0d", now - t_in[kk], qd[kk]), int'(now - t_in[kk]) >= qd[kk]);
        if (par[kk] >= 0) chk("parent first", t_out.exists(par[kk]) && t_out[par[kk]] < now);
      end
      chk("space", n <= int'(pib_space[t]));
    end
  end

  initial begin #400000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int seq [2] = '{0, 0};
    int pushed = 0;
    foreach (in_v[i]) begin in_v[i] = 0; in_q[i] = 0; in_data[i] = '0; end
    foreach (pib_space[t]) pib_space[t] = 8;
    repeat (2) @(posedge clk); rst_n = 1;
    // directed: parent in a 20-cycle queue, child in a fast queue
    @(negedge clk);
    in_v[0] = 1; in_q[0] = 12; in_data[0] = '0; in_data[0].thr = 0; in_data[0].seq = 0;
    in_v[1] = 1; in_q[1] = 0;  in_data[1] = '0; in_data[1].thr = 0; in_data[1].seq = 1;
    in_data[1].par1_v = 1; in_data[1].par1 = 0;
    t_in[key(0,0)] = now; qd[key(0,0)] = 20; par[key(0,0)] = -1;
    t_in[key(0,1)] = now; qd[key(0,1)] = 0;  par[key(0,1)] = key(0,0);
    seq[0] = 2; pushed = 2;
    @(posedge clk); #1 foreach (in_v[i]) in_v[i] = 0;
    repeat (25) @(posedge clk);
    chk("child released after parent", t_out.exists(key(0,1)) && t_out[key(0,1)] > t_out[key(0,0)]);
    chk("lock held", holds > 0);
    // random traffic
    for (int c = 0; c < 300; c++) begin
      logic [15:0] used;
      @(negedge clk);
      used = '0;
      foreach (pib_space[t]) pib_space[t] = 6'($urandom_range(0, 3));
      #1;
      for (int i = 0; i < L; i++) begin
        int q, th;
        in_v[i] = 0;
        q = $urandom_range(0, 15); th = $urandom_range(0, 1);
        if (seq[th] < 120 && q_ready[q] && !used[q] && $urandom_range(0, 1)) begin
          used[q] = 1;
          in_v[i] = 1; in_q[i] = 4'(q);
          in_data[i] = '0; in_data[i].thr = thr_t'(th); in_data[i].seq = seq_t'(seq[th]);
          par[key(th, seq[th])] = -1;
          if (seq[th] > 0 && $urandom_range(0, 1)) begin
            int p; p = $urandom_range(0, seq[th] - 1);
            in_data[i].par1_v = 1; in_data[i].par1 = seq_t'(p);
            par[key(th, seq[th])] = key(th, p);
          end
          t_in[key(th, seq[th])] = now; qd[key(th, seq[th])] = qclass_delay(sortq_class(q));
          seq[th]++; pushed++;
        end
      end
      @(posedge clk);
    end
    @(negedge clk); foreach (in_v[i]) in_v[i] = 0;
    foreach (pib_space[t]) pib_space[t] = 8;
    repeat (400) @(posedge clk);
    chk($sformatf("all left %0d/%0d", t_out.num(), pushed), t_out.num() == pushed);
    chk("occupancy", occupancy == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
