// Self-checking test of the Cyclone countdown/main queues.
// Directed part: a lone instruction issues on its predicted cycle (or one
// later) for several delays; an instruction whose source is not ready
// replays until the writeback, then issues. Random part: mixed traffic that
// must produce switchback hazards and replays; every instruction must issue
// exactly once, never before its predicted cycle and never before its
// sources were written back; ICOUNT must match the instructions inside.
// Reduced size: QLEN = 12, ROWS = 2.
module tb_cyclone_queue;
  import zephyr_pkg::*;
  localparam int QL = 12, RW = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  time_t now = 0;
  always @(posedge clk) if (rst_n) now <= now + 1;
  logic [1:0] inj_avail; sinstr_t inj_d[RW]; logic [1:0] inj_take;
  logic clr_en[RW]; preg_t clr_reg[RW]; logic wb_en[RW]; preg_t wb_reg[RW];
  logic iss_v[RW]; sinstr_t iss_d[RW];
  logic [11:0] icount[NUM_THREADS]; logic [1:0] hazards, replays; logic [15:0] occupancy;
  int checks = 0, failures = 0;
  cyclone_queue #(.QLEN(QL), .ROWS(RW), .REPLAY_DELAY(4), .CLR_PORTS(RW), .WB_PORTS(RW)) dut (.*);
  task automatic chk(string w, logic ok); checks++; if (!ok) begin failures++; $display("FAIL %s", w); end endtask

  // reference state
  logic  rdy [NUM_PREGS];
  time_t want [int];      // seq -> predicted cycle
  int    issued [int];
  int    in_q [NUM_THREADS];
  int    n_hz = 0, n_rp = 0;

  always @(posedge clk) if (rst_n) begin
    for (int r = 0; r < RW; r++) if (iss_v[r]) begin
      int s; s = iss_d[r].seq;
      chk("issued once", !issued.exists(s));
      issued[s] = now;
      chk($sformatf("not early seq %0d", s), want.exists(s) && tdiff(now, want[s]) >= 0);
      chk("src1 ready", !iss_d[r].src1_v || rdy[iss_d[r].psrc1]);
      chk("src2 ready", !iss_d[r].src2_v || rdy[iss_d[r].psrc2]);
      in_q[iss_d[r].thr]--;
    end
    for (int j = 0; j < int'(inj_take); j++) in_q[inj_d[j].thr]++;
    n_hz += hazards; n_rp += replays;
    for (int r = 0; r < RW; r++) if (wb_en[r]) rdy[wb_reg[r]] = 1;
    for (int r = 0; r < RW; r++) if (clr_en[r]) rdy[clr_reg[r]] = 0;
  end

  task automatic idle();
    inj_avail = 0;
    foreach (clr_en[r]) begin clr_en[r] = 0; wb_en[r] = 0; end
  endtask

  function automatic sinstr_t mk(int seq, int thr, int delay, int s1);
    sinstr_t s; s = '0;
    s.seq = seq_t'(seq); s.thr = thr_t'(thr); s.issue_at = now + time_t'(delay);
    s.src1_v = s1 >= 0; s.psrc1 = preg_t'(s1 < 0 ? 0 : s1);
    return s;
  endfunction

  initial begin #400000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int seq; seq = 0;
    foreach (rdy[i]) rdy[i] = 1;
    foreach (in_q[t]) in_q[t] = 0;
    foreach (inj_d[r]) inj_d[r] = '0;
    foreach (clr_reg[r]) begin clr_reg[r] = 0; wb_reg[r] = 0; end
    idle();
    repeat (2) @(posedge clk); rst_n = 1;
    // lone instructions
    foreach (inj_d[r]) ;
    for (int d = 2; d <= 2 * QL; d += 3) begin
      @(negedge clk);
      inj_d[0] = mk(seq, 0, d, -1); inj_avail = 1; want[seq] = inj_d[0].issue_at;
      @(posedge clk); #1 idle();
      repeat (2 * QL + 4) @(posedge clk);
      chk($sformatf("lone delay %0d issued", d), issued.exists(seq));
      if (issued.exists(seq)) chk($sformatf("lone delay %0d on time (%0d vs %0d)", d, issued[seq], want[seq]),
                                  issued[seq] - int'(want[seq]) <= 1);
      seq++;
    end
    // replay: source 9 not ready
    @(negedge clk); clr_en[0] = 1; clr_reg[0] = 9; @(posedge clk); #1 idle();
    @(negedge clk); inj_d[0] = mk(seq, 1, 3, 9); inj_avail = 1; want[seq] = inj_d[0].issue_at;
    @(posedge clk); #1 idle();
    repeat (30) @(posedge clk);
    chk("not issued while unready", !issued.exists(seq));
    chk($sformatf("replayed %0d", n_rp), n_rp >= 3);
    @(negedge clk); wb_en[0] = 1; wb_reg[0] = 9; @(posedge clk); #1 idle();
    repeat (12) @(posedge clk);
    chk("issued after writeback", issued.exists(seq));
    seq++;
    // random traffic
    for (int c = 0; c < 400; c++) begin
      @(negedge clk);
      idle();
      inj_avail = (seq < 120) ? 2'($urandom_range(0, RW)) : 2'd0;
      for (int j = 0; j < RW; j++) begin
        int s1; s1 = ($urandom_range(0, 3) == 0) ? $urandom_range(16, 23) : -1;
        inj_d[j] = mk(seq + j, $urandom_range(0, 3), $urandom_range(0, 2 * QL - 2), s1);
      end
      if ($urandom_range(0, 7) == 0) begin clr_en[0] = 1; clr_reg[0] = preg_t'($urandom_range(16, 23)); end
      if ($urandom_range(0, 3) == 0) begin wb_en[1] = 1; wb_reg[1] = preg_t'($urandom_range(16, 23)); end
      #1;
      for (int j = 0; j < int'(inj_take); j++) want[seq + j] = inj_d[j].issue_at;
      seq += int'(inj_take);
      @(posedge clk);
    end
    @(negedge clk); idle();
    for (int p = 16; p < 24; p++) begin @(negedge clk); wb_en[0] = 1; wb_reg[0] = preg_t'(p); end
    @(negedge clk); idle();
    repeat (8 * QL) @(posedge clk);
    chk($sformatf("all issued %0d of %0d", issued.num(), seq), issued.num() == seq);
    chk($sformatf("hazards seen %0d", n_hz), n_hz > 0);
    chk($sformatf("replays seen %0d", n_rp), n_rp > 0);
    for (int t = 0; t < NUM_THREADS; t++) chk("icount", int'(icount[t]) == in_q[t]);
    chk("occupancy empty", occupancy == 0);
    $display("hazards=%0d replays=%0d", n_hz, n_rp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
