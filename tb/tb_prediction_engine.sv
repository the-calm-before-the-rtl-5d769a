// Self-checking test of the latency prediction engine.
// Directed cases with hand-computed expectations (MIN_PIPE = 3):
// independent instruction; a dependence chain inside one group; a
// dependence on an earlier group through the timing table; the two-load
// limit; a stalled thread; tagging of an unpredictable load in stall mode;
// no free sorting queue; a completion update moving a ready cycle.
module tb_prediction_engine;
  import zephyr_pkg::*;
  localparam int L = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  time_t now = 0;
  always @(posedge clk) if (rst_n) now <= now + 1;
  logic stall_en = 0;
  logic d_v[L]; instr_t d_i[L]; logic [2:0] acc_n;
  logic q_ready[16]; logic o_v[L]; logic [3:0] o_q[L]; sinstr_t o_d[L];
  logic clr_en[L]; preg_t clr_reg[L];
  logic stalled[NUM_THREADS]; logic tag_v; thr_t tag_thr; seq_t tag_seq;
  logic wb_en[2]; thr_t wb_thr[2]; lreg_t wb_ldst[2]; seq_t wb_seq[2];
  logic res_en = 0; logic [PC_W-1:0] res_pc = 0; logic [ADDR_W-1:0] res_addr = 0; lat_t res_lat = 0;
  logic miss_en = 0; logic [ADDR_W-1:0] miss_addr = 0; time_t miss_done = 0;
  logic fill_en = 0; logic [ADDR_W-1:0] fill_addr = 0; logic evict_en = 0; logic [ADDR_W-1:0] evict_addr = 0;
  int checks = 0, failures = 0;
  prediction_engine #(.LANES(L), .MIN_PIPE(3), .WB_PORTS(2)) dut (.*);
  task automatic chk(string w, logic ok); checks++; if (!ok) begin failures++; $display("FAIL %s", w); end endtask

  function automatic instr_t alu(int seq, int s1, int s2, int d, int lat);
    instr_t i; i = '0;
    i.thr = 1; i.seq = seq_t'(seq); i.pc = 32'h100 + 32'(seq) * 4; i.lat = lat_t'(lat);
    i.src1_v = s1 >= 0; i.lsrc1 = lreg_t'(s1 < 0 ? 0 : s1); i.psrc1 = preg_t'(s1 < 0 ? 0 : s1 + 64);
    i.src2_v = s2 >= 0; i.lsrc2 = lreg_t'(s2 < 0 ? 0 : s2); i.psrc2 = preg_t'(s2 < 0 ? 0 : s2 + 64);
    i.dst_v  = d >= 0;  i.ldst  = lreg_t'(d < 0 ? 0 : d);   i.pdst  = preg_t'(d < 0 ? 0 : d + 128);
    return i;
  endfunction
  function automatic instr_t ld(int seq, int s1, int d);
    instr_t i; i = alu(seq, s1, -1, d, 0); i.is_load = 1; return i;
  endfunction
  task automatic none(); foreach (d_v[l]) d_v[l] = 0; endtask
  task automatic step(); @(posedge clk); #1; endtask

  initial begin #20000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    time_t t0;
    foreach (q_ready[q]) q_ready[q] = 1;
    foreach (stalled[t]) stalled[t] = 0;
    foreach (wb_en[w]) begin wb_en[w] = 0; wb_thr[w] = 0; wb_ldst[w] = 0; wb_seq[w] = 0; end
    foreach (d_i[l]) d_i[l] = '0;
    none();
    repeat (2) @(posedge clk); rst_n = 1; #1;
    repeat (3) step();
    // 1. independent: issue at now+3, fast queue
    d_v[0] = 1; d_i[0] = alu(0, 1, 2, 3, 1); #1;
    t0 = now;
    chk("acc 1", acc_n == 1 && o_v[0]);
    chk("issue_at", o_d[0].issue_at == t0 + 3);
    chk("fast queue", o_q[0] < 6);
    chk("no parents", !o_d[0].par1_v && !o_d[0].par2_v);
    chk("clear dst", clr_en[0] && clr_reg[0] == 3 + 128);
    step(); none();
    // 2. chain in one group: r3 (ready t0+4), lane0 r4 = r3 + 9 cycles, lane1 r5 = r4
    d_v[0] = 1; d_i[0] = alu(1, 3, -1, 4, 9);
    d_v[1] = 1; d_i[1] = alu(2, 4, -1, 5, 1); #1;
    t0 = now;
    chk("acc 2", acc_n == 2);
    chk("lane0 waits for r3", o_d[0].issue_at == t0 + 3);   // r3 ready t0-1+4 = t0+3
    chk("lane0 parent", o_d[0].par1_v && o_d[0].par1 == 0);
    chk("lane1 chained", o_d[1].issue_at == t0 + 12);
    chk("lane1 parent", o_d[1].par1_v && o_d[1].par1 == 1);
    chk("lane1 10-cycle queue", o_q[1] == 10);
    step(); none();
    // 3. through the table: r5 ready t0+13
    d_v[0] = 1; d_i[0] = alu(3, 5, -1, 6, 1); #1;
    chk("from table", o_d[0].issue_at == t0 + 13);
    chk("10-cycle queue (wait 12)", o_q[0] == 10 || o_q[0] == 11);
    step(); none();
    // 4. three loads: only two predictions per cycle
    d_v[0] = 1; d_i[0] = ld(4, -1, 7);
    d_v[1] = 1; d_i[1] = ld(5, -1, 8);
    d_v[2] = 1; d_i[2] = ld(6, -1, 9);
    d_v[3] = 1; d_i[3] = alu(7, -1, -1, 10, 1); #1;
    chk("load limit", acc_n == 2 && o_v[1] && !o_v[2] && !o_v[3]);
    chk("no tag when stall off", !tag_v);
    step(); none();
    // 5. stalled thread
    stalled[1] = 1; d_v[0] = 1; d_i[0] = alu(8, -1, -1, 11, 1); #1;
    chk("stalled", acc_n == 0 && !o_v[0] && !clr_en[0]);
    stalled[1] = 0;
    // 6. stall mode: unpredictable load is tagged and ends the group
    stall_en = 1;
    d_v[0] = 1; d_i[0] = alu(8, -1, -1, 11, 1);
    d_v[1] = 1; d_i[1] = ld(9, -1, 12);
    d_v[2] = 1; d_i[2] = alu(10, 12, -1, 13, 1); #1;
    chk("tag cut", acc_n == 2 && tag_v && tag_thr == 1 && tag_seq == 9 && o_d[1].stall_tag);
    stall_en = 0;
    // 7. no sorting queue
    foreach (q_ready[q]) q_ready[q] = 0; #1;
    chk("no queue", acc_n == 0);
    foreach (q_ready[q]) q_ready[q] = 1;
    step(); none();
    // 8. completion update of r6 (producer seq 3) moves its ready cycle
    wb_en[0] = 1; wb_thr[0] = 1; wb_ldst[0] = 6; wb_seq[0] = 3; t0 = now;
    step(); wb_en[0] = 0;
    d_v[0] = 1; d_i[0] = alu(11, 6, -1, 14, 1); #1;
    chk("updated", o_d[0].issue_at == now + 3);   // r6 now ready at t0, earlier than now+3
    wb_en[1] = 1; wb_thr[1] = 1; wb_ldst[1] = 6; wb_seq[1] = 3;
    step(); wb_en[1] = 0; none();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
