// Self-checking test of the timing table.
// Writes ready cycles for several thread/register pairs, reads them back,
// checks that a later write port wins, that a completion update only lands
// while the updater is still the latest producer, and the reset state.
// Expected values are kept in a reference array in the testbench.
module tb_timing_table;
  import zephyr_pkg::*;
  localparam int RP = 2, WP = 2, UP = 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  thr_t rd_thr[RP]; lreg_t rd_reg[RP]; time_t rd_time[RP]; seq_t rd_seq[RP]; logic rd_pv[RP];
  logic wr_en[WP]; thr_t wr_thr[WP]; lreg_t wr_reg[WP]; time_t wr_time[WP]; seq_t wr_seq[WP];
  logic upd_en[UP]; thr_t upd_thr[UP]; lreg_t upd_reg[UP]; seq_t upd_seq[UP]; time_t upd_time[UP];
  int checks = 0, failures = 0;
  time_t ref_t [NUM_THREADS][NUM_LREGS];
  seq_t  ref_s [NUM_THREADS][NUM_LREGS];

  timing_table #(.RD_PORTS(RP), .WR_PORTS(WP), .UPD_PORTS(UP)) dut (.*);

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic idle();
    foreach (wr_en[i]) wr_en[i] = 0;
    upd_en[0] = 0;
  endtask

  task automatic read_check(int t, int r);
    rd_thr[0] = thr_t'(t); rd_reg[0] = lreg_t'(r); #1;
    chk($sformatf("read t%0d r%0d time", t, r), rd_time[0] == ref_t[t][r]);
    chk($sformatf("read t%0d r%0d seq", t, r), rd_seq[0] == ref_s[t][r]);
  endtask

  initial begin
    #20000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    idle(); rd_thr[1] = 0; rd_reg[1] = 0; rd_thr[0] = 0; rd_reg[0] = 0;
    for (int i = 0; i < 1; i++) begin upd_thr[i] = 0; upd_reg[i] = 0; upd_seq[i] = 0; upd_time[i] = 0; end
    foreach (wr_thr[i]) begin wr_thr[i] = 0; wr_reg[i] = 0; wr_time[i] = 0; wr_seq[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 chk("reset ready 0", rd_time[0] == 0 && !rd_pv[0]);
    // random writes
    for (int t = 0; t < NUM_THREADS; t++) for (int r = 0; r < NUM_LREGS; r++) begin ref_t[t][r] = 0; ref_s[t][r] = 0; end
    for (int n = 0; n < 40; n++) begin
      @(negedge clk);
      wr_en[0] = 1; wr_thr[0] = thr_t'($urandom); wr_reg[0] = lreg_t'($urandom);
      wr_time[0] = $urandom; wr_seq[0] = seq_t'($urandom);
      ref_t[wr_thr[0]][wr_reg[0]] = wr_time[0]; ref_s[wr_thr[0]][wr_reg[0]] = wr_seq[0];
      @(posedge clk); #1 idle();
    end
    for (int t = 0; t < NUM_THREADS; t++) for (int r = 0; r < 4; r++) read_check(t, r);
    // port 1 wins over port 0 on the same register
    @(negedge clk);
    wr_en[0] = 1; wr_thr[0] = 1; wr_reg[0] = 7; wr_time[0] = 100; wr_seq[0] = 3;
    wr_en[1] = 1; wr_thr[1] = 1; wr_reg[1] = 7; wr_time[1] = 200; wr_seq[1] = 4;
    @(posedge clk); #1 idle();
    ref_t[1][7] = 200; ref_s[1][7] = 4;
    read_check(1, 7);
    // update by the latest producer lands
    @(negedge clk);
    upd_en[0] = 1; upd_thr[0] = 1; upd_reg[0] = 7; upd_seq[0] = 4; upd_time[0] = 150;
    @(posedge clk); #1 idle();
    ref_t[1][7] = 150; read_check(1, 7);
    // update by a stale producer is ignored
    @(negedge clk);
    upd_en[0] = 1; upd_thr[0] = 1; upd_reg[0] = 7; upd_seq[0] = 3; upd_time[0] = 999;
    @(posedge clk); #1 idle();
    read_check(1, 7);
    chk("pv set", rd_pv[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
