// Self-checking test of ICOUNT selection: random counts and empty PIBs
// against a reference minimum search (lowest thread on ties).
module tb_icount_select;
  import zephyr_pkg::*;
  logic pib_nonempty[NUM_THREADS]; logic [11:0] icount[NUM_THREADS];
  logic sel_v; thr_t sel_thr;
  int checks = 0, failures = 0;
  icount_select dut (.*);
  task automatic chk(string w, logic ok); checks++; if (!ok) begin failures++; $display("FAIL %s", w); end endtask
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int n = 0; n < 500; n++) begin
      int best, bt;
      best = 1 << 30; bt = -1;
      for (int t = 0; t < NUM_THREADS; t++) begin
        pib_nonempty[t] = $urandom_range(0, 3) != 0;
        icount[t] = 12'($urandom_range(0, 6));
        if (pib_nonempty[t] && int'(icount[t]) < best) begin best = icount[t]; bt = t; end
      end
      #1;
      chk("valid", sel_v == (bt >= 0));
      if (bt >= 0) chk($sformatf("thread exp %0d got %0d", bt, sel_thr), int'(sel_thr) == bt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
