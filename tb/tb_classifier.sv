// Self-checking test of classification and enqueueing.
// Checks rounding down at every class boundary, one lane per queue, the
// fall-back to a lower class when a class is busy, and failure when no queue
// at or below the class is free. The expected queue numbers follow the
// fixed line-up: 0-5 fast, 6-9 5-cycle, 10-11 10-cycle, 12-13 20-cycle,
// 14-15 150-cycle.
module tb_classifier;
  import zephyr_pkg::*;
  localparam int L = 8;
  logic lane_v[L]; logic signed [31:0] lane_wait[L]; logic q_ready[16];
  logic lane_ok[L]; logic [3:0] lane_q[L]; qclass_e lane_cls[L];
  int checks = 0, failures = 0;
  classifier #(.LANES(L), .NUM_Q(16)) dut (.*);
  task automatic chk(string w, logic ok); checks++; if (!ok) begin failures++; $display("FAIL %s", w); end endtask
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int waits[10] = '{0, 4, 5, 9, 10, 19, 20, 149, 150, 400};
    int expq [10] = '{0, 0, 6, 6, 10, 10, 12, 12, 14, 14};
    foreach (q_ready[q]) q_ready[q] = 1;
    foreach (lane_v[i]) begin lane_v[i] = 0; lane_wait[i] = 0; end
    foreach (waits[k]) begin
      lane_v[0] = 1; lane_wait[0] = waits[k]; #1;
      chk($sformatf("wait %0d", waits[k]), lane_ok[0] && lane_q[0] == 4'(expq[k]));
    end
    // eight lanes of wait 7: four 5-cycle queues, then four fast queues
    foreach (lane_v[i]) begin lane_v[i] = 1; lane_wait[i] = 7; end
    #1;
    for (int i = 0; i < 4; i++) chk($sformatf("lane %0d 5q", i), lane_ok[i] && lane_q[i] == 4'(6 + i) && lane_cls[i] == QC_5);
    for (int i = 4; i < 8; i++) chk($sformatf("lane %0d fallback", i), lane_ok[i] && lane_q[i] == 4'(i - 4) && lane_cls[i] == QC_0);
    // only fast queues 4,5 free and all 5-queues busy: lanes 2.. fail
    for (int q = 0; q < 16; q++) q_ready[q] = (q == 4 || q == 5);
    #1;
    chk("l0", lane_ok[0] && lane_q[0] == 4);
    chk("l1", lane_ok[1] && lane_q[1] == 5);
    chk("l2 none", !lane_ok[2]);
    // a long wait never goes up a class
    for (int q = 0; q < 16; q++) q_ready[q] = (q >= 14);
    foreach (lane_wait[i]) lane_wait[i] = 3;
    #1 chk("no round up", !lane_ok[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
