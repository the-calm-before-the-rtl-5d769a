// Self-checking test of thread stall control.
// With stalling on, a tagged load stalls its thread until an issued
// instruction carries the same tag and sequence number; untagged issue and
// other threads do not release it. With stalling off nothing stalls.
module tb_stall_ctrl;
  import zephyr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic stall_en = 1, set_v = 0; thr_t set_thr = 0; seq_t set_seq = 0;
  logic iss_v[2]; sinstr_t iss_d[2]; logic stalled[NUM_THREADS];
  int checks = 0, failures = 0;
  stall_ctrl #(.ISS(2)) dut (.*);
  task automatic chk(string w, logic ok); checks++; if (!ok) begin failures++; $display("FAIL %s", w); end endtask
  task automatic issue(thr_t t, seq_t s, logic tg);
    @(negedge clk); iss_v[1] = 1; iss_d[1] = '0; iss_d[1].thr = t; iss_d[1].seq = s; iss_d[1].stall_tag = tg;
    @(posedge clk); #1 iss_v[1] = 0;
  endtask
  initial begin #20000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    iss_v[0] = 0; iss_v[1] = 0; iss_d[0] = '0; iss_d[1] = '0;
    repeat (2) @(posedge clk); rst_n = 1; #1;
    chk("idle", !stalled[0] && !stalled[2]);
    @(negedge clk); set_v = 1; set_thr = 2; set_seq = 17; @(posedge clk); #1 set_v = 0;
    chk("stalled", stalled[2] && !stalled[0]);
    issue(2, 17, 0); chk("untagged keeps", stalled[2]);
    issue(1, 17, 1); chk("other thread keeps", stalled[2]);
    issue(2, 16, 1); chk("other seq keeps", stalled[2]);
    issue(2, 17, 1); chk("released", !stalled[2]);
    stall_en = 0;
    @(negedge clk); set_v = 1; set_thr = 3; set_seq = 1; @(posedge clk); #1 set_v = 0;
    chk("disabled", !stalled[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
