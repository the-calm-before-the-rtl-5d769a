// Self-checking test of one sorting FIFO (5-slot and fast 0-slot queues).
// Pushes instructions, pops every ripe head, and checks the residency of
// each (exactly SLOTS cycles when popped as soon as ripe), FIFO order, the
// capacity, and one-per-cycle throughput with push during pop.
module tb_sort_fifo;
  import zephyr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  time_t now = 0;
  always @(posedge clk) now <= now + 1;
  int checks = 0, failures = 0;
  task automatic chk(string w, logic ok); checks++; if (!ok) begin failures++; $display("FAIL %s", w); end endtask

  logic push5 = 0, pop5; sinstr_t pd5; logic can5, hv5, ripe5; sinstr_t h5;
  logic push0 = 0, pop0; sinstr_t pd0; logic can0, hv0, ripe0; sinstr_t h0;
  sort_fifo #(.SLOTS(5)) d5 (.clk, .rst_n, .now, .push(push5), .push_data(pd5), .pop(pop5),
    .can_push(can5), .head_v(hv5), .head_ripe(ripe5), .head(h5));
  sort_fifo #(.SLOTS(0)) d0 (.clk, .rst_n, .now, .push(push0), .push_data(pd0), .pop(pop0),
    .can_push(can0), .head_v(hv0), .head_ripe(ripe0), .head(h0));
  assign pop5 = ripe5;
  assign pop0 = ripe0;

  time_t t_in5 [$]; seq_t s5 [$]; int out5 = 0;
  time_t t_in0 [$]; int out0 = 0;
  always @(posedge clk) if (rst_n) begin
    if (pop5) begin
      chk("fifo order", h5.seq == s5[0]);
      chk($sformatf("residency5 %0d", now - t_in5[0]), now - t_in5[0] == 5);
      void'(s5.pop_front()); void'(t_in5.pop_front()); out5++;
    end
    if (push5 && can5) begin t_in5.push_back(now); s5.push_back(pd5.seq); end
    if (pop0) begin chk("residency0", now - t_in0[0] == 1); void'(t_in0.pop_front()); out0++; end
    if (push0 && can0) t_in0.push_back(now);
  end

  initial begin #20000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    pd5 = '0; pd0 = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    // 20 back-to-back pushes into both queues
    for (int i = 0; i < 20; i++) begin
      @(negedge clk); push5 = 1; pd5.seq = seq_t'(i); push0 = 1;
      chk("can push 5", can5); chk("can push 0", can0);
    end
    @(negedge clk); push5 = 0; push0 = 0;
    repeat (10) @(posedge clk);
    chk("all out 5", out5 == 20); chk("all out 0", out0 == 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
