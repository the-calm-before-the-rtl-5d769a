// Self-checking test of the stride address predictor.
// Feeds a load with a constant stride and checks the prediction and the
// confidence rule; then breaks the stride and checks confidence drops.
module tb_addr_predictor;
  import zephyr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [PC_W-1:0] q_pc[2]; logic q_conf[2]; logic [ADDR_W-1:0] q_addr[2];
  logic u_en = 0; logic [PC_W-1:0] u_pc = 0; logic [ADDR_W-1:0] u_addr = 0;
  int checks = 0, failures = 0;
  addr_predictor #(.ENTRIES(1024), .PORTS(2)) dut (.*);
  task automatic chk(string w, logic ok); checks++; if (!ok) begin failures++; $display("FAIL %s", w); end endtask
  task automatic train(logic [PC_W-1:0] pc, logic [ADDR_W-1:0] a);
    @(negedge clk); u_en = 1; u_pc = pc; u_addr = a; @(posedge clk); #1 u_en = 0;
  endtask
  initial begin #20000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    q_pc[0] = 32'h400; q_pc[1] = 32'h800;
    repeat (2) @(posedge clk); rst_n = 1; #1;
    chk("untrained", !q_conf[0]);
    for (int i = 0; i < 6; i++) begin
      train(32'h400, 32'h10000 + 32'(i) * 64);
      #1;
      // counts: i=0 new, i=1 stride set (cnt 0), i=2 cnt1, i=3 cnt2
      chk($sformatf("conf step %0d", i), q_conf[0] == (i >= 3));
      if (i >= 1) chk($sformatf("addr step %0d", i), q_addr[0] == 32'h10000 + 32'(i + 1) * 64);
    end
    chk("other pc untouched", !q_conf[1]);
    train(32'h400, 32'h90000);
    #1 chk("broken stride", !q_conf[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
