// Self-checking test of the latency history table.
// Trains a PC with a repeating latency and checks that confidence appears
// only after three repeats, that a different latency clears it, and that an
// untrained PC or an aliasing PC with another tag is not confident.
module tb_lht;
  import zephyr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [PC_W-1:0] q_pc[2]; logic q_conf[2]; lat_t q_lat[2];
  logic u_en = 0; logic [PC_W-1:0] u_pc = 0; lat_t u_lat = 0;
  int checks = 0, failures = 0;
  lht #(.ENTRIES(1024), .PORTS(2)) dut (.*);
  task automatic chk(string w, logic ok); checks++; if (!ok) begin failures++; $display("FAIL %s", w); end endtask
  task automatic train(logic [PC_W-1:0] pc, lat_t l);
    @(negedge clk); u_en = 1; u_pc = pc; u_lat = l; @(posedge clk); #1 u_en = 0;
  endtask
  initial begin #20000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    q_pc[0] = 32'h1000; q_pc[1] = 32'h2000;
    repeat (2) @(posedge clk); rst_n = 1; #1;
    chk("untrained", !q_conf[0] && !q_conf[1]);
    train(32'h1000, 14);
    #1 chk("1 sample not confident", !q_conf[0] && q_lat[0] == 14);
    train(32'h1000, 14); train(32'h1000, 14);
    #1 chk("3 samples not confident", !q_conf[0]);
    train(32'h1000, 14);
    #1 chk("4 samples confident", q_conf[0] && q_lat[0] == 14);
    chk("other pc", !q_conf[1]);
    q_pc[1] = 32'h1000 + (32'd1 << 12); #1;  // same index, other tag
    chk("alias tag", !q_conf[1]);
    train(32'h1000, 2);
    #1 chk("change clears", !q_conf[0] && q_lat[0] == 2);
    for (int i = 0; i < 3; i++) train(32'h1000, 2);
    #1 chk("relearn", q_conf[0] && q_lat[0] == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
