// Self-checking test of the in-flight load table (SILO).
// Allocates misses, looks them up from two ports (block-address aliasing),
// refreshes one, frees one on fill, and fills the table to check `full`.
module tb_silo;
  import zephyr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [ADDR_W-1:0] q_addr[2]; logic q_hit[2]; time_t q_done[2];
  logic a_en = 0; logic [ADDR_W-1:0] a_addr = 0; time_t a_done = 0;
  logic f_en = 0; logic [ADDR_W-1:0] f_addr = 0; logic full;
  int checks = 0, failures = 0;
  silo #(.ENTRIES(4), .PORTS(2)) dut (.*);
  task automatic chk(string w, logic ok); checks++; if (!ok) begin failures++; $display("FAIL %s", w); end endtask
  task automatic alloc(logic [ADDR_W-1:0] a, time_t d);
    @(negedge clk); a_en = 1; a_addr = a; a_done = d; @(posedge clk); #1 a_en = 0;
  endtask
  task automatic fill(logic [ADDR_W-1:0] a);
    @(negedge clk); f_en = 1; f_addr = a; @(posedge clk); #1 f_en = 0;
  endtask
  initial begin #20000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    q_addr[0] = 32'h1000; q_addr[1] = 32'h2004;
    repeat (2) @(posedge clk); rst_n = 1; #1;
    chk("empty", !q_hit[0] && !q_hit[1] && !full);
    alloc(32'h1000, 500);
    alloc(32'h2000, 600);
    #1 chk("hit 0", q_hit[0] && q_done[0] == 500);
    chk("hit 1 same block", q_hit[1] && q_done[1] == 600);
    q_addr[1] = 32'h2020; #1 chk("next block misses", !q_hit[1]);
    alloc(32'h101f, 700);
    #1 chk("refresh", q_hit[0] && q_done[0] == 700);
    fill(32'h1000);
    #1 chk("freed", !q_hit[0]);
    alloc(32'h3000, 1); alloc(32'h4000, 2); alloc(32'h5000, 3);
    #1 chk("full", full);
    alloc(32'h6000, 4);
    q_addr[0] = 32'h6000; #1 chk("dropped when full", !q_hit[0]);
    q_addr[0] = 32'h5000; #1 chk("others kept", q_hit[0] && q_done[0] == 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
