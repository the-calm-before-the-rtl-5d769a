// Self-checking test of the hybrid load latency predictor.
// Walks one load PC through each selection case: unpredictable (hit latency,
// flag set), stride-predictable with a definite miss (L1+L2), maybe hit
// (L1), an aliasing in-flight miss (remaining cycles from the SILO), and a
// confident LHT entry, which overrides everything else.
module tb_latency_predictor;
  import zephyr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  time_t now = 0;
  always @(posedge clk) now <= now + 1;
  logic [PC_W-1:0] q_pc[2]; lat_t q_lat[2]; logic q_unpred[2];
  logic res_en = 0; logic [PC_W-1:0] res_pc = 0; logic [ADDR_W-1:0] res_addr = 0; lat_t res_lat = 0;
  logic miss_en = 0; logic [ADDR_W-1:0] miss_addr = 0; time_t miss_done = 0;
  logic fill_en = 0; logic [ADDR_W-1:0] fill_addr = 0;
  logic evict_en = 0; logic [ADDR_W-1:0] evict_addr = 0;
  int checks = 0, failures = 0;
  latency_predictor #(.PORTS(2)) dut (.*);
  task automatic chk(string w, logic ok); checks++; if (!ok) begin failures++; $display("FAIL %s", w); end endtask
  task automatic resolve(logic [PC_W-1:0] pc, logic [ADDR_W-1:0] a, lat_t l);
    @(negedge clk); res_en = 1; res_pc = pc; res_addr = a; res_lat = l; @(posedge clk); #1 res_en = 0;
  endtask
  initial begin #20000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    q_pc[0] = 32'h500; q_pc[1] = 32'h900;
    repeat (2) @(posedge clk); rst_n = 1; #1;
    chk("unpredictable", q_unpred[0] && q_lat[0] == L1_LAT);
    // stride 32, alternating latency so that the LHT never becomes confident
    for (int i = 0; i < 5; i++) resolve(32'h500, 32'h8000 + 32'(i) * 32, lat_t'(i % 2 ? 2 : 14));
    // next predicted address 0x80a0, block never filled -> definite miss
    #1 chk("definite miss", !q_unpred[0] && q_lat[0] == L1_LAT + L2_LAT);
    @(negedge clk); fill_en = 1; fill_addr = 32'h80a0; @(posedge clk); #1 fill_en = 0;
    #1 chk("maybe hit", !q_unpred[0] && q_lat[0] == L1_LAT);
    @(negedge clk); miss_en = 1; miss_addr = 32'h80a4; miss_done = now + 40; @(posedge clk); #1 miss_en = 0;
    #1 chk($sformatf("silo remaining %0d", q_lat[0]), q_lat[0] == lat_t'(39) && !q_unpred[0]);
    @(posedge clk); #1 chk("silo counts down", q_lat[0] == lat_t'(38));
    // LHT confident overrides
    for (int i = 0; i < 4; i++) resolve(32'h900, 32'h100, 60);
    #1 chk("lht", q_lat[1] == 60 && !q_unpred[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
