// Self-checking test of the miss detection engine.
// Fills and evicts blocks and checks "definite miss" against a reference
// count of resident blocks per counter index.
module tb_miss_detector;
  import zephyr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [ADDR_W-1:0] q_addr[2]; logic q_miss[2];
  logic fill_en = 0, evict_en = 0; logic [ADDR_W-1:0] fill_addr = 0, evict_addr = 0;
  int checks = 0, failures = 0;
  int refc [512];
  miss_detector #(.ENTRIES(512), .PORTS(2)) dut (.*);
  task automatic chk(string w, logic ok); checks++; if (!ok) begin failures++; $display("FAIL %s", w); end endtask
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    q_addr[0] = 0; q_addr[1] = 0;
    foreach (refc[i]) refc[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1; #1;
    chk("cold miss", q_miss[0]);
    for (int n = 0; n < 300; n++) begin
      int fi, ei;
      @(negedge clk);
      fill_en = $urandom_range(0, 1); evict_en = $urandom_range(0, 1);
      fi = $urandom_range(0, 15); ei = $urandom_range(0, 15);
      fill_addr  = {$urandom_range(0, 255), 9'(fi), 5'($urandom)};
      evict_addr = {$urandom_range(0, 255), 9'(ei), 5'($urandom)};
      if (refc[fi] >= 4) fill_en = 0;
      if (refc[ei] == 0) evict_en = 0;
      if (fill_en && evict_en && fi == ei) begin end
      else begin
        if (fill_en) refc[fi]++;
        if (evict_en) refc[ei]--;
      end
      @(posedge clk); #1 fill_en = 0; evict_en = 0;
      for (int k = 0; k < 2; k++) begin
        int qi; qi = $urandom_range(0, 15);
        q_addr[k] = {$urandom_range(0, 255), 9'(qi), 5'($urandom)}; #1;
        chk($sformatf("idx %0d", qi), q_miss[k] == (refc[qi] == 0));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
