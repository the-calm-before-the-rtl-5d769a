// Self-checking test of the physical register ready bits.
// Random clears and sets against a reference bit vector, including a set and
// a clear of the same register in one cycle (set wins).
module tb_preg_ready_table;
  import zephyr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  preg_t rd_reg[2]; logic rd_rdy[2];
  logic clr_en[2]; preg_t clr_reg[2]; logic set_en[2]; preg_t set_reg[2];
  logic [NUM_PREGS-1:0] refv;
  int checks = 0, failures = 0;
  preg_ready_table #(.RD_PORTS(2), .CLR_PORTS(2), .SET_PORTS(2)) dut (.*);
  task automatic chk(string w, logic ok); checks++; if (!ok) begin failures++; $display("FAIL %s", w); end endtask
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    foreach (clr_en[i]) begin clr_en[i] = 0; set_en[i] = 0; clr_reg[i] = 0; set_reg[i] = 0; rd_reg[i] = 0; end
    repeat (2) @(posedge clk); rst_n = 1; refv = '1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      foreach (clr_en[i]) begin
        clr_en[i] = $urandom_range(0, 1); clr_reg[i] = preg_t'($urandom_range(0, 15));
        set_en[i] = $urandom_range(0, 2) == 0; set_reg[i] = preg_t'($urandom_range(0, 15));
      end
      foreach (clr_en[i]) if (clr_en[i]) refv[clr_reg[i]] = 0;
      foreach (set_en[i]) if (set_en[i]) refv[set_reg[i]] = 1;
      @(posedge clk); #1;
      foreach (rd_reg[i]) begin
        rd_reg[i] = preg_t'($urandom_range(0, 15)); #1;
        chk($sformatf("reg %0d", rd_reg[i]), rd_rdy[i] == refv[rd_reg[i]]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
