// Self-checking test of the pre-issue buffer.
// Random multi-port writes and multi-entry pops against a reference queue;
// checks the read window, count, space and order.
module tb_pib;
  import zephyr_pkg::*;
  localparam int D = 16, W = 4, R = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_v[W]; sinstr_t wr_d[W]; logic [4:0] space, count;
  logic rd_v[R]; sinstr_t rd_d[R]; logic [3:0] pop_n;
  int checks = 0, failures = 0;
  seq_t refq [$];
  int nxt = 0;
  pib #(.DEPTH(D), .WR(W), .RD(R)) dut (.*);
  task automatic chk(string w, logic ok); checks++; if (!ok) begin failures++; $display("FAIL %s", w); end endtask
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    foreach (wr_v[k]) begin wr_v[k] = 0; wr_d[k] = '0; end
    pop_n = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      int room, np;
      @(negedge clk);
      chk("count", int'(count) == refq.size());
      chk("space", int'(space) == D - refq.size());
      for (int r = 0; r < R; r++) begin
        chk("rd_v", rd_v[r] == (r < refq.size()));
        if (r < refq.size()) chk("rd_d", rd_d[r].seq == refq[r]);
      end
      np = $urandom_range(0, refq.size() < R ? refq.size() : R);
      pop_n = 4'(np);
      for (int k = 0; k < np; k++) void'(refq.pop_front());
      room = D - (refq.size() + np);
      foreach (wr_v[k]) begin
        wr_v[k] = $urandom_range(0, 1) && room > 0;
        wr_d[k] = '0;
        if (wr_v[k]) begin wr_d[k].seq = seq_t'(nxt); refq.push_back(seq_t'(nxt)); nxt++; room--; end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
