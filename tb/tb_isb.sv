// Test of isb: load, hold on stall, flush priority, reset.
module tb_isb;
  `include "tb_check.svh"
  logic clk = 0, rst_n, en, flush, valid_d, valid_q;
  logic [31:0] d, q, mq;
  logic mv;
  always #5 clk = ~clk;
  isb dut (.*);
  initial begin
    rst_n = 0; en = 1; flush = 0; valid_d = 1; d = 32'hdead;
    @(negedge clk);
    check(!valid_q && q == 0, "reset empties");
    rst_n = 1; mv = 0; mq = 0;
    for (int i = 0; i < 400; i++) begin
      en = $urandom % 2; flush = ($urandom % 6) == 0; valid_d = $urandom % 2; d = $urandom;
      @(negedge clk);
      if (flush)   begin mv = 0; mq = 0; end
      else if (en) begin mv = valid_d; mq = d; end
      check(valid_q == mv && q == mq, $sformatf("cycle %0d", i));
    end
    report();
  end
  initial begin #100000; failures++; report(); end
endmodule
