// Test of fetch_stage: reset value, sequential PC, stall, redirect priority.
module tb_fetch_stage;
  import shakti_t_pkg::*;
  `include "tb_check.svh"
  logic clk = 0, rst_n, stall, redirect;
  xlen_t target, pc, model;
  always #5 clk = ~clk;
  fetch_stage #(.RESET_PC(64'h80)) dut (.*);
  initial begin
    rst_n = 0; stall = 0; redirect = 0; target = 0;
    @(negedge clk); @(negedge clk);
    check(pc == 64'h80, "reset PC");
    rst_n = 1; model = 64'h80;
    for (int i = 0; i < 300; i++) begin
      stall    = ($urandom % 3) == 0;
      redirect = ($urandom % 5) == 0;
      target   = {$urandom, $urandom} & ~64'h3;
      @(negedge clk);
      if (redirect)    model = target;
      else if (!stall) model = model + 4;
      check(pc == model, $sformatf("cycle %0d pc %h expected %h", i, pc, model));
    end
    report();
  end
  initial begin #100000; failures++; report(); end
endmodule
