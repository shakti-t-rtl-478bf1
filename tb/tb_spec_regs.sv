// Test of spec_regs: PLBR and BnB_SP written and read independently.
module tb_spec_regs;
  import shakti_t_pkg::*;
  `include "tb_check.svh"
  logic clk = 0, rst_n, we;
  spr_e wsel, rsel;
  xlen_t wdata, rdata, plbr, bnb_sp, m[2];
  always #5 clk = ~clk;
  spec_regs dut (.*);
  initial begin
    rst_n = 0; we = 0; wsel = SPR_PLBR; rsel = SPR_PLBR; wdata = 0;
    @(negedge clk);
    check(plbr == 0 && bnb_sp == 0, "reset");
    rst_n = 1; m[0] = 0; m[1] = 0;
    for (int i = 0; i < 200; i++) begin
      we = $urandom % 2; wsel = spr_e'($urandom % 2); wdata = {$urandom, $urandom};
      rsel = spr_e'($urandom % 2);
      @(negedge clk);
      if (we) m[wsel] = wdata;
      check(plbr == m[0] && bnb_sp == m[1], "registers");
      check(rdata == m[rsel], "read port");
    end
    report();
  end
  initial begin #100000; failures++; report(); end
endmodule
