// Test of gpr_file: writes, R0, separate tag writes and tag clearing.
module tb_gpr_file;
  import shakti_t_pkg::*;
  `include "tb_check.svh"
  logic clk = 0, rst_n, we, tag_we, wtag;
  reg_idx_t ra [4], wa;
  xlen_t rdata [4], wdata, m [32];
  logic rtag [4], mt [32];
  logic [31:0] tag_clr;
  always #5 clk = ~clk;
  gpr_file dut (.*);
  initial begin
    rst_n = 0; we = 0; tag_we = 0; wtag = 0; wa = 0; wdata = 0; tag_clr = 0;
    for (int p = 0; p < 4; p++) ra[p] = 0;
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 32; i++) begin m[i] = 0; mt[i] = 0; end
    for (int i = 0; i < 600; i++) begin
      we = $urandom % 2; tag_we = $urandom % 2; wa = 5'($urandom); wdata = {$urandom, $urandom};
      wtag = $urandom % 2; tag_clr = ($urandom % 4 == 0) ? $urandom : 0;
      for (int p = 0; p < 4; p++) ra[p] = 5'($urandom);
      #1 for (int p = 0; p < 4; p++)
        check(rdata[p] == m[ra[p]] && rtag[p] == mt[ra[p]], $sformatf("read x%0d", ra[p]));
      @(negedge clk);
      if (we && wa != 0) m[wa] = wdata;
      for (int r = 1; r < 32; r++)
        if (tag_we && wa == r) mt[r] = wtag;
        else if (tag_clr[r]) mt[r] = 0;
    end
    report();
  end
  initial begin #100000; failures++; report(); end
endmodule
