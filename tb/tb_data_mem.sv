// Test of data_mem: byte-enabled writes, tag writes, both read ports.
module tb_data_mem;
  `include "tb_check.svh"
  localparam int W = 32;
  logic clk = 0;
  logic [4:0] a_addr, b_addr;
  logic [63:0] a_rdata, a_wdata, b_rdata;
  logic a_rtag, a_wtag_en, a_wtag, b_rtag;
  logic [7:0] a_be;
  logic [63:0] m [W];
  logic mt [W];
  always #5 clk = ~clk;
  data_mem #(.WORDS(W)) dut (.*);
  initial begin
    a_be = 8'hff; a_wtag_en = 1; a_wtag = 0; b_addr = 0;
    for (int i = 0; i < W; i++) begin
      a_addr = 5'(i); a_wdata = 0; m[i] = 0; mt[i] = 0; @(negedge clk);
    end
    for (int i = 0; i < 500; i++) begin
      a_addr = 5'($urandom); a_be = 8'($urandom); a_wdata = {$urandom, $urandom};
      a_wtag_en = $urandom % 2; a_wtag = $urandom % 2; b_addr = 5'($urandom);
      #1 check(a_rdata == m[a_addr] && a_rtag == mt[a_addr], "port A read");
      check(b_rdata == m[b_addr] && b_rtag == mt[b_addr], "port B read");
      @(negedge clk);
      for (int b = 0; b < 8; b++) if (a_be[b]) m[a_addr][8*b +: 8] = a_wdata[8*b +: 8];
      if (a_wtag_en) mt[a_addr] = a_wtag;
    end
    report();
  end
  initial begin #100000; failures++; report(); end
endmodule
