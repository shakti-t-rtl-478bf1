// Test of instr_mem: program load through the write port, fetch by byte PC.
module tb_instr_mem;
  `include "tb_check.svh"
  localparam int D = 64;
  logic clk = 0, we;
  logic [63:0] pc;
  logic [31:0] instr, wdata;
  logic [5:0] waddr;
  logic [31:0] model [D];
  always #5 clk = ~clk;
  instr_mem #(.DEPTH(D)) dut (.*);
  initial begin
    we = 1;
    for (int i = 0; i < D; i++) begin
      waddr = 6'(i); wdata = $urandom; model[i] = wdata; pc = 0;
      @(negedge clk);
    end
    we = 0;
    for (int i = 0; i < 200; i++) begin
      int k = $urandom % D;
      pc = {$urandom, $urandom} & ~64'((D * 4) - 1) | 64'(k * 4) | 64'($urandom % 4);
      pc = 64'(k * 4) | 64'($urandom % 4);
      #1 check(instr == model[k], $sformatf("word %0d", k));
    end
    report();
  end
  initial begin #100000; failures++; report(); end
endmodule
