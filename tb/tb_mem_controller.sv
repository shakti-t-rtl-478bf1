// Test of mem_controller with data_mem: every memory operation, its cycle
// count (busy cycles), the PLM layout at PLBR + 16*ptr_id, and the fnld
// shortcut when the saved ptr_id is still cached.
module tb_mem_controller;
  import shakti_t_pkg::*;
  `include "tb_check.svh"
  logic clk = 0, rst_n, valid, m_rtag, m_wtag_en, m_wtag, q_hit, wb_bind_pending, busy, out_valid, ev_reuse;
  exe_mem_t r;
  xlen_t plbr, m_addr, m_rdata, m_wdata, q_pid;
  logic [7:0] m_be;
  meta_t q_meta;
  mem_wb_t out;
  logic [63:0] b_rdata;
  logic b_rtag;
  always #5 clk = ~clk;
  mem_controller dut (.*);
  data_mem #(.WORDS(512)) mem (
    .clk, .a_addr (m_addr[11:3]), .a_rdata (m_rdata), .a_rtag (m_rtag), .a_be (m_be),
    .a_wdata (m_wdata), .a_wtag_en (m_wtag_en), .a_wtag (m_wtag),
    .b_addr (9'd0), .b_rdata, .b_rtag);

  // issue r, wait for completion, return the number of cycles
  task automatic issue(output int cyc);
    valid = 1; cyc = 1;
    #1;
    while (!out_valid) begin @(negedge clk); cyc++; #1; end
    @(negedge clk);
    valid = 0;
  endtask
  function automatic xlen_t word(int a);
    return mem.mem[a / 8];
  endfunction

  initial begin
    int c;
    rst_n = 0; valid = 0; r = '0; plbr = 64'h800; q_hit = 0; q_meta = '0; wb_bind_pending = 0;
    @(negedge clk); rst_n = 1;
    // wrplm PLM[5] = {100, 120}
    r = '0; r.mem_op = MOP_WRPLM; r.meta = '{bv: 0, pid: 5, base: 100, bound: 120};
    issue(c);
    check(c == 2, $sformatf("wrplm takes 2 cycles, took %0d", c));
    check(word('h850) == 100 && word('h858) == 120, "PLM[5] at PLBR + 80");
    // store a pointer (tagged) and its ptr_id
    r = '0; r.mem_op = MOP_STORE; r.funct3 = 3; r.addr = 'h100; r.sdata = 100; r.stag = 1;
    issue(c);
    check(c == 1 && word('h100) == 100 && mem.tag['h100 / 8], "sd keeps the tag");
    r.addr = 'h108; r.sdata = 5; r.stag = 0; issue(c);
    // byte store clears the tag
    r = '0; r.mem_op = MOP_STORE; r.funct3 = 0; r.addr = 'h10b; r.sdata = 'hab; r.stag = 1;
    issue(c);
    check(word('h108) == 64'h00000000ab000005 && !mem.tag['h108 / 8], "sb merges bytes, clears tag");
    r.addr = 'h10b; r.sdata = 0; issue(c);
    // load
    r = '0; r.mem_op = MOP_LOAD; r.funct3 = 3; r.addr = 'h100; r.rd = 8; r.rd_we = 1; r.tag_we = 1;
    issue(c);
    // (out is sampled during the completing cycle; check values captured below)
    // ldptr
    r = '0; r.mem_op = MOP_LDPTR; r.addr = 'h100; r.rd = 3; r.rd_we = 1; r.tag_we = 1; r.tag = 1;
    r.bnb = BNB_BIND;
    valid = 1; c = 1; #1;
    while (!out_valid) begin @(negedge clk); c++; #1; end
    check(c == 4, $sformatf("ldptr takes 4 cycles, took %0d", c));
    check(out.result == 100 && out.tag && out.bnb == BNB_BIND &&
          out.meta == '{bv: 1, pid: 5, base: 100, bound: 120}, "ldptr result");
    @(negedge clk); valid = 0;
    // ldbnb
    r = '0; r.mem_op = MOP_LDBNB; r.rd = 1; r.tag_we = 1; r.tag = 1; r.bnb = BNB_BIND; r.meta.pid = 5;
    valid = 1; c = 1; #1;
    while (!out_valid) begin @(negedge clk); c++; #1; end
    check(c == 2 && out.meta == '{bv: 1, pid: 5, base: 100, bound: 120} && !out.rd_we, "ldbnb");
    @(negedge clk); valid = 0;
    // fnst of a bound pointer
    r = '0; r.mem_op = MOP_FNST; r.addr = 'h200; r.sdata = 104; r.stag = 1;
    r.smeta = '{bv: 1, pid: 5, base: 100, bound: 120};
    issue(c);
    check(c == 2 && word('h200) == 104 && mem.tag['h200 / 8] && word('h208) == 5 && mem.tag['h208 / 8], "fnst");
    // fnld with the row cached: 2 cycles
    r = '0; r.mem_op = MOP_FNLD; r.addr = 'h200; r.rd = 1; r.rd_we = 1; r.tag_we = 1; r.tag = 1; r.bnb = BNB_BIND;
    q_hit = 1; q_meta = '{bv: 1, pid: 5, base: 100, bound: 120};
    valid = 1; c = 1; #1;
    while (!out_valid) begin @(negedge clk); c++; #1; end
    check(c == 2 && ev_reuse && q_pid == 5 && out.result == 104 && out.meta == q_meta, "fnld reuses the row");
    @(negedge clk); valid = 0;
    // fnld with the row gone: 4 cycles through the PLM
    q_hit = 0; valid = 1; c = 1; #1;
    while (!out_valid) begin @(negedge clk); c++; #1; end
    check(c == 4 && out.meta == '{bv: 1, pid: 5, base: 100, bound: 120}, "fnld reloads from PLM");
    @(negedge clk); valid = 0;
    // fnld of a register saved without bounds
    r = '0; r.mem_op = MOP_FNST; r.addr = 'h220; r.sdata = 77; issue(c);
    r = '0; r.mem_op = MOP_FNLD; r.addr = 'h220; r.rd = 1; r.rd_we = 1; r.tag_we = 1; r.tag = 1; r.bnb = BNB_BIND;
    valid = 1; c = 1; #1;
    while (!out_valid) begin @(negedge clk); c++; #1; end
    check(c == 2 && out.result == 77 && !out.tag && out.bnb == BNB_UNBIND, "fnld of plain data");
    @(negedge clk); valid = 0;
    // idle: nothing written
    #1 check(!busy && !out_valid && m_be == 0 && !m_wtag_en, "idle");
    report();
  end
  initial begin #100000; failures++; report(); end
endmodule
