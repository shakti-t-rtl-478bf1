// Test of bnb_cache: the source's worked example (bind ptr5, bind ptr6,
// overwrite R1, free ptr6, restore ptr5 into its old row), aliasing into
// one row, eviction when all rows are taken, and the query port.
module tb_bnb_cache;
  import shakti_t_pkg::*;
  `include "tb_check.svh"
  logic clk = 0, rst_n, q_hit, w_en, inval, ev_hit, ev_alloc, ev_evict, dbg_iv;
  reg_idx_t ra [2], w_rd, dbg_reg;
  meta_t rmeta [2], q_meta, w_meta, dbg_meta;
  xlen_t q_pid, inval_pid;
  bnb_op_e w_op;
  logic [31:0] tag_clr;
  logic [3:0] dbg_idx, dbg_row;
  always #5 clk = ~clk;
  bnb_cache dut (.*);

  task automatic bind_reg(int r, xlen_t pid, xlen_t base, xlen_t bound);
    w_en = 1; w_op = BNB_BIND; w_rd = 5'(r); w_meta = '{bv: 1, pid: pid, base: base, bound: bound};
    @(negedge clk); w_en = 0;
  endtask
  task automatic unbind(int r);
    w_en = 1; w_op = BNB_UNBIND; w_rd = 5'(r); @(negedge clk); w_en = 0;
  endtask
  function automatic meta_t mk(xlen_t pid, xlen_t base, xlen_t bound);
    return '{bv: 1, pid: pid, base: base, bound: bound};
  endfunction

  initial begin
    int row5, n;
    rst_n = 0; w_en = 0; w_op = BNB_KEEP; w_rd = 0; w_meta = '0; inval = 0; inval_pid = 0;
    ra[0] = 1; ra[1] = 2; q_pid = 5; dbg_reg = 1; dbg_row = 0;
    @(negedge clk); rst_n = 1;
    check(!rmeta[0].bv && !rmeta[1].bv && !q_hit, "empty after reset");
    // ptr5 = malloc(20): R1 -> {100, 120, 5}
    w_en = 1; w_op = BNB_BIND; w_rd = 1; w_meta = mk(5, 100, 120); #1
    check(ev_alloc && !ev_hit && !ev_evict, "allocation strobe");
    @(negedge clk); w_en = 0;
    check(rmeta[0] == mk(5, 100, 120), "R1 bound to ptr5");
    check(q_hit && q_meta == mk(5, 100, 120), "query finds ptr_id 5");
    row5 = int'(dbg_idx);
    // ptr6 = malloc(40) in R2, another row
    bind_reg(2, 6, 200, 240);
    check(rmeta[1] == mk(6, 200, 240) && rmeta[0] == mk(5, 100, 120), "R1 and R2 bound");
    dbg_reg = 2; #1 check(int'(dbg_idx) != row5, "separate rows");
    // alias R31 = R1 shares R1's row
    w_en = 1; w_op = BNB_BIND; w_rd = 31; w_meta = mk(5, 100, 120); #1
    check(ev_hit && !ev_alloc, "alias hits");
    @(negedge clk); w_en = 0;
    dbg_reg = 31; #1 check(int'(dbg_idx) == row5, "alias row");
    unbind(31);
    // R1 overwritten with c = 13: R1 unbound, the row stays
    unbind(1);
    check(!rmeta[0].bv, "R1 unbound");
    dbg_row = 4'(row5); #1 check(dbg_meta == mk(5, 100, 120), "ptr5's row kept");
    // free(ptr6): row invalidated, R2 loses binding and tag
    inval = 1; inval_pid = 6; #1
    check(tag_clr == 32'h4, "tag of R2 cleared");
    @(negedge clk); inval = 0;
    check(!rmeta[1].bv, "R2 unbound by free");
    q_pid = 6; #1 check(!q_hit, "ptr6 gone");
    q_pid = 5; #1 check(q_hit && q_meta == mk(5, 100, 120), "ptr5's row survives the free");
    // return: R1 restored, same row
    bind_reg(1, 5, 100, 120);
    dbg_reg = 1; #1 check(int'(dbg_idx) == row5 && rmeta[0].bv, "restored into the same row");
    // fill all rows and evict
    n = 0;
    for (int p = 100; p < 100 + BNB_ENTRIES; p++) begin
      w_en = 1; w_op = BNB_BIND; w_rd = 5'(3 + (p % 20)); w_meta = mk(p, p * 16, p * 16 + 8); #1
      n += int'(ev_evict);
      @(negedge clk); w_en = 0;
    end
    check(n == 1, $sformatf("one eviction after filling all rows, got %0d", n));
    check(rmeta[0].bv == (row5 != 0), "R1 dropped only if its row was the victim");
    q_pid = 100 + BNB_ENTRIES - 1; #1 check(q_hit, "newest row present");
    report();
  end
  initial begin #100000; failures++; report(); end
endmodule
