// Test of operand_fwd: priority of memory stage over write-back over the
// register file, separate value / tag / bounds forwarding, the load-use
// stall, and dropping bounds of a ptr_id rewritten by wrplm.
module tb_operand_fwd;
  import shakti_t_pkg::*;
  `include "tb_check.svh"
  reg_idx_t rs, w_rd;
  logic use_rs, rf_tag, m_valid, w_we, w_tag_we, w_tag, w_inval, tag, stall, fwd_mem, fwd_wb;
  xlen_t rf_val, w_val, w_inval_pid, val;
  meta_t rf_meta, w_meta, meta;
  exe_mem_t m;
  bnb_op_e w_bnb;
  operand_fwd dut (.*);
  initial begin
    rs = 7; use_rs = 1;
    rf_val = 11; rf_tag = 0; rf_meta = '{bv: 1, pid: 5, base: 100, bound: 120};
    m = '0; m_valid = 0;
    w_we = 0; w_tag_we = 0; w_bnb = BNB_KEEP; w_rd = 0; w_val = 0; w_tag = 0; w_meta = '0;
    w_inval = 0; w_inval_pid = 0;
    #1 check(val == 11 && !tag && meta == rf_meta && !stall && !fwd_mem && !fwd_wb, "register file");
    w_rd = 7; w_we = 1; w_val = 22; #1 check(val == 22 && fwd_wb && meta == rf_meta, "value from WB");
    w_tag_we = 1; w_tag = 1; #1 check(tag, "tag from WB");
    w_bnb = BNB_BIND; w_meta = '{bv: 0, pid: 6, base: 200, bound: 240}; #1
    check(meta.bv && meta.pid == 6, "bounds from WB");
    m_valid = 1; m.rd = 7; m.rd_we = 1; m.result = 33; #1
    check(val == 33 && fwd_mem && tag && meta.pid == 6, "value from MEM, rest from WB");
    m.tag_we = 1; m.tag = 0; m.bnb = BNB_UNBIND; #1 check(!tag && !meta.bv, "tag/unbind from MEM");
    m.bnb = BNB_KEEP; m.tag_we = 1; m.tag = 1; #1 check(tag && meta.pid == 6 && meta.bv, "wrtag keeps older bounds");
    m.mem_op = MOP_LOAD; #1 check(stall, "load-use stall");
    use_rs = 0; #1 check(!stall && !fwd_mem, "no stall if not used");
    use_rs = 1; m.mem_op = MOP_STORE; #1 check(!stall, "store does not stall");
    m.rd = 8; #1 check(val == 22 && !fwd_mem, "other register in MEM ignored");
    rs = 0; #1 check(val == 0 && !tag && !meta.bv && !stall, "x0");
    rs = 7; w_bnb = BNB_KEEP; w_we = 0; w_tag_we = 0; #1 check(meta == rf_meta, "back to register file");
    w_inval = 1; w_inval_pid = 5; #1 check(!meta.bv && !tag, "freed in WB");
    w_inval = 0; m.mem_op = MOP_WRPLM; m.rd_we = 0; m.tag_we = 0; m.meta.pid = 5; #1
    check(!meta.bv, "freed in MEM");
    m.meta.pid = 9; #1 check(meta.bv, "other ptr_id freed");
    report();
  end
endmodule
