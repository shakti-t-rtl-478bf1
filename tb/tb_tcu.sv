// Test of tcu: tag and binding of results for each tag class.
module tb_tcu;
  import shakti_t_pkg::*;
  `include "tb_check.svh"
  tag_cls_e cls;
  logic rs2_is_reg, t1, t2, imm0, tag_we, tag, prop;
  meta_t m1, m2, meta;
  bnb_op_e bnb;
  tcu dut (.*);
  initial begin
    m1 = '{bv: 1, pid: 5, base: 100, bound: 120};
    m2 = '{bv: 1, pid: 6, base: 200, bound: 240};
    imm0 = 0;
    cls = TC_ADD; rs2_is_reg = 0; t1 = 1; t2 = 0; #1
    check(tag_we && tag && bnb == BNB_BIND && meta == m1 && prop, "ptr + imm");
    rs2_is_reg = 1; t1 = 0; t2 = 1; #1 check(tag && meta == m2, "int + ptr");
    t1 = 1; t2 = 1; #1 check(!tag && bnb == BNB_UNBIND, "ptr + ptr is data");
    rs2_is_reg = 0; t1 = 0; t2 = 1; #1 check(!tag && bnb == BNB_UNBIND && !prop, "imm form ignores rs2");
    cls = TC_SUB; rs2_is_reg = 1; t1 = 1; t2 = 0; #1 check(tag && meta == m1, "ptr - int");
    t2 = 1; #1 check(!tag && bnb == BNB_UNBIND, "ptr - ptr");
    t1 = 0; t2 = 1; #1 check(!tag, "int - ptr");
    cls = TC_LOGIC; t1 = 1; t2 = 0; #1 check(tag && meta == m1, "ptr & mask");
    cls = TC_ADD; t1 = 1; t2 = 0; m1.bv = 0; #1 check(tag && bnb == BNB_UNBIND, "unbound pointer stays unbound");
    m1.bv = 1;
    cls = TC_CLEAR; t1 = 1; #1 check(tag_we && !tag && bnb == BNB_UNBIND, "clear");
    cls = TC_LOAD; #1 check(tag_we && bnb == BNB_UNBIND, "load");
    cls = TC_PTR; #1 check(tag_we && tag && bnb == BNB_BIND, "ldptr");
    cls = TC_WRTAG; imm0 = 1; #1 check(tag_we && tag && bnb == BNB_KEEP, "wrtag 1");
    imm0 = 0; #1 check(tag_we && !tag && bnb == BNB_UNBIND, "wrtag 0");
    cls = TC_NONE; #1 check(!tag_we && bnb == BNB_KEEP, "none");
    report();
  end
endmodule
