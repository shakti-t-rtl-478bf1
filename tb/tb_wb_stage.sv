// Test of wb_stage: load byte selection and extension, write enables.
module tb_wb_stage;
  import shakti_t_pkg::*;
  `include "tb_check.svh"
  logic valid, gpr_we, tag_we, wtag, bnb_en, inval;
  mem_wb_t r;
  reg_idx_t rd;
  xlen_t wdata, inval_pid, e, sh;
  bnb_op_e bnb_op;
  meta_t bnb_meta;
  wb_stage dut (.*);
  initial begin
    for (int i = 0; i < 2000; i++) begin
      r = '0; valid = $urandom % 4 != 0;
      r.rd = 5'($urandom); r.rd_we = $urandom % 2; r.is_load = $urandom % 2;
      r.funct3 = 3'($urandom % 7); r.boff = 3'($urandom); r.result = {$urandom, $urandom};
      r.tag_we = $urandom % 2; r.tag = $urandom % 2; r.bnb = bnb_op_e'($urandom % 3);
      r.inval = $urandom % 2; r.meta.pid = $urandom;
      if (r.funct3 == 1 || r.funct3 == 5) r.boff[0] = 0;
      if (r.funct3 == 2 || r.funct3 == 6) r.boff[1:0] = 0;
      if (r.funct3 == 3) r.boff = 0;
      sh = r.result >> (8 * r.boff);
      if (!r.is_load) e = r.result;
      else case (r.funct3)
        0: e = xlen_t'($signed(sh[7:0]));   1: e = xlen_t'($signed(sh[15:0]));
        2: e = xlen_t'($signed(sh[31:0]));  4: e = xlen_t'(sh[7:0]);
        5: e = xlen_t'(sh[15:0]);           6: e = xlen_t'(sh[31:0]);
        default: e = r.result;
      endcase
      #1 check(wdata == e, $sformatf("load f3=%0d off=%0d", r.funct3, r.boff));
      check(gpr_we == (valid && r.rd_we && r.rd != 0), "gpr_we");
      check(tag_we == (valid && r.tag_we && r.rd != 0), "tag_we");
      check(bnb_en == (valid && r.bnb != BNB_KEEP && r.rd != 0), "bnb_en");
      check(inval == (valid && r.inval) && inval_pid == r.meta.pid, "inval");
    end
    report();
  end
endmodule
