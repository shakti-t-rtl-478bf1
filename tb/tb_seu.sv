// Test of seu: bounds rule base <= ea, ea + size <= bound, for each access
// kind, including the source's example object of 20 bytes at 100.
module tb_seu;
  import shakti_t_pkg::*;
  `include "tb_check.svh"
  logic en, check_o, violation;
  mem_op_e mem_op;
  logic [2:0] funct3;
  xlen_t rs1_val, imm, ea;
  meta_t m;
  seu dut (.en, .mem_op, .funct3, .rs1_val, .imm, .m, .ea, .check(check_o), .violation);
  initial begin
    int n; bit ev, ec;
    en = 1; m = '{bv: 1, pid: 5, base: 100, bound: 120};
    mem_op = MOP_STORE; funct3 = 0; rs1_val = 100;
    imm = 19; #1 check(!violation && check_o, "a[19] legal");
    imm = 20; #1 check(violation, "a[20] violates");
    imm = -1; #1 check(violation, "a[-1] violates");
    funct3 = 3; imm = 12; #1 check(!violation, "8 bytes at 112 legal");
    imm = 13; #1 check(violation, "8 bytes at 113 violate");
    mem_op = MOP_LDPTR; imm = 4; #1 check(!violation, "16 bytes at 104 legal");
    imm = 5; #1 check(violation, "16 bytes at 105 violate");
    m.bv = 0; #1 check(!violation && !check_o, "unbound register not checked");
    m.bv = 1; mem_op = MOP_NONE; #1 check(!check_o && !violation, "non-memory op");
    for (int i = 0; i < 2000; i++) begin
      mem_op = mem_op_e'($urandom % 8); funct3 = 3'($urandom); en = $urandom % 4 != 0;
      m = '{bv: $urandom % 4 != 0, pid: 0, base: 40 + $urandom % 1000, bound: 0};
      m.bound = m.base + ($urandom % 64);
      rs1_val = m.base + ($urandom % 40) - 20; imm = ($urandom % 40) - 20;
      case (mem_op)
        MOP_LOAD, MOP_STORE: n = 1 << funct3[1:0];
        MOP_LDPTR, MOP_FNLD, MOP_FNST: n = 16;
        default: n = 0;
      endcase
      ec = en && m.bv && n != 0;
      ev = ec && ((rs1_val + imm < m.base) || (rs1_val + imm + n > m.bound));
      #1 check(ea == rs1_val + imm, "ea");
      check(check_o == ec && violation == ev, $sformatf("random %0d", i));
    end
    report();
  end
endmodule
