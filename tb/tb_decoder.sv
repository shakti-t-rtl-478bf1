// Test of decoder: fields, immediates and controls of RV64I instructions
// and of every security-extension instruction.
module tb_decoder;
  import shakti_t_pkg::*;
  import rv_asm_pkg::*;
  `include "tb_check.svh"
  logic [31:0] instr;
  dec_t d;
  decoder dut (.*);
  initial begin
    instr = ADDI(5, 6, -7); #1
    check(d.rd == 5 && d.rs1 == 6 && d.imm == -7 && d.alu_op == ALU_ADD && d.src_b_imm &&
          d.rd_we && d.tag_cls == TC_ADD && d.use_rs1 && !d.use_rs2, "addi");
    instr = SUB(1, 2, 3); #1
    check(d.alu_op == ALU_SUB && d.tag_cls == TC_SUB && d.use_rs2 && !d.src_b_imm, "sub");
    instr = ADDW(1, 2, 3); #1 check(d.alu_op == ALU_ADDW && d.tag_cls == TC_CLEAR, "addw");
    instr = ANDI(1, 2, 'h7f0); #1 check(d.alu_op == ALU_AND && d.tag_cls == TC_LOGIC && d.imm == 64'h7f0, "andi");
    instr = SLLI(1, 2, 40); #1 check(d.alu_op == ALU_SLL && d.imm[5:0] == 40 && !d.illegal, "slli 40");
    instr = LUI(9, 'h12345); #1 check(d.imm == 64'h12345000 && d.alu_op == ALU_PASSB && d.rd_we, "lui");
    instr = LD(4, 8, 16); #1 check(d.mem_op == MOP_LOAD && d.funct3 == 3 && d.imm == 16 && d.tag_cls == TC_LOAD, "ld");
    instr = SD(4, 8, -24); #1 check(d.mem_op == MOP_STORE && d.imm == -24 && d.rs2 == 4 && d.rs1 == 8 && !d.rd_we, "sd");
    instr = BNE(3, 4, -8); #1 check(d.is_branch && d.imm == -8 && d.funct3 == 1, "bne");
    instr = JAL(1, 2048); #1 check(d.is_jal && d.imm == 2048 && d.rd_we, "jal");
    instr = EBREAK(); #1 check(d.halt && !d.illegal, "ebreak");
    instr = WRTAG(7, 1); #1 check(d.tag_cls == TC_WRTAG && d.rd == 7 && d.imm[0] && !d.rd_we, "wrtag");
    instr = WRSPREG(3, 1); #1 check(d.spr_we && d.spr_sel == SPR_BNB_SP && d.rs1 == 3, "wrspreg");
    instr = RDSPREG(3, 0); #1 check(d.spr_re && d.rd_we && d.spr_sel == SPR_PLBR, "rdspreg");
    instr = LDBNB(2, 24); #1 check(d.mem_op == MOP_LDBNB && d.rd == 2 && d.rs1 == 24 && !d.rd_we && d.tag_cls == TC_PTR, "ldbnb");
    instr = LDPTR(3, 10, 32); #1 check(d.mem_op == MOP_LDPTR && d.imm == 32 && d.rd_we, "ldptr");
    instr = FNLD(1, 10, 16); #1 check(d.mem_op == MOP_FNLD && d.imm == 16 && d.rd_we, "fnld");
    instr = FNST(1, 10, -16); #1 check(d.mem_op == MOP_FNST && d.imm == -16 && d.rs2 == 1 && d.rs1 == 10, "fnst");
    instr = WRPLM(21, 1, 22); #1 check(d.mem_op == MOP_WRPLM && d.rs1 == 21 && d.rs2 == 1 && d.rs3 == 22 && d.use_rs3, "wrplm");
    instr = 32'h0000_0000; #1 check(d.illegal && !d.rd_we && d.mem_op == MOP_NONE, "illegal");
    instr = 32'h0000_0073; #1 check(d.illegal && !d.halt, "ecall not supported");
    report();
  end
endmodule
