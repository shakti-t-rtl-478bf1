// Instruction encoders used by the testbenches: a few RV64I instructions
// and the security-extension instructions, in the encodings of shakti_t_pkg.
package rv_asm_pkg;
  import shakti_t_pkg::*;

  function automatic logic [31:0] r_t(logic [6:0] f7, logic [4:0] rs2, logic [4:0] rs1,
                                      logic [2:0] f3, logic [4:0] rd, logic [6:0] opc);
    return {f7, rs2, rs1, f3, rd, opc};
  endfunction
  function automatic logic [31:0] i_t(int imm, logic [4:0] rs1, logic [2:0] f3,
                                      logic [4:0] rd, logic [6:0] opc);
    logic [11:0] x = 12'(imm);
    return {x, rs1, f3, rd, opc};
  endfunction
  function automatic logic [31:0] s_t(int imm, logic [4:0] rs2, logic [4:0] rs1,
                                      logic [2:0] f3, logic [6:0] opc);
    logic [11:0] x = 12'(imm);
    return {x[11:5], rs2, rs1, f3, x[4:0], opc};
  endfunction
  function automatic logic [31:0] b_t(int imm, logic [4:0] rs2, logic [4:0] rs1, logic [2:0] f3);
    logic [12:0] x = 13'(imm);
    return {x[12], x[10:5], rs2, rs1, f3, x[4:1], x[11], OPC_BRANCH};
  endfunction

  function automatic logic [31:0] ADDI(int rd, int rs1, int imm);
    return i_t(imm, 5'(rs1), 3'b000, 5'(rd), OPC_OPIMM);
  endfunction
  function automatic logic [31:0] ANDI(int rd, int rs1, int imm);
    return i_t(imm, 5'(rs1), 3'b111, 5'(rd), OPC_OPIMM);
  endfunction
  function automatic logic [31:0] SLLI(int rd, int rs1, int sh);
    return i_t(sh, 5'(rs1), 3'b001, 5'(rd), OPC_OPIMM);
  endfunction
  function automatic logic [31:0] ADD(int rd, int rs1, int rs2);
    return r_t(7'b0, 5'(rs2), 5'(rs1), 3'b000, 5'(rd), OPC_OP);
  endfunction
  function automatic logic [31:0] SUB(int rd, int rs1, int rs2);
    return r_t(7'b0100000, 5'(rs2), 5'(rs1), 3'b000, 5'(rd), OPC_OP);
  endfunction
  function automatic logic [31:0] ADDW(int rd, int rs1, int rs2);
    return r_t(7'b0, 5'(rs2), 5'(rs1), 3'b000, 5'(rd), OPC_OP32);
  endfunction
  function automatic logic [31:0] LUI(int rd, int imm20);
    return {20'(imm20), 5'(rd), OPC_LUI};
  endfunction
  function automatic logic [31:0] LD(int rd, int rs1, int imm);
    return i_t(imm, 5'(rs1), 3'b011, 5'(rd), OPC_LOAD);
  endfunction
  function automatic logic [31:0] LB(int rd, int rs1, int imm);
    return i_t(imm, 5'(rs1), 3'b000, 5'(rd), OPC_LOAD);
  endfunction
  function automatic logic [31:0] LBU(int rd, int rs1, int imm);
    return i_t(imm, 5'(rs1), 3'b100, 5'(rd), OPC_LOAD);
  endfunction
  function automatic logic [31:0] SD(int rs2, int rs1, int imm);
    return s_t(imm, 5'(rs2), 5'(rs1), 3'b011, OPC_STORE);
  endfunction
  function automatic logic [31:0] SB(int rs2, int rs1, int imm);
    return s_t(imm, 5'(rs2), 5'(rs1), 3'b000, OPC_STORE);
  endfunction
  function automatic logic [31:0] BEQ(int rs1, int rs2, int off);
    return b_t(off, 5'(rs2), 5'(rs1), 3'b000);
  endfunction
  function automatic logic [31:0] BNE(int rs1, int rs2, int off);
    return b_t(off, 5'(rs2), 5'(rs1), 3'b001);
  endfunction
  function automatic logic [31:0] JAL(int rd, int off);
    logic [20:0] x = 21'(off);
    return {x[20], x[10:1], x[11], x[19:12], 5'(rd), OPC_JAL};
  endfunction
  function automatic logic [31:0] EBREAK();
    return 32'h0010_0073;
  endfunction
  function automatic logic [31:0] WRTAG(int rd, int imm);
    return i_t(imm, 5'd0, F3_WRTAG, 5'(rd), OPC_CUSTOM0);
  endfunction
  function automatic logic [31:0] WRSPREG(int rs1, int imm);
    return i_t(imm, 5'(rs1), F3_WRSPREG, 5'd0, OPC_CUSTOM0);
  endfunction
  function automatic logic [31:0] RDSPREG(int rd, int imm);
    return i_t(imm, 5'd0, F3_RDSPREG, 5'(rd), OPC_CUSTOM0);
  endfunction
  function automatic logic [31:0] LDBNB(int rd, int rs1);
    return i_t(0, 5'(rs1), F3_LDBNB, 5'(rd), OPC_CUSTOM0);
  endfunction
  function automatic logic [31:0] LDPTR(int rd, int rs1, int imm);
    return i_t(imm, 5'(rs1), F3_LDPTR, 5'(rd), OPC_CUSTOM0);
  endfunction
  function automatic logic [31:0] FNLD(int rd, int rs1, int imm);
    return i_t(imm, 5'(rs1), F3_FNLD, 5'(rd), OPC_CUSTOM0);
  endfunction
  // fnst rs2, imm(rs1): store rs2 and its ptr_id at rs1 + imm
  function automatic logic [31:0] FNST(int rs2, int rs1, int imm);
    return s_t(imm, 5'(rs2), 5'(rs1), F3_FNST, OPC_CUSTOM0);
  endfunction
  function automatic logic [31:0] WRPLM(int rs1, int rs2, int rs3);
    return {5'(rs3), 2'b00, 5'(rs2), 5'(rs1), 3'b000, 5'd0, OPC_CUSTOM1};
  endfunction
endpackage
