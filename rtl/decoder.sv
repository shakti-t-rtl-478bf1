// Instruction decoder (decode stage).
//
// Combinational. Turns one 32-bit instruction into the control bundle dec_t:
// register indices and which of them are read, the sign-extended immediate,
// the ALU operation and operand sources, the memory operation, whether rd's
// value is written, the tag-propagation class used by the TCU, and
// special-register access. It covers RV64I (without ecall, CSRs and the
// M extension) and the eight new instructions of the security extension,
// whose encodings are listed in shakti_t_pkg. fence decodes as a no-op,
// ebreak as halt, and anything else sets illegal (executed as a no-op).
module decoder
  import shakti_t_pkg::*;
(
  input  logic [31:0] instr,
  output dec_t        d
);
  logic [6:0] opc;
  logic [2:0] f3;
  logic [6:0] f7;
  xlen_t imm_i, imm_s, imm_b, imm_u, imm_j;

  assign opc = instr[6:0];
  assign f3  = instr[14:12];
  assign f7  = instr[31:25];
  assign imm_i = {{52{instr[31]}}, instr[31:20]};
  assign imm_s = {{52{instr[31]}}, instr[31:25], instr[11:7]};
  assign imm_b = {{51{instr[31]}}, instr[31], instr[7], instr[30:25], instr[11:8], 1'b0};
  assign imm_u = {{32{instr[31]}}, instr[31:12], 12'b0};
  assign imm_j = {{43{instr[31]}}, instr[31], instr[19:12], instr[20], instr[30:21], 1'b0};

  always_comb begin
    d = '0;
    d.rd      = instr[11:7];
    d.rs1     = instr[19:15];
    d.rs2     = instr[24:20];
    d.rs3     = instr[31:27];
    d.funct3  = f3;
    d.alu_op  = ALU_ADD;
    d.mem_op  = MOP_NONE;
    d.tag_cls = TC_NONE;
    d.spr_sel = spr_e'(instr[20]);
    unique case (opc)
      OPC_LUI: begin
        d.imm = imm_u; d.alu_op = ALU_PASSB; d.src_b_imm = 1'b1;
        d.rd_we = 1'b1; d.tag_cls = TC_CLEAR;
      end
      OPC_AUIPC: begin
        d.imm = imm_u; d.src_a_pc = 1'b1; d.src_b_imm = 1'b1;
        d.rd_we = 1'b1; d.tag_cls = TC_CLEAR;
      end
      OPC_JAL: begin
        d.imm = imm_j; d.is_jal = 1'b1; d.rd_we = 1'b1; d.tag_cls = TC_CLEAR;
      end
      OPC_JALR: begin
        d.imm = imm_i; d.is_jalr = 1'b1; d.use_rs1 = 1'b1;
        d.rd_we = 1'b1; d.tag_cls = TC_CLEAR;
        d.illegal = (f3 != 3'b000);
      end
      OPC_BRANCH: begin
        d.imm = imm_b; d.is_branch = 1'b1; d.use_rs1 = 1'b1; d.use_rs2 = 1'b1;
        d.illegal = (f3 == 3'b010) || (f3 == 3'b011);
      end
      OPC_LOAD: begin
        d.imm = imm_i; d.use_rs1 = 1'b1; d.src_b_imm = 1'b1;
        d.mem_op = MOP_LOAD; d.rd_we = 1'b1; d.tag_cls = TC_LOAD;
        d.illegal = (f3 == 3'b111);
      end
      OPC_STORE: begin
        d.imm = imm_s; d.use_rs1 = 1'b1; d.use_rs2 = 1'b1; d.src_b_imm = 1'b1;
        d.mem_op = MOP_STORE;
        d.illegal = f3[2];
      end
      OPC_OPIMM: begin
        d.imm = imm_i; d.use_rs1 = 1'b1; d.src_b_imm = 1'b1; d.rd_we = 1'b1;
        d.tag_cls = TC_CLEAR;
        unique case (f3)
          3'b000: begin d.alu_op = ALU_ADD;  d.tag_cls = TC_ADD;   end
          3'b010:       d.alu_op = ALU_SLT;
          3'b011:       d.alu_op = ALU_SLTU;
          3'b100: begin d.alu_op = ALU_XOR;  d.tag_cls = TC_LOGIC; end
          3'b110: begin d.alu_op = ALU_OR;   d.tag_cls = TC_LOGIC; end
          3'b111: begin d.alu_op = ALU_AND;  d.tag_cls = TC_LOGIC; end
          3'b001: begin d.alu_op = ALU_SLL;  d.illegal = (instr[31:26] != 6'b0); end
          3'b101: begin
            d.alu_op  = instr[30] ? ALU_SRA : ALU_SRL;
            d.illegal = (instr[31] != 1'b0) || (instr[29:26] != 4'b0);
          end
          default: ;
        endcase
      end
      OPC_OP: begin
        d.use_rs1 = 1'b1; d.use_rs2 = 1'b1; d.rd_we = 1'b1; d.tag_cls = TC_CLEAR;
        d.illegal = !((f7 == 7'b0) || (f7 == 7'b0100000 && (f3 == 3'b000 || f3 == 3'b101)));
        unique case (f3)
          3'b000: begin
            d.alu_op  = f7[5] ? ALU_SUB : ALU_ADD;
            d.tag_cls = f7[5] ? TC_SUB : TC_ADD;
          end
          3'b001:       d.alu_op = ALU_SLL;
          3'b010:       d.alu_op = ALU_SLT;
          3'b011:       d.alu_op = ALU_SLTU;
          3'b100: begin d.alu_op = ALU_XOR; d.tag_cls = TC_LOGIC; end
          3'b101:       d.alu_op = f7[5] ? ALU_SRA : ALU_SRL;
          3'b110: begin d.alu_op = ALU_OR;  d.tag_cls = TC_LOGIC; end
          3'b111: begin d.alu_op = ALU_AND; d.tag_cls = TC_LOGIC; end
          default: ;
        endcase
      end
      OPC_OPIMM32: begin
        d.imm = imm_i; d.use_rs1 = 1'b1; d.src_b_imm = 1'b1; d.rd_we = 1'b1;
        d.tag_cls = TC_CLEAR;
        unique case (f3)
          3'b000: d.alu_op = ALU_ADDW;
          3'b001: begin d.alu_op = ALU_SLLW; d.illegal = (f7 != 7'b0); end
          3'b101: begin
            d.alu_op  = instr[30] ? ALU_SRAW : ALU_SRLW;
            d.illegal = !((f7 == 7'b0) || (f7 == 7'b0100000));
          end
          default: d.illegal = 1'b1;
        endcase
      end
      OPC_OP32: begin
        d.use_rs1 = 1'b1; d.use_rs2 = 1'b1; d.rd_we = 1'b1; d.tag_cls = TC_CLEAR;
        unique case (f3)
          3'b000: begin
            d.alu_op  = f7[5] ? ALU_SUBW : ALU_ADDW;
            d.illegal = !((f7 == 7'b0) || (f7 == 7'b0100000));
          end
          3'b001: begin d.alu_op = ALU_SLLW; d.illegal = (f7 != 7'b0); end
          3'b101: begin
            d.alu_op  = f7[5] ? ALU_SRAW : ALU_SRLW;
            d.illegal = !((f7 == 7'b0) || (f7 == 7'b0100000));
          end
          default: d.illegal = 1'b1;
        endcase
      end
      OPC_FENCE: ;
      OPC_SYSTEM: begin
        if (instr == 32'h0010_0073) d.halt = 1'b1;
        else                        d.illegal = 1'b1;
      end
      OPC_CUSTOM0: begin
        d.imm = imm_i; d.src_b_imm = 1'b1;
        unique case (f3)
          F3_WRTAG:   d.tag_cls = TC_WRTAG;
          F3_WRSPREG: begin d.use_rs1 = 1'b1; d.spr_we = 1'b1; end
          F3_RDSPREG: begin d.spr_re = 1'b1; d.rd_we = 1'b1; d.tag_cls = TC_CLEAR; end
          F3_LDBNB:   begin d.use_rs1 = 1'b1; d.mem_op = MOP_LDBNB; d.tag_cls = TC_PTR; end
          F3_LDPTR:   begin
            d.use_rs1 = 1'b1; d.mem_op = MOP_LDPTR; d.rd_we = 1'b1; d.tag_cls = TC_PTR;
          end
          F3_FNLD:    begin
            d.use_rs1 = 1'b1; d.mem_op = MOP_FNLD; d.rd_we = 1'b1; d.tag_cls = TC_PTR;
          end
          F3_FNST:    begin
            d.imm = imm_s; d.use_rs1 = 1'b1; d.use_rs2 = 1'b1; d.mem_op = MOP_FNST;
          end
          default:    d.illegal = 1'b1;
        endcase
      end
      OPC_CUSTOM1: begin
        d.use_rs1 = 1'b1; d.use_rs2 = 1'b1; d.use_rs3 = 1'b1; d.mem_op = MOP_WRPLM;
        d.illegal = (f3 != 3'b000);
      end
      default: d.illegal = 1'b1;
    endcase
    if (d.illegal) begin
      d.rd_we = 1'b0; d.mem_op = MOP_NONE; d.tag_cls = TC_NONE;
      d.spr_we = 1'b0; d.spr_re = 1'b0; d.is_branch = 1'b0; d.is_jal = 1'b0;
      d.is_jalr = 1'b0; d.use_rs1 = 1'b0; d.use_rs2 = 1'b0; d.use_rs3 = 1'b0;
    end
  end
endmodule
