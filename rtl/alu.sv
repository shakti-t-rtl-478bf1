// Integer ALU of the execute stage, with the branch comparator.
//
// Combinational. Computes the RV64I operations on operands a and b,
// including the 32-bit "W" forms whose result is sign-extended from bit 31.
// ALU_PASSB passes b (lui). br_taken evaluates the branch condition selected
// by funct3 (beq, bne, blt, bge, bltu, bgeu) on the register operands
// cmp_a and cmp_b. The source only names the ALU; this is plain RV64I.
module alu
  import shakti_t_pkg::*;
(
  input  alu_op_e    op,
  input  xlen_t      a,
  input  xlen_t      b,
  output xlen_t      y,
  input  logic [2:0] funct3,
  input  xlen_t      cmp_a,
  input  xlen_t      cmp_b,
  output logic       br_taken
);
  logic [31:0] w;
  always_comb begin
    w = '0;
    y = '0;
    unique case (op)
      ALU_ADD:   y = a + b;
      ALU_SUB:   y = a - b;
      ALU_SLL:   y = a << b[5:0];
      ALU_SLT:   y = {63'b0, $signed(a) < $signed(b)};
      ALU_SLTU:  y = {63'b0, a < b};
      ALU_XOR:   y = a ^ b;
      ALU_SRL:   y = a >> b[5:0];
      ALU_SRA:   y = xlen_t'($signed(a) >>> b[5:0]);
      ALU_OR:    y = a | b;
      ALU_AND:   y = a & b;
      ALU_PASSB: y = b;
      ALU_ADDW:  begin w = a[31:0] + b[31:0];  y = {{32{w[31]}}, w}; end
      ALU_SUBW:  begin w = a[31:0] - b[31:0];  y = {{32{w[31]}}, w}; end
      ALU_SLLW:  begin w = a[31:0] << b[4:0];  y = {{32{w[31]}}, w}; end
      ALU_SRLW:  begin w = a[31:0] >> b[4:0];  y = {{32{w[31]}}, w}; end
      ALU_SRAW:  begin w = 32'($signed(a[31:0]) >>> b[4:0]); y = {{32{w[31]}}, w}; end
      default:   y = '0;
    endcase
  end

  always_comb begin
    unique case (funct3)
      3'b000:  br_taken = (cmp_a == cmp_b);
      3'b001:  br_taken = (cmp_a != cmp_b);
      3'b100:  br_taken = ($signed(cmp_a) <  $signed(cmp_b));
      3'b101:  br_taken = ($signed(cmp_a) >= $signed(cmp_b));
      3'b110:  br_taken = (cmp_a <  cmp_b);
      3'b111:  br_taken = (cmp_a >= cmp_b);
      default: br_taken = 1'b0;
    endcase
  end
endmodule
