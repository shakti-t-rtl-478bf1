// Test of alu: every operation and branch condition against a reference.
module tb_alu;
  import shakti_t_pkg::*;
  `include "tb_check.svh"
  alu_op_e op;
  xlen_t a, b, y, cmp_a, cmp_b, e;
  logic [2:0] funct3;
  logic br_taken, eb;
  logic [31:0] w;
  alu dut (.*);
  function automatic xlen_t sx(logic [31:0] v); return {{32{v[31]}}, v}; endfunction
  initial begin
    for (int i = 0; i < 3000; i++) begin
      op = alu_op_e'($urandom % 16);
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      if ($urandom % 4 == 0) b = b % 70;
      funct3 = 3'($urandom); cmp_a = (i % 3 == 0) ? a : {$urandom, $urandom}; cmp_b = a;
      case (op)
        ALU_ADD: e = a + b;  ALU_SUB: e = a - b;
        ALU_SLL: e = a << (b % 64);  ALU_SRL: e = a >> (b % 64);
        ALU_SRA: e = xlen_t'($signed(a) >>> (b % 64));
        ALU_SLT: e = ($signed(a) < $signed(b)) ? 1 : 0;
        ALU_SLTU: e = (a < b) ? 1 : 0;
        ALU_XOR: e = a ^ b; ALU_OR: e = a | b; ALU_AND: e = a & b; ALU_PASSB: e = b;
        ALU_ADDW: e = sx(a[31:0] + b[31:0]);
        ALU_SUBW: e = sx(a[31:0] - b[31:0]);
        ALU_SLLW: e = sx(a[31:0] << (b % 32));
        ALU_SRLW: e = sx(a[31:0] >> (b % 32));
        default:  begin w = 32'($signed(a[31:0]) >>> (b % 32)); e = sx(w); end
      endcase
      case (funct3)
        0: eb = cmp_a == cmp_b; 1: eb = cmp_a != cmp_b;
        4: eb = $signed(cmp_a) < $signed(cmp_b); 5: eb = $signed(cmp_a) >= $signed(cmp_b);
        6: eb = cmp_a < cmp_b; 7: eb = cmp_a >= cmp_b; default: eb = 0;
      endcase
      #1 check(y == e, $sformatf("%s %h %h -> %h expected %h", op.name(), a, b, y, e));
      check(br_taken == eb, "branch condition");
    end
    report();
  end
endmodule
