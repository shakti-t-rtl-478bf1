// SEU: bounds check of memory accesses made through a pointer.
//
// Combinational, in the execute stage beside the ALU; it has its own adder
// for the effective address ea = rs1 + imm so the check does not wait for
// the ALU. When the base register is bound to a BnBCache entry (m.bv), an
// access of N bytes is legal only if base <= ea and ea + N <= bound, with
// bound = base + object size as the source defines it. N is the load/store
// size, or 16 for ldptr, fnld and fnst, which touch the pointer word and
// the ptr_id word after it. A base register that is not bound is not
// checked. The check rule and the access sizes are this design's reading;
// the source names the unit and says its work runs in parallel with the ALU.
module seu
  import shakti_t_pkg::*;
(
  input  logic       en,
  input  mem_op_e    mem_op,
  input  logic [2:0] funct3,
  input  xlen_t      rs1_val,
  input  xlen_t      imm,
  input  meta_t      m,
  output xlen_t      ea,
  output logic       check,
  output logic       violation
);
  logic [4:0]  nbytes;
  logic [64:0] last;

  always_comb begin
    unique case (mem_op)
      MOP_LOAD, MOP_STORE:          nbytes = 5'd1 << funct3[1:0];
      MOP_LDPTR, MOP_FNLD, MOP_FNST: nbytes = 5'd16;
      default:                      nbytes = 5'd0;
    endcase
  end

  assign ea        = rs1_val + imm;
  assign last      = {1'b0, ea} + 65'(nbytes);
  assign check     = en && m.bv && (nbytes != 5'd0);
  assign violation = check && ((ea < m.base) || (last > {1'b0, m.bound}));
endmodule
