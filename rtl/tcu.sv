// TCU: computes the pointer tag and bounds binding of a result.
//
// Combinational, in the execute stage. From the instruction's tag class
// and the tags and bounds of its source operands it decides whether rd's
// tag is written (tag_we), its new value, and what happens to rd's BnBIndex
// entry (keep, unbind, or bind to the bounds in meta):
//   add/addi, and/or/xor(i): the result is a pointer if exactly one source
//       is; it inherits that source's bounds.
//   sub: pointer - integer stays a pointer; pointer - pointer is data.
//   other arithmetic, lui, auipc, jal(r), rdspreg: plain data.
//   loads: tag from memory, no bounds. ldptr/fnld/ldbnb: bound pointer
//       (bounds arrive from the memory stage).
//   wrtag rd, imm: tag <= imm[0]; clearing it also unbinds rd.
// The source only names the TCU; this propagation rule is this design's
// own reading of it, consistent with the source's example where a register
// overwritten by the sum of two integers loses its tag and binding.
module tcu
  import shakti_t_pkg::*;
(
  input  tag_cls_e cls,
  input  logic     rs2_is_reg,
  input  logic     t1,
  input  meta_t    m1,
  input  logic     t2,
  input  meta_t    m2,
  input  logic     imm0,
  output logic     tag_we,
  output logic     tag,
  output bnb_op_e  bnb,
  output meta_t    meta,
  output logic     prop
);
  logic p1, p2;

  always_comb begin
    tag_we = 1'b0;
    tag    = 1'b0;
    bnb    = BNB_KEEP;
    meta   = '0;
    p1     = 1'b0;
    p2     = 1'b0;
    unique case (cls)
      TC_ADD, TC_LOGIC: begin
        p1 = t1 && !(rs2_is_reg && t2);
        p2 = rs2_is_reg && t2 && !t1;
      end
      TC_SUB: p1 = t1 && !(rs2_is_reg && t2);
      default: ;
    endcase
    unique case (cls)
      TC_NONE: ;
      TC_ADD, TC_SUB, TC_LOGIC, TC_CLEAR: begin
        tag_we = 1'b1;
        tag    = p1 || p2;
        meta   = p1 ? m1 : (p2 ? m2 : '0);
        bnb    = meta.bv ? BNB_BIND : BNB_UNBIND;
      end
      TC_LOAD: begin
        tag_we = 1'b1;
        bnb    = BNB_UNBIND;
      end
      TC_PTR: begin
        tag_we = 1'b1;
        tag    = 1'b1;
        bnb    = BNB_BIND;
      end
      TC_WRTAG: begin
        tag_we = 1'b1;
        tag    = imm0;
        bnb    = imm0 ? BNB_KEEP : BNB_UNBIND;
      end
      default: ;
    endcase
  end

  assign prop = p1 || p2;
endmodule
