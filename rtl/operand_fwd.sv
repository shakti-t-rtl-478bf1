// Operand forwarding for one source register: value, tag and bounds.
//
// Combinational, in the execute stage. It picks the newest copy of register
// rs among, in priority order, the instruction in the memory stage (the
// EXE-MEM buffer), the instruction in write-back (whose results are being
// written this cycle) and the register file / BnBCache. Value, tag and
// bounds are forwarded independently, each from the newest instruction that
// writes that part (wrtag, for instance, writes a tag but keeps bounds).
// An instruction in the memory stage whose rd result comes from memory
// (loads, ldptr, fnld, ldbnb) cannot be forwarded yet: stall asks the
// pipeline to hold the consumer one cycle. Bounds whose ptr_id is being
// rewritten by a wrplm in the memory or write-back stage are dropped, as
// the write-back of that wrplm will drop them from the BnBCache. The source
// draws forwarding paths for GPRs and for base and bounds; the priority
// and the stall are this design's own.
module operand_fwd
  import shakti_t_pkg::*;
(
  input  reg_idx_t rs,
  input  logic     use_rs,
  // register file and BnBCache
  input  xlen_t    rf_val,
  input  logic     rf_tag,
  input  meta_t    rf_meta,
  // memory stage
  input  logic     m_valid,
  input  exe_mem_t m,
  // write-back stage
  input  logic     w_we,
  input  logic     w_tag_we,
  input  bnb_op_e  w_bnb,
  input  reg_idx_t w_rd,
  input  xlen_t    w_val,
  input  logic     w_tag,
  input  meta_t    w_meta,
  input  logic     w_inval,
  input  xlen_t    w_inval_pid,
  output xlen_t    val,
  output logic     tag,
  output meta_t    meta,
  output logic     stall,
  output logic     fwd_mem,
  output logic     fwd_wb
);
  logic m_hit, w_hit, m_late;

  assign m_hit  = m_valid && (rs != '0) && (m.rd == rs);
  assign w_hit  = (rs != '0) && (w_rd == rs);
  assign m_late = (m.mem_op == MOP_LOAD) || (m.mem_op == MOP_LDPTR) ||
                  (m.mem_op == MOP_FNLD) || (m.mem_op == MOP_LDBNB);

  always_comb begin
    fwd_mem = 1'b0;
    fwd_wb  = 1'b0;
    // value
    if (rs == '0)                 val = '0;
    else if (m_hit && m.rd_we)  begin val = m.result; fwd_mem = 1'b1; end
    else if (w_hit && w_we)     begin val = w_val;    fwd_wb  = 1'b1; end
    else                          val = rf_val;
    // tag
    if (rs == '0)                 tag = 1'b0;
    else if (m_hit && m.tag_we) begin tag = m.tag;    fwd_mem = 1'b1; end
    else if (w_hit && w_tag_we) begin tag = w_tag;    fwd_wb  = 1'b1; end
    else                          tag = rf_tag;
    // bounds
    if (rs == '0) meta = '0;
    else if (m_hit && m.bnb != BNB_KEEP) begin
      meta    = m.meta;
      meta.bv = (m.bnb == BNB_BIND);
      fwd_mem = 1'b1;
    end else if (w_hit && w_bnb != BNB_KEEP) begin
      meta    = w_meta;
      meta.bv = (w_bnb == BNB_BIND);
      fwd_wb  = 1'b1;
    end else meta = rf_meta;
    if (meta.bv && ((m_valid && m.mem_op == MOP_WRPLM && m.meta.pid == meta.pid) ||
                    (w_inval && w_inval_pid == meta.pid))) begin
      meta.bv = 1'b0;
      tag     = 1'b0;
    end
    if (!use_rs) begin
      fwd_mem = 1'b0;
      fwd_wb  = 1'b0;
    end
  end

  assign stall = use_rs && m_hit && m_late &&
                 (m.rd_we || m.tag_we || m.bnb != BNB_KEEP);
endmodule
