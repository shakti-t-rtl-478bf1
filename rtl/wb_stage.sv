// Write-back stage: turns the MEM-WB record of a retiring instruction into
// the writes of the register file and the BnBCache.
//
// Combinational. For loads it selects the addressed byte, half-word or word
// of the 64-bit memory word and sign- or zero-extends it (lb, lh, lw, ld,
// lbu, lhu, lwu). It drives the GPR value and tag writes, the BnBCache
// bind/unbind of rd, and the invalidation of a ptr_id rewritten by wrplm.
// The same signals feed the forwarding path back to the execute stage.
module wb_stage
  import shakti_t_pkg::*;
(
  input  logic     valid,
  input  mem_wb_t  r,
  output logic     gpr_we,
  output logic     tag_we,
  output reg_idx_t rd,
  output xlen_t    wdata,
  output logic     wtag,
  output logic     bnb_en,
  output bnb_op_e  bnb_op,
  output meta_t    bnb_meta,
  output logic     inval,
  output xlen_t    inval_pid
);
  xlen_t sh;

  always_comb begin
    sh = r.result >> {r.boff, 3'b000};
    if (r.is_load) begin
      unique case (r.funct3)
        3'b000:  wdata = {{56{sh[7]}},  sh[7:0]};
        3'b001:  wdata = {{48{sh[15]}}, sh[15:0]};
        3'b010:  wdata = {{32{sh[31]}}, sh[31:0]};
        3'b100:  wdata = {56'b0, sh[7:0]};
        3'b101:  wdata = {48'b0, sh[15:0]};
        3'b110:  wdata = {32'b0, sh[31:0]};
        default: wdata = r.result;
      endcase
    end else begin
      wdata = r.result;
    end
  end

  assign rd        = r.rd;
  assign gpr_we    = valid && r.rd_we && (r.rd != '0);
  assign tag_we    = valid && r.tag_we && (r.rd != '0);
  assign wtag      = r.tag;
  assign bnb_en    = valid && (r.bnb != BNB_KEEP) && (r.rd != '0);
  assign bnb_op    = valid ? r.bnb : BNB_KEEP;
  assign bnb_meta  = r.meta;
  assign inval     = valid && r.inval;
  assign inval_pid = r.meta.pid;
endmodule
