// Memory-stage controller: sequences the data-memory accesses of each
// instruction, one 64-bit word per cycle.
//
//   load / store        1 cycle  (byte enables from size and address; a
//                                 64-bit store writes rs2's tag into the
//                                 word, a narrower store clears it)
//   ldbnb rd, rs1       2 cycles base, bound from PLM[PLBR + 16*rs1]
//   wrplm rs1,rs2,rs3   2 cycles base, bound into PLM[PLBR + 16*rs1]
//   fnst                2 cycles the register and its tag, then its ptr_id
//                                 (word tag = 1 if it had bounds)
//   ldptr               4 cycles pointer, ptr_id at +8, then base, bound
//   fnld                2 or 4   as ldptr, but when the saved ptr_id is
//                                 still in the BnBCache the two PLM reads
//                                 are skipped; when the saved word says the
//                                 register had no bounds, rd is unbound
// While an instruction needs more cycles, busy holds the stages before it.
// On its last cycle out_valid presents the write-back record. The PLM
// layout (base at PLBR + 16*ptr_id, bound 8 bytes further) and the saving
// of ptr_id next to the pointer (at address + 8) follow the source; the
// cycle counts, the fnst/fnld word format and the cached-entry shortcut
// are this design's own. Accesses are assumed naturally aligned.
module mem_controller
  import shakti_t_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     valid,
  input  exe_mem_t r,
  input  xlen_t    plbr,
  // data memory
  output xlen_t    m_addr,
  input  xlen_t    m_rdata,
  input  logic     m_rtag,
  output logic [7:0] m_be,
  output xlen_t    m_wdata,
  output logic     m_wtag_en,
  output logic     m_wtag,
  // BnBCache query (fnld)
  output xlen_t    q_pid,
  input  logic     q_hit,
  input  meta_t    q_meta,
  input  logic     wb_bind_pending,
  // pipeline
  output logic     busy,
  output logic     out_valid,
  output mem_wb_t  out,
  output logic     ev_reuse
);
  logic [1:0] step;
  xlen_t      r_val, r_pid, r_base;
  logic       r_tag;
  logic       done;
  xlen_t      plm_addr;
  logic [7:0] be_n;

  assign plm_addr = plbr + {r_pid[59:0], 4'b0};

  always_comb begin
    unique case (r.funct3[1:0])
      2'd0:    be_n = 8'h01;
      2'd1:    be_n = 8'h03;
      2'd2:    be_n = 8'h0f;
      default: be_n = 8'hff;
    endcase
  end

  always_comb begin
    m_addr    = r.addr;
    m_be      = '0;
    m_wdata   = '0;
    m_wtag_en = 1'b0;
    m_wtag    = 1'b0;
    q_pid     = m_rdata;
    ev_reuse  = 1'b0;
    done      = 1'b1;
    out         = '0;
    out.rd      = r.rd;
    out.rd_we   = r.rd_we;
    out.funct3  = r.funct3;
    out.boff    = r.addr[2:0];
    out.result  = r.result;
    out.tag_we  = r.tag_we;
    out.tag     = r.tag;
    out.bnb     = r.bnb;
    out.meta    = r.meta;
    unique case (r.mem_op)
      MOP_LOAD: begin
        out.is_load = 1'b1;
        out.result  = m_rdata;
        out.tag     = (r.funct3 == 3'b011) && m_rtag;
      end
      MOP_STORE: begin
        m_be      = valid ? (be_n << r.addr[2:0]) : '0;
        m_wdata   = r.sdata << {r.addr[2:0], 3'b000};
        m_wtag_en = valid;
        m_wtag    = (r.funct3 == 3'b011) && r.stag;
      end
      MOP_LDBNB: begin
        m_addr = (step == 2'd0) ? (plbr + {r.meta.pid[59:0], 4'b0})
                                : (plbr + {r.meta.pid[59:0], 4'b0} + 64'd8);
        done   = (step == 2'd1);
        out.meta.bv    = 1'b1;
        out.meta.base  = r_base;
        out.meta.bound = m_rdata;
      end
      MOP_WRPLM: begin
        m_addr    = (step == 2'd0) ? (plbr + {r.meta.pid[59:0], 4'b0})
                                   : (plbr + {r.meta.pid[59:0], 4'b0} + 64'd8);
        m_be      = valid ? 8'hff : 8'h00;
        m_wdata   = (step == 2'd0) ? r.meta.base : r.meta.bound;
        m_wtag_en = valid;
        done      = (step == 2'd1);
        out.inval = 1'b1;
      end
      MOP_FNST: begin
        m_addr    = (step == 2'd0) ? r.addr : r.addr + 64'd8;
        m_be      = valid ? 8'hff : 8'h00;
        m_wdata   = (step == 2'd0) ? r.sdata : r.smeta.pid;
        m_wtag_en = valid;
        m_wtag    = (step == 2'd0) ? r.stag : r.smeta.bv;
        done      = (step == 2'd1);
      end
      MOP_LDPTR, MOP_FNLD: begin
        unique case (step)
          2'd0:    m_addr = r.addr;
          2'd1:    m_addr = r.addr + 64'd8;
          2'd2:    m_addr = plm_addr;
          default: m_addr = plm_addr + 64'd8;
        endcase
        out.result     = r_val;
        out.meta.bv    = 1'b1;
        out.meta.pid   = r_pid;
        out.meta.base  = r_base;
        out.meta.bound = m_rdata;
        done = (step == 2'd3);
        if (r.mem_op == MOP_FNLD && step == 2'd1) begin
          if (!m_rtag) begin
            done        = 1'b1;
            out.tag     = r_tag;
            out.bnb     = BNB_UNBIND;
            out.meta    = '0;
          end else if (q_hit && !wb_bind_pending) begin
            done        = 1'b1;
            ev_reuse    = valid;
            out.meta    = q_meta;
          end
        end
      end
      default: ;
    endcase
  end

  assign busy      = valid && !done;
  assign out_valid = valid && done;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      step   <= '0;
      r_val  <= '0;
      r_tag  <= 1'b0;
      r_pid  <= '0;
      r_base <= '0;
    end else if (busy) begin
      step <= step + 2'd1;
      unique case (r.mem_op)
        MOP_LDBNB: r_base <= m_rdata;
        MOP_LDPTR, MOP_FNLD: begin
          if (step == 2'd0) begin r_val <= m_rdata; r_tag <= m_rtag; end
          if (step == 2'd1) r_pid  <= m_rdata;
          if (step == 2'd2) r_base <= m_rdata;
        end
        default: ;
      endcase
    end else begin
      step <= '0;
    end
  end
endmodule
