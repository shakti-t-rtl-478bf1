// Shakti-T: a five-stage 64-bit RISC-V pipeline with light-weight
// fat-pointer security.
//
// Stages and what each holds:
//   FETCH      fetch_stage (PC and next-PC multiplexer), instr_mem
//   DECODE     decoder
//   EXECUTE    gpr_file (read), bnb_cache (read), spec_regs (PLBR, BnB_SP),
//              operand_fwd (one per source), alu, seu (bounds check), tcu
//              (tag / binding of the result)
//   MEMORY     mem_controller, data_mem (with the PLM region)
//   WRITE-BACK wb_stage, writing gpr_file and bnb_cache
// separated by four isb buffers. Registers are read in the execute stage,
// as the source's pipeline figure draws them, and results are forwarded
// from the memory and write-back stages; a consumer of a memory result
// waits one cycle (load-use stall); a multi-cycle memory operation holds
// all earlier stages. Branches and jumps resolve in execute and flush the
// two younger instructions (predict not taken).
//
// A memory access through a bound pointer that falls outside [base, bound)
// is a violation: it is squashed, the younger instructions are flushed,
// viol_pc / viol_addr / viol_count are updated and fetch continues at
// TRAP_VEC. ebreak stops the pipeline (halted) once it reaches execute.
//
// Ports: a write port to load instruction memory; inspection ports that
// read a register (value and tag), its BnBIndex entry, a BnBLookUp row and
// a data-memory word, all combinational; per-cycle event strobes.
// Memory sizes, the trap vector, halting and the inspection ports are this
// design's own; the pipeline structure follows the source's figure.
module shakti_t
  import shakti_t_pkg::*;
#(
  parameter int    IMEM_WORDS = 1024,
  parameter int    DMEM_WORDS = 1024,
  parameter xlen_t RESET_PC   = 64'h0,
  parameter xlen_t TRAP_VEC   = 64'h100
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     imem_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] imem_waddr,
  input  logic [31:0] imem_wdata,
  input  reg_idx_t dbg_reg,
  output xlen_t    dbg_reg_val,
  output logic     dbg_reg_tag,
  output logic     dbg_bnb_iv,
  output logic [BNB_IW-1:0] dbg_bnb_idx,
  input  logic [BNB_IW-1:0] dbg_row,
  output meta_t    dbg_row_meta,
  input  logic [$clog2(DMEM_WORDS)-1:0] dbg_mem_addr,
  output xlen_t    dbg_mem_data,
  output logic     dbg_mem_tag,
  output xlen_t    plbr,
  output xlen_t    bnb_sp,
  output logic     halted,
  output xlen_t    viol_pc,
  output xlen_t    viol_addr,
  output logic [31:0] viol_count,
  output events_t  ev
);
  localparam int DAW = $clog2(DMEM_WORDS);

  // ---------------- control
  logic mem_stall, lu_stall, exe_fire, redirect, halt_fire, violation;
  xlen_t redirect_pc;
  logic front_en, front_flush;

  assign front_en    = !(mem_stall || lu_stall);
  assign front_flush = redirect || halt_fire;

  // ---------------- FETCH
  xlen_t pc;
  logic [31:0] instr;

  fetch_stage #(.RESET_PC(RESET_PC)) u_fetch (
    .clk, .rst_n,
    .stall    (!front_en || halted || halt_fire),
    .redirect (redirect),
    .target   (redirect_pc),
    .pc       (pc)
  );

  instr_mem #(.DEPTH(IMEM_WORDS)) u_imem (
    .clk, .pc, .instr,
    .we (imem_we), .waddr (imem_waddr), .wdata (imem_wdata)
  );

  if_id_t ifid_d, ifid_q;
  logic   ifid_v;
  assign ifid_d = '{pc: pc, instr: instr};

  isb #(.T(if_id_t)) u_if_id (
    .clk, .rst_n, .en (front_en), .flush (front_flush),
    .valid_d (!halted), .d (ifid_d), .valid_q (ifid_v), .q (ifid_q)
  );

  // ---------------- DECODE
  dec_t    dec;
  id_exe_t idex_d, idex_q;
  logic    idex_v;

  decoder u_dec (.instr (ifid_q.instr), .d (dec));
  assign idex_d = '{pc: ifid_q.pc, d: dec};

  isb #(.T(id_exe_t)) u_id_exe (
    .clk, .rst_n, .en (front_en), .flush (front_flush),
    .valid_d (ifid_v), .d (idex_d), .valid_q (idex_v), .q (idex_q)
  );

  // ---------------- EXECUTE
  dec_t  d;
  assign d = idex_q.d;

  reg_idx_t ra [4];
  xlen_t    rf_val [4];
  logic     rf_tag [4];
  reg_idx_t ba [2];
  meta_t    rf_meta [2];

  // write-back signals
  logic     wb_gpr_we, wb_tag_we, wb_tag, wb_bnb_en, wb_inval;
  reg_idx_t wb_rd;
  xlen_t    wb_data, wb_inval_pid;
  bnb_op_e  wb_bnb_op;
  meta_t    wb_meta;
  logic [NREGS-1:0] tag_clr;

  assign ra[0] = d.rs1;
  assign ra[1] = d.rs2;
  assign ra[2] = d.rs3;
  assign ra[3] = dbg_reg;
  assign ba[0] = d.rs1;
  assign ba[1] = d.rs2;

  gpr_file u_gpr (
    .clk, .rst_n, .ra, .rdata (rf_val), .rtag (rf_tag),
    .we (wb_gpr_we), .tag_we (wb_tag_we), .wa (wb_rd), .wdata (wb_data),
    .wtag (wb_tag), .tag_clr (tag_clr)
  );
  assign dbg_reg_val = rf_val[3];
  assign dbg_reg_tag = rf_tag[3];

  exe_mem_t exmem_d, exmem_q;
  logic     exmem_v;

  xlen_t q_pid;
  logic  q_hit;
  meta_t q_meta;
  logic  ev_hit, ev_alloc, ev_evict;

  bnb_cache u_bnb (
    .clk, .rst_n, .ra (ba), .rmeta (rf_meta),
    .q_pid, .q_hit, .q_meta,
    .w_en (wb_bnb_en), .w_op (wb_bnb_op), .w_rd (wb_rd), .w_meta (wb_meta),
    .inval (wb_inval), .inval_pid (wb_inval_pid), .tag_clr,
    .ev_hit, .ev_alloc, .ev_evict,
    .dbg_reg, .dbg_iv (dbg_bnb_iv), .dbg_idx (dbg_bnb_idx),
    .dbg_row, .dbg_meta (dbg_row_meta)
  );

  xlen_t op_val [3];
  logic  op_tag [3];
  meta_t op_meta [3];
  logic  op_stall [3], op_fm [3], op_fw [3];
  reg_idx_t op_rs [3];
  logic     op_use [3];
  assign op_rs  = '{d.rs1, d.rs2, d.rs3};
  assign op_use = '{d.use_rs1, d.use_rs2, d.use_rs3};

  for (genvar i = 0; i < 3; i++) begin : g_fwd
    operand_fwd u_fwd (
      .rs (op_rs[i]), .use_rs (op_use[i]),
      .rf_val (rf_val[i]), .rf_tag (rf_tag[i]),
      .rf_meta (i < 2 ? rf_meta[i < 2 ? i : 0] : meta_t'('0)),
      .m_valid (exmem_v), .m (exmem_q),
      .w_we (wb_gpr_we), .w_tag_we (wb_tag_we), .w_bnb (wb_bnb_en ? wb_bnb_op : BNB_KEEP),
      .w_rd (wb_rd), .w_val (wb_data), .w_tag (wb_tag), .w_meta (wb_meta),
      .w_inval (wb_inval), .w_inval_pid (wb_inval_pid),
      .val (op_val[i]), .tag (op_tag[i]), .meta (op_meta[i]),
      .stall (op_stall[i]), .fwd_mem (op_fm[i]), .fwd_wb (op_fw[i])
    );
  end

  xlen_t spr_rdata;
  spec_regs u_spr (
    .clk, .rst_n,
    .we (exe_fire && d.spr_we && !violation), .wsel (d.spr_sel), .wdata (op_val[0]),
    .rsel (d.spr_sel), .rdata (spr_rdata), .plbr (plbr), .bnb_sp (bnb_sp)
  );

  xlen_t alu_a, alu_b, alu_y;
  logic  br_taken;
  assign alu_a = d.src_a_pc  ? idex_q.pc : op_val[0];
  assign alu_b = d.src_b_imm ? d.imm     : op_val[1];

  alu u_alu (
    .op (d.alu_op), .a (alu_a), .b (alu_b), .y (alu_y),
    .funct3 (d.funct3), .cmp_a (op_val[0]), .cmp_b (op_val[1]), .br_taken
  );

  xlen_t ea;
  logic  seu_check, seu_viol;
  seu u_seu (
    .en (idex_v), .mem_op (d.mem_op), .funct3 (d.funct3),
    .rs1_val (op_val[0]), .imm (d.imm), .m (op_meta[0]),
    .ea, .check (seu_check), .violation (seu_viol)
  );

  logic    t_we, t_tag, t_prop;
  bnb_op_e t_bnb;
  meta_t   t_meta;
  tcu u_tcu (
    .cls (d.tag_cls), .rs2_is_reg (!d.src_b_imm),
    .t1 (op_tag[0]), .m1 (op_meta[0]), .t2 (op_tag[1]), .m2 (op_meta[1]),
    .imm0 (d.imm[0]),
    .tag_we (t_we), .tag (t_tag), .bnb (t_bnb), .meta (t_meta), .prop (t_prop)
  );

  logic take;
  assign lu_stall  = idex_v && (op_stall[0] || op_stall[1] || op_stall[2]);
  assign exe_fire  = idex_v && !mem_stall && !lu_stall;
  assign violation = exe_fire && seu_viol;
  assign take      = d.is_jal || d.is_jalr || (d.is_branch && br_taken);
  assign redirect  = exe_fire && (take || seu_viol);
  assign halt_fire = exe_fire && d.halt && !seu_viol;
  assign redirect_pc = seu_viol  ? TRAP_VEC :
                       d.is_jalr ? ((op_val[0] + d.imm) & ~64'd1) :
                                   (idex_q.pc + d.imm);

  always_comb begin
    exmem_d        = '0;
    exmem_d.pc     = idex_q.pc;
    exmem_d.rd     = d.rd;
    exmem_d.rd_we  = d.rd_we;
    exmem_d.mem_op = d.mem_op;
    exmem_d.funct3 = d.funct3;
    exmem_d.result = (d.is_jal || d.is_jalr) ? idex_q.pc + 64'd4 :
                     d.spr_re                ? spr_rdata : alu_y;
    exmem_d.addr   = ea;
    exmem_d.sdata  = op_val[1];
    exmem_d.stag   = op_tag[1];
    exmem_d.smeta  = op_meta[1];
    exmem_d.tag_we = t_we;
    exmem_d.tag    = t_tag;
    exmem_d.bnb    = t_bnb;
    exmem_d.meta   = t_meta;
    if (d.mem_op == MOP_LDBNB) exmem_d.meta.pid = op_val[0];
    if (d.mem_op == MOP_WRPLM)
      exmem_d.meta = '{bv: 1'b0, pid: op_val[0], base: op_val[1], bound: op_val[2]};
  end

  isb #(.T(exe_mem_t)) u_exe_mem (
    .clk, .rst_n, .en (!mem_stall), .flush (1'b0),
    .valid_d (idex_v && !lu_stall && !seu_viol), .d (exmem_d),
    .valid_q (exmem_v), .q (exmem_q)
  );

  // ---------------- MEMORY
  xlen_t      m_addr, m_rdata, m_wdata;
  logic       m_rtag, m_wtag_en, m_wtag;
  logic [7:0] m_be;
  mem_wb_t    memwb_d, memwb_q;
  logic       memwb_dv, memwb_v, ev_reuse;

  mem_controller u_ctrl (
    .clk, .rst_n, .valid (exmem_v), .r (exmem_q), .plbr,
    .m_addr, .m_rdata, .m_rtag, .m_be, .m_wdata, .m_wtag_en, .m_wtag,
    .q_pid, .q_hit, .q_meta,
    .wb_bind_pending (memwb_v && memwb_q.bnb == BNB_BIND),
    .busy (mem_stall), .out_valid (memwb_dv), .out (memwb_d), .ev_reuse
  );

  data_mem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk,
    .a_addr (m_addr[DAW+2:3]), .a_rdata (m_rdata), .a_rtag (m_rtag),
    .a_be (m_be), .a_wdata (m_wdata), .a_wtag_en (m_wtag_en), .a_wtag (m_wtag),
    .b_addr (dbg_mem_addr), .b_rdata (dbg_mem_data), .b_rtag (dbg_mem_tag)
  );

  isb #(.T(mem_wb_t)) u_mem_wb (
    .clk, .rst_n, .en (1'b1), .flush (1'b0),
    .valid_d (memwb_dv), .d (memwb_d), .valid_q (memwb_v), .q (memwb_q)
  );

  // ---------------- WRITE-BACK
  wb_stage u_wb (
    .valid (memwb_v), .r (memwb_q),
    .gpr_we (wb_gpr_we), .tag_we (wb_tag_we), .rd (wb_rd), .wdata (wb_data),
    .wtag (wb_tag), .bnb_en (wb_bnb_en), .bnb_op (wb_bnb_op), .bnb_meta (wb_meta),
    .inval (wb_inval), .inval_pid (wb_inval_pid)
  );

  // ---------------- status
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      halted     <= 1'b0;
      viol_pc    <= '0;
      viol_addr  <= '0;
      viol_count <= '0;
    end else begin
      if (halt_fire) halted <= 1'b1;
      if (violation) begin
        viol_pc    <= idex_q.pc;
        viol_addr  <= ea;
        viol_count <= viol_count + 32'd1;
      end
    end
  end

  always_comb begin
    ev                = '0;
    ev.retire         = memwb_v;
    ev.load_use_stall = lu_stall && !mem_stall;
    ev.mem_stall      = mem_stall;
    ev.fwd_mem        = exe_fire && (op_fm[0] || op_fm[1] || op_fm[2]);
    ev.fwd_wb         = exe_fire && (op_fw[0] || op_fw[1] || op_fw[2]);
    ev.redirect       = redirect;
    ev.violation      = violation;
    ev.check          = exe_fire && seu_check;
    ev.bnb_hit        = ev_hit;
    ev.bnb_alloc      = ev_alloc;
    ev.bnb_evict      = ev_evict;
    ev.bnb_inval      = wb_inval && (tag_clr != '0);
    ev.fnld_reuse     = ev_reuse;
    ev.tag_prop       = exe_fire && t_prop;
    ev.illegal        = exe_fire && d.illegal;
  end
endmodule
