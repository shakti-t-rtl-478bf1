// Shared types and constants of the Shakti-T pipeline.
//
// The core is a 64-bit, five-stage, in-order RISC-V pipeline (fetch, decode,
// execute, memory, write-back) extended with fat-pointer hardware: a 1-bit
// pointer tag on every register and memory word, a Pointer Limits Memory (PLM)
// in data memory holding {base, bound} per pointer_id, and a BnBCache that
// caches base, bound and ptr_id next to the register file.
//
// The encodings of the new instructions are this design's own (the
// instruction names and operands follow the source; their bit patterns are
// not given there):
//   custom-0 (opcode 0001011), I/S-type, funct3 selects
//     000 wrtag   rd, imm        tag(rd) <= imm[0]
//     001 wrspreg rs1, imm       SPR[imm[0]] <= rs1   (0: PLBR, 1: BnB_SP)
//     010 rdspreg rd, imm        rd <= SPR[imm[0]]
//     011 ldbnb   rd, rs1        bind rd to PLM entry ptr_id = rs1
//     100 ldptr   rd, imm(rs1)   rd <= M[a]; ptr_id <= M[a+8]; bind rd
//     101 fnld    rd, imm(rs1)   like ldptr, but reuses a cached entry
//     110 fnst    rs2, imm(rs1)  M[a] <= rs2 (with tag); M[a+8] <= ptr_id(rs2)
//   custom-1 (opcode 0101011), R4-type, funct3 000
//         wrplm   rs1, rs2, rs3  PLM[rs1] <= {base = rs2, bound = rs3}
// A PLM entry is two words: base at PLBR + 16*ptr_id, bound at +8.
package shakti_t_pkg;

  localparam int XLEN     = 64;
  localparam int NREGS    = 32;
  localparam int BNB_ENTRIES = 16;       // BnBLookUp rows 0..15 (fig. BnBCache)
  localparam int BNB_IW   = $clog2(BNB_ENTRIES);

  typedef logic [XLEN-1:0] xlen_t;
  typedef logic [4:0]      reg_idx_t;

  localparam logic [6:0] OPC_LUI      = 7'b0110111;
  localparam logic [6:0] OPC_AUIPC    = 7'b0010111;
  localparam logic [6:0] OPC_JAL      = 7'b1101111;
  localparam logic [6:0] OPC_JALR     = 7'b1100111;
  localparam logic [6:0] OPC_BRANCH   = 7'b1100011;
  localparam logic [6:0] OPC_LOAD     = 7'b0000011;
  localparam logic [6:0] OPC_STORE    = 7'b0100011;
  localparam logic [6:0] OPC_OPIMM    = 7'b0010011;
  localparam logic [6:0] OPC_OP       = 7'b0110011;
  localparam logic [6:0] OPC_OPIMM32  = 7'b0011011;
  localparam logic [6:0] OPC_OP32     = 7'b0111011;
  localparam logic [6:0] OPC_FENCE    = 7'b0001111;
  localparam logic [6:0] OPC_SYSTEM   = 7'b1110011;
  localparam logic [6:0] OPC_CUSTOM0  = 7'b0001011;
  localparam logic [6:0] OPC_CUSTOM1  = 7'b0101011;

  localparam logic [2:0] F3_WRTAG   = 3'b000;
  localparam logic [2:0] F3_WRSPREG = 3'b001;
  localparam logic [2:0] F3_RDSPREG = 3'b010;
  localparam logic [2:0] F3_LDBNB   = 3'b011;
  localparam logic [2:0] F3_LDPTR   = 3'b100;
  localparam logic [2:0] F3_FNLD    = 3'b101;
  localparam logic [2:0] F3_FNST    = 3'b110;

  typedef enum logic [4:0] {
    ALU_ADD, ALU_SUB, ALU_SLL, ALU_SLT, ALU_SLTU, ALU_XOR, ALU_SRL, ALU_SRA,
    ALU_OR, ALU_AND, ALU_PASSB, ALU_ADDW, ALU_SUBW, ALU_SLLW, ALU_SRLW, ALU_SRAW
  } alu_op_e;

  typedef enum logic [3:0] {
    MOP_NONE, MOP_LOAD, MOP_STORE, MOP_LDPTR, MOP_FNLD, MOP_FNST, MOP_LDBNB, MOP_WRPLM
  } mem_op_e;

  // What the write-back does to the BnBIndex entry of rd.
  typedef enum logic [1:0] { BNB_KEEP, BNB_UNBIND, BNB_BIND } bnb_op_e;

  // Tag-propagation class of an instruction, evaluated by the TCU.
  typedef enum logic [2:0] {
    TC_NONE,    // writes no register tag
    TC_CLEAR,   // result is plain data
    TC_ADD,     // pointer +/- integer keeps the pointer (either operand)
    TC_SUB,     // pointer - integer keeps it; pointer - pointer is data
    TC_LOGIC,   // and/or/xor of a pointer with data keeps the pointer
    TC_LOAD,    // tag comes from the memory word
    TC_PTR,     // ldptr / fnld / ldbnb: a bound pointer
    TC_WRTAG    // wrtag
  } tag_cls_e;

  typedef enum logic [0:0] { SPR_PLBR = 1'b0, SPR_BNB_SP = 1'b1 } spr_e;

  // Bounds metadata of one register value.
  typedef struct packed {
    logic  bv;     // bounds valid (register is bound to a BnBLookUp entry)
    xlen_t pid;    // pointer_id
    xlen_t base;
    xlen_t bound;  // first address past the object (bound = base + n)
  } meta_t;

  typedef struct packed {
    logic     illegal;
    reg_idx_t rd, rs1, rs2, rs3;
    logic     use_rs1, use_rs2, use_rs3;
    xlen_t    imm;
    alu_op_e  alu_op;
    logic     src_a_pc;    // ALU operand A is the PC (auipc)
    logic     src_b_imm;   // ALU operand B is the immediate
    logic     is_branch, is_jal, is_jalr;
    logic [2:0] funct3;
    mem_op_e  mem_op;
    logic     rd_we;       // writes the value of rd
    tag_cls_e tag_cls;
    logic     spr_we, spr_re;
    spr_e     spr_sel;
    logic     halt;        // ebreak: stop the pipeline
  } dec_t;

  typedef struct packed {
    xlen_t    pc;
    logic [31:0] instr;
  } if_id_t;

  typedef struct packed {
    xlen_t    pc;
    dec_t     d;
  } id_exe_t;

  typedef struct packed {
    xlen_t    pc;
    reg_idx_t rd;
    logic     rd_we;
    mem_op_e  mem_op;
    logic [2:0] funct3;
    xlen_t    result;   // ALU / link / special-register result
    xlen_t    addr;     // effective address
    xlen_t    sdata;    // store data (rs2)
    logic     stag;     // tag of rs2
    meta_t    smeta;    // bounds of rs2 (fnst)
    logic     tag_we;
    logic     tag;
    bnb_op_e  bnb;
    meta_t    meta;     // bounds of the result; for wrplm the new PLM entry
  } exe_mem_t;

  typedef struct packed {
    reg_idx_t rd;
    logic     rd_we;
    logic     is_load;  // result is a raw memory word to be aligned
    logic [2:0] funct3;
    logic [2:0] boff;   // byte offset of the load
    xlen_t    result;
    logic     tag_we;
    logic     tag;
    bnb_op_e  bnb;
    meta_t    meta;
    logic     inval;    // wrplm: invalidate cached copies of meta.pid
  } mem_wb_t;

  // Per-cycle strobes of the pipeline's mechanisms.
  typedef struct packed {
    logic retire;
    logic load_use_stall;
    logic mem_stall;
    logic fwd_mem;
    logic fwd_wb;
    logic redirect;
    logic violation;
    logic check;
    logic bnb_hit;
    logic bnb_alloc;
    logic bnb_evict;
    logic bnb_inval;
    logic fnld_reuse;
    logic tag_prop;
    logic illegal;
  } events_t;

endpackage
