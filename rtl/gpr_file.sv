// General purpose register file with pointer tags.
//
// 32 registers of 64 bits, R0 hard-wired to zero, each with the 1-bit tag
// that marks it as holding a pointer. Four asynchronous read ports return
// value and tag: two for the usual operands, a third because wrplm reads
// three registers, and a fourth for inspection from outside the core.
// One write port (write-back stage) writes the value and, separately, the
// tag on the rising edge; tag_clr clears the tags of every register whose
// pointer was freed (a PLM entry rewritten by wrplm). Reads see the old
// contents in the cycle of a write; the pipeline forwards around that.
module gpr_file
  import shakti_t_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  reg_idx_t   ra [4],
  output xlen_t      rdata [4],
  output logic       rtag [4],
  input  logic       we,
  input  logic       tag_we,
  input  reg_idx_t   wa,
  input  xlen_t      wdata,
  input  logic       wtag,
  input  logic [NREGS-1:0] tag_clr
);
  xlen_t regs [NREGS];
  logic [NREGS-1:0] tags;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
      tags <= '0;
    end else begin
      if (we && wa != '0) regs[wa] <= wdata;
      for (int i = 1; i < NREGS; i++) begin
        if (tag_we && wa == reg_idx_t'(i)) tags[i] <= wtag;
        else if (tag_clr[i])               tags[i] <= 1'b0;
      end
    end
  end

  always_comb begin
    for (int p = 0; p < 4; p++) begin
      rdata[p] = (ra[p] == '0) ? '0 : regs[ra[p]];
      rtag[p]  = (ra[p] == '0) ? 1'b0 : tags[ra[p]];
    end
  end
endmodule
