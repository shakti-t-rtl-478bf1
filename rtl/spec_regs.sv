// Special registers PLBR and BnB_SP.
//
// PLBR holds the base address of the Pointer Limits Memory; the entry of a
// pointer_id lies at PLBR + 16*pointer_id. BnB_SP is the second special
// register the pipeline figure places next to PLBR; the source gives it no
// further function, so here it is only written by wrspreg and read by
// rdspreg. Both are written in the execute stage (we on the rising edge) and
// read combinationally; reset clears them.
module spec_regs
  import shakti_t_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  we,
  input  spr_e  wsel,
  input  xlen_t wdata,
  input  spr_e  rsel,
  output xlen_t rdata,
  output xlen_t plbr,
  output xlen_t bnb_sp
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      plbr   <= '0;
      bnb_sp <= '0;
    end else if (we) begin
      if (wsel == SPR_PLBR) plbr   <= wdata;
      else                  bnb_sp <= wdata;
    end
  end

  assign rdata = (rsel == SPR_PLBR) ? plbr : bnb_sp;
endmodule
