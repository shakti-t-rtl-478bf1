// Tagged data memory.
//
// WORDS words of 64 bits, each with the 1-bit tag the source adds to every
// memory word (0: data or instruction, 1: pointer). The Pointer Limits Memory
// (PLM) is an ordinary region of it that starts at the address held in PLBR.
// Port A serves the memory-stage controller: asynchronous read, synchronous
// write with byte enables; the tag is written when wtag_en is set. Port B is
// an asynchronous read-only port for inspection. Word addressing (byte
// address bits [2:0] dropped), the size and the ports are this design's own.
module data_mem #(
  parameter int WORDS = 1024
) (
  input  logic                     clk,
  input  logic [$clog2(WORDS)-1:0] a_addr,
  output logic [63:0]              a_rdata,
  output logic                     a_rtag,
  input  logic [7:0]               a_be,
  input  logic [63:0]              a_wdata,
  input  logic                     a_wtag_en,
  input  logic                     a_wtag,
  input  logic [$clog2(WORDS)-1:0] b_addr,
  output logic [63:0]              b_rdata,
  output logic                     b_rtag
);
  logic [63:0] mem [WORDS];
  logic        tag [WORDS];

  assign a_rdata = mem[a_addr];
  assign a_rtag  = tag[a_addr];
  assign b_rdata = mem[b_addr];
  assign b_rtag  = tag[b_addr];

  always_ff @(posedge clk) begin
    for (int i = 0; i < 8; i++)
      if (a_be[i]) mem[a_addr][8*i +: 8] <= a_wdata[8*i +: 8];
    if (a_wtag_en) tag[a_addr] <= a_wtag;
  end
endmodule
