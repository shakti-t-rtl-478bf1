// Instruction memory of the fetch stage.
//
// DEPTH 32-bit words, read asynchronously at the byte address pc (bits
// [1:0] ignored), so an instruction is fetched in the same cycle its PC is
// presented. A synchronous write port loads the program. Size and the load
// port are this design's own choices; the source only names the block.
module instr_mem #(
  parameter int DEPTH = 1024
) (
  input  logic                     clk,
  input  logic [63:0]              pc,
  output logic [31:0]              instr,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [31:0]              wdata
);
  localparam int AW = $clog2(DEPTH);
  logic [31:0] mem [DEPTH];

  assign instr = mem[pc[AW+1:2]];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end
endmodule
