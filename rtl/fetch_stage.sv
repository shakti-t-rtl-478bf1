// Fetch stage: the PC register and its next-PC multiplexer.
//
// Each rising edge the PC becomes, in priority order: the redirect target
// (a taken branch or jump resolved in the execute stage, or the trap vector
// after a bounds violation), the PC itself when the pipeline is stalled or
// halted, or PC + 4. Reset loads RESET_PC. The source's figure shows the
// PC, the multiplexer and the branch-target path; priorities and reset value
// are this design's own.
module fetch_stage
  import shakti_t_pkg::*;
#(
  parameter xlen_t RESET_PC = '0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  stall,
  input  logic  redirect,
  input  xlen_t target,
  output xlen_t pc
);
  always_ff @(posedge clk) begin
    if (!rst_n)        pc <= RESET_PC;
    else if (redirect) pc <= target;
    else if (!stall)   pc <= pc + 64'd4;
  end
endmodule
