// Inter-stage buffer: the pipeline register between two stages (IF-ID,
// ID-EXE, EXE-MEM and MEM-WB are all instances of it).
//
// It holds one payload of type T and a valid bit. Each rising clock edge it
// either loads a new payload (en = 1), keeps its contents (en = 0, a stall),
// or is emptied (flush = 1, which wins over en and clears valid). Reset,
// active low and synchronous, empties it and zeroes the payload. The payload
// type, the stall and the flush priority are this design's own choices; the
// source only names the four buffers.
module isb #(
  parameter type T = logic [31:0]
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic flush,
  input  logic valid_d,
  input  T     d,
  output logic valid_q,
  output T     q
);
  always_ff @(posedge clk) begin
    if (!rst_n || flush) begin
      valid_q <= 1'b0;
      q       <= '0;
    end else if (en) begin
      valid_q <= valid_d;
      q       <= d;
    end
  end
endmodule
